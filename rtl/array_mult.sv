// array_mult: pipelined unsigned array multiplier built from carry-save rows.
//
// The W partial products b[j]*A are formed with AND gates. The first
// carry-save adder (CSA) row adds the first three of them; each further row
// adds one more partial product to the sum and carry vectors of the row
// above, so no carry ever ripples sideways inside the array. W-2 CSA rows
// (CSA 0 .. CSA 9 for W = 12) are followed by one ripple-carry propagate
// adder (a half adder then full adders) that merges the final sum and carry
// vectors into the 2W-bit product. The array has W-1 logic levels in all.
//
// Pipelining: STAGES register ranks (1 .. W-1) are spread evenly over the
// W-1 levels; the last rank always sits on the product output. Each rank
// holds the running sum and carry vectors, the multiplicand and the
// multiplier bits still to be used, and a valid bit. With STAGES = 1 the
// array is combinational and only the product is registered.
//
// Interface and timing: present a, b with in_valid; product p appears with
// out_valid exactly STAGES clock cycles later. A new pair may be presented
// every cycle (throughput one product per clock). Reset clears every
// register rank.
//
// From the design document: the CSA-row array, the ripple propagate adder,
// the 12-bit size and the one to eight pipeline stages. This design's own
// choices: the even spreading of the ranks over the levels, the valid bit,
// and the propagate adder spanning all 2W bits (its low bits only pass the
// already final sum bits through, since the carry vector is zero there).
module array_mult #(
  parameter int unsigned W      = 12,
  parameter int unsigned STAGES = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           out_valid,
  output logic [2*W-1:0] p
);

  localparam int unsigned NLEV = W - 1;   // W-2 CSA rows + propagate adder

  initial begin
    assert (W >= 3) else $fatal(1, "array_mult: W must be at least 3");
    assert (STAGES >= 1 && STAGES <= NLEV)
      else $fatal(1, "array_mult: STAGES must be 1 .. W-1");
  end

  // Is there a register rank right after logic level lev (0-based)?
  function automatic bit reg_after(int unsigned lev);
    for (int unsigned r = 1; r <= STAGES; r++)
      if ((r * NLEV) / STAGES == lev + 1) return 1'b1;
    return 1'b0;
  endfunction

  typedef struct packed {
    logic           v;
    logic [W-1:0]   a;
    logic [W-1:0]   b;
    logic [2*W-1:0] s;
    logic [2*W-1:0] c;
  } lvl_t;

  // Level L reads g_lvl[L-1].nxt (or the seed for L = 0) and drives its
  // own nxt, registered or not.
  lvl_t seed;

  // Partial products 0 and 1 seed the sum and carry vectors of CSA 0.
  always_comb begin
    seed.v = in_valid;
    seed.a = a;
    seed.b = b;
    seed.s = b[0] ? {{W{1'b0}}, a}           : '0;
    seed.c = b[1] ? {{(W-1){1'b0}}, a, 1'b0} : '0;
  end

  for (genvar L = 0; L < NLEV; L++) begin : g_lvl
    lvl_t cur, res, nxt;

    if (L == 0) begin : g_first
      assign cur = seed;
    end else begin : g_next
      assign cur = g_lvl[L-1].nxt;
    end

    if (L < NLEV - 1) begin : g_csa
      // CSA row L adds partial product L+2.
      logic [2*W-1:0] pp;
      always_comb begin
        pp    = cur.b[L+2] ? ({{W{1'b0}}, cur.a} << (L + 2)) : '0;
        res   = cur;
        res.s = cur.s ^ cur.c ^ pp;
        res.c = ((cur.s & cur.c) | (cur.s & pp) | (cur.c & pp)) << 1;
      end
    end else begin : g_prop
      // Ripple-carry propagate adder; the product is left in .s.
      always_comb begin
        logic cy;
        res   = cur;
        res.c = '0;
        cy    = 1'b0;
        for (int i = 0; i < 2 * W; i++) begin
          res.s[i] = cur.s[i] ^ cur.c[i] ^ cy;
          cy       = (cur.s[i] & cur.c[i]) | (cy & (cur.s[i] ^ cur.c[i]));
        end
      end
    end

    if (reg_after(L)) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) nxt <= '0;
        else        nxt <= res;
      end
    end else begin : g_wire
      assign nxt = res;
    end
  end

  assign out_valid = g_lvl[NLEV-1].nxt.v;
  assign p         = g_lvl[NLEV-1].nxt.s;

  // The multiplicand, multiplier and carry vector are spent after the
  // propagate adder.
  logic unused_last;
  assign unused_last = ^{g_lvl[NLEV-1].nxt.a, g_lvl[NLEV-1].nxt.b, g_lvl[NLEV-1].nxt.c};

endmodule
