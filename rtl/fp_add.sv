// fp_add: pipelined adder for the 16-bit short-word floating-point format
// (see fp16_pkg).
//
// Five steps, separated by four register ranks:
//   1. Check each operand for zero (exponent 0) and infinity (exponent 15)
//      and prepend the phantom bit: 1.m for a non-zero operand, 0 for zero.
//   2. Compare the exponents by subtraction: a 5-bit adder forms
//      {0,e1} + ~{0,e2} + 1. Its bit 4 ("pos./neg.") is one when e2 > e1;
//      the magnitude of the low four bits is the exponent difference.
//   3. Choose the result exponent with four 2:1 multiplexers (e2 when
//      pos./neg. is one, else e1) and align the significands: the one with
//      the smaller exponent is shifted right by the difference.
//   4. Add or subtract the 12-bit significands in a 13-bit adder. When the
//      signs differ, the negative operand is complemented (XOR plus carry
//      in) to form a two's-complement subtraction; a missing carry out then
//      means the sum is negative and a second 13-bit adder converts it back
//      to magnitude. The sign of the result is set by the same logic.
//   5. Normalise: if sum bit 12 is one, take bits 11..1 and add one to the
//      exponent; else if bit 11 is one, take bits 10..0 unchanged; else shift
//      left until bit 11 is one, subtracting one from the exponent per place.
// An exponent that rises to 15 gives infinity; one that falls to 0 or below,
// and an exact zero sum, give zero. An infinite operand gives infinity with
// that operand's sign (the first operand's when both are infinite).
//
// Interface and timing: a, b with in_valid; y with out_valid 4 clock cycles
// later (FP_ADD_LATENCY in fp16_pkg); one addition per clock. Step 5 is
// combinational after the fourth register rank.
//
// From the design document: the five steps, their order, the register
// ranks between them, the 5-bit comparison adder, the exponent multiplexers,
// the two right-shift units, the 13-bit adders and the three normalisation
// cases. This design's own choices: the difference is taken as a magnitude
// (the raw low four bits are the two's complement when e2 > e1), shifted-out
// bits are dropped (no rounding), and the handling of infinities, of a zero
// sum and of exponent overflow and underflow after normalisation.
module fp_add
  import fp16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp16_t a,
  input  fp16_t b,
  output logic  out_valid,
  output fp16_t y
);

  // ---------------------------------------------------------------- step 1
  typedef struct packed {
    logic             v;
    logic             s1, s2;
    logic [EXP_W-1:0] e1, e2;
    logic [SIG_W-1:0] m1, m2;     // with phantom bit
    logic             inf;        // an operand is infinite
    logic             inf_sign;   // sign of that operand
  } r1_t;

  r1_t r1_d, r1_q;

  always_comb begin
    r1_d.v        = in_valid;
    r1_d.s1       = a.sign;
    r1_d.s2       = b.sign;
    r1_d.e1       = a.exp;
    r1_d.e2       = b.exp;
    r1_d.m1       = exp_is_zero(a.exp) ? '0 : {1'b1, a.man};
    r1_d.m2       = exp_is_zero(b.exp) ? '0 : {1'b1, b.man};
    r1_d.inf      = exp_is_inf(a.exp) || exp_is_inf(b.exp);
    r1_d.inf_sign = exp_is_inf(a.exp) ? a.sign : b.sign;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r1_q <= '0;
    else        r1_q <= r1_d;

  // ---------------------------------------------------------------- step 2
  typedef struct packed {
    logic             v;
    logic             s1, s2;
    logic [EXP_W-1:0] e1, e2;
    logic [SIG_W-1:0] m1, m2;
    logic             posneg;     // e2 > e1
    logic [EXP_W-1:0] diff;       // |e1 - e2|
    logic             inf, inf_sign;
  } r2_t;

  r2_t r2_d, r2_q;

  always_comb begin
    logic [4:0] d5;
    d5 = {1'b0, r1_q.e1} + ~{1'b0, r1_q.e2} + 5'd1;
    r2_d.v        = r1_q.v;
    r2_d.s1       = r1_q.s1;
    r2_d.s2       = r1_q.s2;
    r2_d.e1       = r1_q.e1;
    r2_d.e2       = r1_q.e2;
    r2_d.m1       = r1_q.m1;
    r2_d.m2       = r1_q.m2;
    r2_d.posneg   = d5[4];
    r2_d.diff     = d5[4] ? (~d5[3:0] + 4'd1) : d5[3:0];
    r2_d.inf      = r1_q.inf;
    r2_d.inf_sign = r1_q.inf_sign;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r2_q <= '0;
    else        r2_q <= r2_d;

  // ---------------------------------------------------------------- step 3
  typedef struct packed {
    logic             v;
    logic             s1, s2;
    logic [EXP_W-1:0] exp;
    logic [SIG_W-1:0] m1, m2;     // aligned
    logic             inf, inf_sign;
  } r3_t;

  r3_t r3_d, r3_q;

  always_comb begin
    r3_d.v        = r2_q.v;
    r3_d.s1       = r2_q.s1;
    r3_d.s2       = r2_q.s2;
    r3_d.exp      = r2_q.posneg ? r2_q.e2 : r2_q.e1;
    // Right shift unit of each significand, enabled by pos./neg. or its
    // complement.
    r3_d.m1       = r2_q.posneg  ? (r2_q.m1 >> r2_q.diff) : r2_q.m1;
    r3_d.m2       = !r2_q.posneg ? (r2_q.m2 >> r2_q.diff) : r2_q.m2;
    r3_d.inf      = r2_q.inf;
    r3_d.inf_sign = r2_q.inf_sign;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r3_q <= '0;
    else        r3_q <= r3_d;

  // ---------------------------------------------------------------- step 4
  typedef struct packed {
    logic             v;
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [12:0]      sum;        // magnitude
    logic             inf, inf_sign;
  } r4_t;

  r4_t r4_d, r4_q;

  always_comb begin
    logic        differ, neg1, neg2, cout, conv;
    logic [12:0] op1, op2, raw;
    differ = r3_q.s1 ^ r3_q.s2;
    neg1   = r3_q.s1 & differ;
    neg2   = r3_q.s2 & differ;
    op1    = {1'b0, r3_q.m1} ^ {13{neg1}};
    op2    = {1'b0, r3_q.m2} ^ {13{neg2}};
    {cout, raw} = {1'b0, op1} + {1'b0, op2} + {13'd0, differ};
    conv   = differ & ~cout;          // negative difference
    r4_d.v        = r3_q.v;
    r4_d.sign     = (r3_q.s1 & r3_q.s2) | conv;
    r4_d.exp      = r3_q.exp;
    r4_d.sum      = (raw ^ {13{conv}}) + {12'd0, conv};
    r4_d.inf      = r3_q.inf;
    r4_d.inf_sign = r3_q.inf_sign;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r4_q <= '0;
    else        r4_q <= r4_d;

  // ---------------------------------------------------------------- step 5
  always_comb begin
    logic signed [5:0] e;
    logic [3:0]        sh;
    logic [10:0]       low;
    sh  = '0;
    low = r4_q.sum[10:0];
    y.sign = r4_q.sign;
    if (r4_q.sum[12]) begin
      y.man = r4_q.sum[11:1];
      e     = $signed({2'b00, r4_q.exp}) + 6'sd1;
    end else if (r4_q.sum[11]) begin
      y.man = r4_q.sum[10:0];
      e     = $signed({2'b00, r4_q.exp});
    end else begin
      // Distance of the leading one below bit 11.
      for (int k = 0; k <= 10; k++)
        if (low[k]) sh = 4'(11 - k);
      y.man = 11'(low << sh);
      e     = $signed({2'b00, r4_q.exp}) - $signed({2'b00, sh});
    end
    if (r4_q.sum == '0 || e <= 0) begin
      y.exp  = EXP_ZERO;
      y.sign = 1'b0;
    end else if (e >= 15) begin
      y.exp  = EXP_INF;
    end else begin
      y.exp  = e[3:0];
    end
    if (r4_q.inf) begin
      y.exp  = EXP_INF;
      y.sign = r4_q.inf_sign;
    end
    if (y.exp == EXP_ZERO || y.exp == EXP_INF) y.man = '0;
  end

  assign out_valid = r4_q.v;

endmodule
