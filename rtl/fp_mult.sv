// fp_mult: pipelined multiplier for the 16-bit short-word floating-point
// format (see fp16_pkg).
//
// Three paths run side by side. The sign of the product is the XOR of the
// operand signs. The two 12-bit significands 1.m1 and 1.m2 (fraction plus
// phantom bit) go through the 12-bit array multiplier (array_mult); of its
// 24-bit product only the upper 13 bits are used. The excess-7 exponents
// are added. Because both significands lie in [1,2), the product lies in
// [1,4): if its top bit is one the product is of the form 1x.xxx and the
// fraction is taken one place further left and the exponent bias removed is
// 6 instead of 7 (one added to the exponent); if it is zero the next bit is
// the leading one and the bias removed is 7. That top bit is the "exponent
// adjust select". A biased result exponent of 0 or less is an underflow and
// gives zero (exponent 0); one of 15 or more is an overflow and gives
// infinity (exponent 15). An operand exponent of 0 (zero) forces a zero
// result and one of 15 (infinity) forces an infinite result; when one
// operand is zero and the other infinite the result is infinity.
//
// Interface and timing: a, b with in_valid; y with out_valid STAGES clock
// cycles later (the latency of the array multiplier); one product per clock.
// The normalisation and exponent correction are combinational after the
// multiplier's last register rank.
//
// From the design document: the sign XOR, the excess-7 adder with the
// 7-or-6 correction, the 12-bit array multiplier, the use of the product's
// top bit, the underflow/overflow and zero/infinity rules. This design's
// own choices: the fraction is truncated (no rounding); a zero or infinite
// result has its fraction cleared; infinity wins over zero; the exponent
// sum travels next to the multiplier in a delay line.
module fp_mult
  import fp16_pkg::*;
#(
  parameter int unsigned STAGES = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp16_t a,
  input  fp16_t b,
  output logic  out_valid,
  output fp16_t y
);

  // Side information that travels alongside the significand product.
  typedef struct packed {
    logic       sign;
    logic [4:0] esum;   // e1 + e2, still carrying twice the bias
    logic       zero;   // an operand is zero
    logic       inf;    // an operand is infinite
  } side_t;

  side_t side_in;
  side_t side_q [STAGES+1];

  always_comb begin
    side_in.sign = a.sign ^ b.sign;
    side_in.esum = {1'b0, a.exp} + {1'b0, b.exp};
    side_in.zero = exp_is_zero(a.exp) || exp_is_zero(b.exp);
    side_in.inf  = exp_is_inf(a.exp)  || exp_is_inf(b.exp);
  end

  assign side_q[0] = side_in;
  for (genvar i = 0; i < STAGES; i++) begin : g_side
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) side_q[i+1] <= '0;
      else        side_q[i+1] <= side_q[i];
    end
  end

  logic [2*SIG_W-1:0] prod;
  logic               prod_valid;

  array_mult #(.W(SIG_W), .STAGES(STAGES)) u_sig_mult (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         ({1'b1, a.man}),
    .b         ({1'b1, b.man}),
    .out_valid (prod_valid),
    .p         (prod)
  );

  // Upper 13 bits of the 24-bit product; the rest only decide rounding,
  // which this unit does not do.
  logic [12:0] upper;
  logic [10:0] unused_low;
  assign upper      = prod[2*SIG_W-1 -: 13];
  assign unused_low = prod[10:0];

  always_comb begin
    side_t       s;
    logic        adj;      // exponent adjust select
    logic signed [6:0] e;
    s   = side_q[STAGES];
    adj = upper[12];
    y.sign = s.sign;
    y.man  = adj ? upper[11:1] : upper[10:0];
    // Remove the bias: 7 normally, 6 when the product needs the right shift.
    e = $signed({2'b00, s.esum}) - $signed({3'b000, EXP_BIAS}) + $signed({6'b0, adj});
    if (e <= 0)        y.exp = EXP_ZERO;   // underflow
    else if (e >= 15)  y.exp = EXP_INF;    // overflow
    else               y.exp = e[3:0];
    if (s.zero) y.exp = EXP_ZERO;
    if (s.inf)  y.exp = EXP_INF;
    if (y.exp == EXP_ZERO || y.exp == EXP_INF) y.man = '0;
  end

  assign out_valid = prod_valid;

endmodule
