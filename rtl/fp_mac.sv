// fp_mac: floating-point multiply-accumulate inner-product co-processor.
//
// Computes the inner product sum(a_i * b_i) of two vectors in the 16-bit
// short-word floating-point format (see fp16_pkg). Each 32-bit input word
// holds one pair (a_i in bits 15..0, b_i in bits 31..16); in_last marks the
// word with the last pair of a vector. The input buffer holds the pair, the
// pipelined floating-point multiplier (fp_mult) forms the product and the
// pipelined floating-point adder (fp_add) adds it to the running sum, whose
// output is fed straight back to the adder's second input. The first product
// of a vector is added to zero. After the last pair the sum leaves through
// the output buffer, packed two results to a 32-bit word.
//
// The feedback: a new product may only enter the adder once the previous
// sum has come out, FP_ADD_LATENCY (4) clocks after that sum started. The
// multiplier cannot be held mid-pipeline, so the issue of pairs from the
// input buffer is spaced FP_ADD_LATENCY clocks apart; in_ready drops in
// between (the accumulation stall). The running sum coming out of the
// adder is used directly in the clock it appears and kept in a register
// for later products.
//
// Timing: one pair per FP_ADD_LATENCY clocks. A pair waits in the input
// buffer until its issue slot; the result of a vector enters the output
// buffer MULT_STAGES + FP_ADD_LATENCY clocks after its last pair was issued
// to the multiplier.
//
// From the design document: the structure (input buffer, pipelined
// multiplier, pipelined adder whose output feeds back to its input, output
// buffer), the number format and both arithmetic units. This design's own
// choices: the issue spacing that keeps the feedback correct, the use of
// in_last to delimit vectors, and the word layout.
module fp_mac
  import fp16_pkg::*;
#(
  parameter int unsigned MULT_STAGES = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  mem_word_t in_word,
  input  logic      in_last,
  input  logic      flush,
  output logic      out_valid,
  output logic      out_half,
  output mem_word_t out_word
);

  localparam int unsigned GAP = FP_ADD_LATENCY;
  localparam int unsigned GW  = $clog2(GAP + 1);

  logic             op_valid, op_ready, op_last;
  logic [1:0][15:0] ops;

  input_buffer #(.WORDS(1)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_word, .in_last,
    .out_valid (op_valid),
    .out_ready (op_ready),
    .out_ops   (ops),
    .out_last  (op_last)
  );

  // Issue spacing.
  logic [GW-1:0] gap_q;
  logic          issue;
  assign op_ready = (gap_q == '0);
  assign issue    = op_valid && op_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          gap_q <= '0;
    else if (issue)      gap_q <= GW'(GAP - 1);
    else if (gap_q != 0) gap_q <= gap_q - GW'(1);

  // Multiplier with the last flag alongside.
  logic  p_valid;
  fp16_t prod;

  fp_mult #(.STAGES(MULT_STAGES)) u_mult (
    .clk, .rst_n,
    .in_valid  (issue),
    .a         (fp16_t'(ops[0])),
    .b         (fp16_t'(ops[1])),
    .out_valid (p_valid),
    .y         (prod)
  );

  logic [MULT_STAGES-1:0] mlast;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mlast <= '0;
    else        mlast <= {mlast[MULT_STAGES-2:0], op_last};
  logic p_last;
  assign p_last = mlast[MULT_STAGES-1];

  // Accumulating adder.
  logic  s_valid;
  fp16_t s_y;
  fp16_t acc_q;
  logic  fresh_q;     // next product starts a new vector
  fp16_t run;

  always_comb begin
    if (fresh_q)      run = '0;
    else if (s_valid) run = s_y;      // direct feedback
    else              run = acc_q;
  end

  fp_add u_add (
    .clk, .rst_n,
    .in_valid  (p_valid),
    .a         (prod),
    .b         (run),
    .out_valid (s_valid),
    .y         (s_y)
  );

  // Valid and last flags of the additions in flight.
  logic [GAP-2:0] avld;
  logic [GAP-1:0] alast;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      avld  <= '0;
      alast <= '0;
    end else begin
      avld  <= {avld[GAP-3:0],  p_valid};
      alast <= {alast[GAP-2:0], p_valid && p_last};
    end
  logic s_last;
  assign s_last = alast[GAP-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      fresh_q <= 1'b1;
    end else begin
      if (s_valid) acc_q   <= s_y;
      if (p_valid) fresh_q <= p_last;
    end
  end

  output_buffer u_out (
    .clk, .rst_n,
    .in_valid (s_valid && s_last),
    .in_data  (uint16_t'(s_y)),
    .flush,
    .out_valid, .out_half, .out_word
  );

  // A product must never meet a sum still in flight.
  a_no_overlap: assert property (@(posedge clk)
    p_valid |-> (avld == '0))
    else $error("fp_mac: product entered the adder while a sum was in flight");

  initial assert (MULT_STAGES >= 2)
    else $fatal(1, "fp_mac: MULT_STAGES must be at least 2");

endmodule
