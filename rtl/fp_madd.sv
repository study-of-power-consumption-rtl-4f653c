// fp_madd: floating-point multiply-add inner-product co-processor.
//
// Computes y = a*b + c*d in the 16-bit short-word floating-point format
// (see fp16_pkg) with two pipelined floating-point multipliers (fp_mult)
// side by side and one pipelined floating-point adder (fp_add) behind them.
// The four operands arrive as two 32-bit memory words (a in bits 15..0 and b
// in bits 31..16 of the first, c and d in the second) on consecutive
// clocks; the input buffer gathers them, so the arithmetic is issued at most
// on every second clock and results come out at half the word rate. Results
// are packed two to a 32-bit output word by the output buffer.
//
// Timing: a result enters the output buffer 1 + MULT_STAGES + FP_ADD_LATENCY
// clocks after its second word was accepted; one result per two clocks.
//
// From the design document: two multipliers feeding one adder between an
// input and an output buffer, the number format, both arithmetic units, and
// two 16-bit operands per 32-bit word with the arithmetic at half the word
// rate. This design's own choices: the half rate is an issue slot on every
// second clock of one clock rather than a second, divided clock; the word
// layout and the pipeline depth.
module fp_madd
  import fp16_pkg::*;
#(
  parameter int unsigned MULT_STAGES = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  mem_word_t in_word,
  input  logic      flush,
  output logic      out_valid,
  output logic      out_half,
  output mem_word_t out_word
);

  logic             op_valid;
  logic [3:0][15:0] ops;
  logic             unused_last;

  input_buffer #(.WORDS(2)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_word,
    .in_last   (1'b0),
    .out_valid (op_valid),
    .out_ready (1'b1),
    .out_ops   (ops),
    .out_last  (unused_last)
  );

  logic  p1_valid, p2_valid;
  fp16_t p1, p2;

  fp_mult #(.STAGES(MULT_STAGES)) u_mult_ab (
    .clk, .rst_n,
    .in_valid  (op_valid),
    .a         (fp16_t'(ops[0])),
    .b         (fp16_t'(ops[1])),
    .out_valid (p1_valid),
    .y         (p1)
  );

  fp_mult #(.STAGES(MULT_STAGES)) u_mult_cd (
    .clk, .rst_n,
    .in_valid  (op_valid),
    .a         (fp16_t'(ops[2])),
    .b         (fp16_t'(ops[3])),
    .out_valid (p2_valid),
    .y         (p2)
  );

  logic  s_valid;
  fp16_t s_y;

  fp_add u_add (
    .clk, .rst_n,
    .in_valid  (p1_valid),
    .a         (p1),
    .b         (p2),
    .out_valid (s_valid),
    .y         (s_y)
  );

  output_buffer u_out (
    .clk, .rst_n,
    .in_valid (s_valid),
    .in_data  (uint16_t'(s_y)),
    .flush,
    .out_valid, .out_half, .out_word
  );

  // Both multipliers are issued together and have the same depth.
  a_mult_in_step: assert property (@(posedge clk)
    p1_valid == p2_valid)
    else $error("fp_madd: multiplier outputs out of step");

endmodule
