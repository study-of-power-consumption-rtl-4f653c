// int_madd: integer multiply-add inner-product co-processor.
//
// Computes y = a*b + c*d for unsigned 16-bit integers with two pipelined
// 16x16 array multipliers (array_mult, W = 16) working side by side and a
// 16-bit ripple carry-propagate adder behind them. The four operands arrive
// as two 32-bit memory words (a in bits 15..0 and b in bits 31..16 of the
// first, c and d in the second) on consecutive clocks; the input buffer
// gathers them, so the multipliers and the adder are issued at most on every
// second clock and results come out at half the word rate. Results are packed
// two to a 32-bit output word by the output buffer.
//
// Results are modulo 2^16. ovf is updated with every result: it is set when
// a product exceeded 65535 or the final addition carried out.
//
// Timing: a result enters the output buffer 1 + MULT_STAGES clocks after
// its second word was accepted; one result per two clocks.
//
// From the design document: two multipliers feeding one adder between an
// input and an output buffer, the unsigned 16-bit format, the 16-bit
// multipliers and carry-propagate adder, and two 16-bit operands per 32-bit
// word with the arithmetic at half the word rate. This design's own
// choices: the half rate is an issue slot on every second clock of one
// clock rather than a second, divided clock; the word layout, the
// pipeline depth and the overflow flag.
module int_madd
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
  output mem_word_t out_word,
  output logic      ovf
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

  logic        p1_valid, p2_valid;
  logic [31:0] p1, p2;

  array_mult #(.W(16), .STAGES(MULT_STAGES)) u_mult_ab (
    .clk, .rst_n,
    .in_valid  (op_valid),
    .a         (ops[0]),
    .b         (ops[1]),
    .out_valid (p1_valid),
    .p         (p1)
  );

  array_mult #(.W(16), .STAGES(MULT_STAGES)) u_mult_cd (
    .clk, .rst_n,
    .in_valid  (op_valid),
    .a         (ops[2]),
    .b         (ops[3]),
    .out_valid (p2_valid),
    .p         (p2)
  );

  logic [16:0] sum;
  logic        ovf_now;
  assign sum     = cpa16(p1[15:0], p2[15:0]);
  assign ovf_now = (p1[31:16] != '0) || (p2[31:16] != '0) || sum[16];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        ovf <= 1'b0;
    else if (p1_valid) ovf <= ovf_now;

  output_buffer u_out (
    .clk, .rst_n,
    .in_valid (p1_valid),
    .in_data  (sum[15:0]),
    .flush,
    .out_valid, .out_half, .out_word
  );

  // Both multipliers are issued together and have the same depth.
  a_mult_in_step: assert property (@(posedge clk)
    p1_valid == p2_valid)
    else $error("int_madd: multiplier outputs out of step");

endmodule
