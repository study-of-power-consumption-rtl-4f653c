// ipcp_top: the four inner-product co-processors side by side.
//
// The design offers two inner-product schemes, each for unsigned 16-bit
// integers and for 16-bit short-word floating point:
//   * multiply-accumulate (int_mac, fp_mac): one multiplier whose products
//     are summed by an adder that feeds its result back to its own input;
//     it returns sum(a_i * b_i) for a vector delimited by a last flag;
//   * multiply-add (int_madd, fp_madd): two multipliers feeding one adder;
//     it returns a*b + c*d for every four operands.
// Each co-processor was meant to be loaded into the FPGA on its own, so the
// top shares nothing but clock and reset between them: every co-processor
// keeps its own 32-bit input word stream (valid/ready, two 16-bit operands
// per word) and its own 32-bit output word stream (two 16-bit results per
// word, with a flush for a lone last result and out_half marking it).
//
// Port prefixes: im_ integer multiply-accumulate, ia_ integer multiply-add,
// fm_ floating-point multiply-accumulate, fa_ floating-point multiply-add.
// The integer co-processors also report overflow of the 16-bit result.
//
// From the design document: the four co-processors and their building
// blocks. Gathering them in one top with separate ports is this design's
// own arrangement.
module ipcp_top
  import fp16_pkg::*;
#(
  parameter int unsigned MULT_STAGES = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // integer multiply-accumulate
  input  logic      im_in_valid,
  output logic      im_in_ready,
  input  mem_word_t im_in_word,
  input  logic      im_in_last,
  input  logic      im_flush,
  output logic      im_out_valid,
  output logic      im_out_half,
  output mem_word_t im_out_word,
  output logic      im_ovf,
  // integer multiply-add
  input  logic      ia_in_valid,
  output logic      ia_in_ready,
  input  mem_word_t ia_in_word,
  input  logic      ia_flush,
  output logic      ia_out_valid,
  output logic      ia_out_half,
  output mem_word_t ia_out_word,
  output logic      ia_ovf,
  // floating-point multiply-accumulate
  input  logic      fm_in_valid,
  output logic      fm_in_ready,
  input  mem_word_t fm_in_word,
  input  logic      fm_in_last,
  input  logic      fm_flush,
  output logic      fm_out_valid,
  output logic      fm_out_half,
  output mem_word_t fm_out_word,
  // floating-point multiply-add
  input  logic      fa_in_valid,
  output logic      fa_in_ready,
  input  mem_word_t fa_in_word,
  input  logic      fa_flush,
  output logic      fa_out_valid,
  output logic      fa_out_half,
  output mem_word_t fa_out_word
);

  int_mac #(.MULT_STAGES(MULT_STAGES)) u_int_mac (
    .clk, .rst_n,
    .in_valid  (im_in_valid),
    .in_ready  (im_in_ready),
    .in_word   (im_in_word),
    .in_last   (im_in_last),
    .flush     (im_flush),
    .out_valid (im_out_valid),
    .out_half  (im_out_half),
    .out_word  (im_out_word),
    .ovf       (im_ovf)
  );

  int_madd #(.MULT_STAGES(MULT_STAGES)) u_int_madd (
    .clk, .rst_n,
    .in_valid  (ia_in_valid),
    .in_ready  (ia_in_ready),
    .in_word   (ia_in_word),
    .flush     (ia_flush),
    .out_valid (ia_out_valid),
    .out_half  (ia_out_half),
    .out_word  (ia_out_word),
    .ovf       (ia_ovf)
  );

  fp_mac #(.MULT_STAGES(MULT_STAGES)) u_fp_mac (
    .clk, .rst_n,
    .in_valid  (fm_in_valid),
    .in_ready  (fm_in_ready),
    .in_word   (fm_in_word),
    .in_last   (fm_in_last),
    .flush     (fm_flush),
    .out_valid (fm_out_valid),
    .out_half  (fm_out_half),
    .out_word  (fm_out_word)
  );

  fp_madd #(.MULT_STAGES(MULT_STAGES)) u_fp_madd (
    .clk, .rst_n,
    .in_valid  (fa_in_valid),
    .in_ready  (fa_in_ready),
    .in_word   (fa_in_word),
    .flush     (fa_flush),
    .out_valid (fa_out_valid),
    .out_half  (fa_out_half),
    .out_word  (fa_out_word)
  );

endmodule
