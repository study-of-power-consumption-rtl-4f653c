// int_mac: integer multiply-accumulate inner-product co-processor.
//
// Computes the inner product sum(a_i * b_i) of two vectors of unsigned
// 16-bit integers. Each 32-bit input word holds one pair (a_i in bits 15..0,
// b_i in bits 31..16); in_last marks the word holding the last pair of a
// vector. The input buffer registers the pair, a 16x16 pipelined array
// multiplier (array_mult, W = 16) forms the product, and a 16-bit ripple
// carry-propagate adder adds it to the accumulator register in the cycle
// the product appears. Because that addition takes one clock, the
// accumulator feeds back without a stall and a pair is accepted on every
// clock. After the last pair the sum leaves through the output buffer,
// packed two results to a 32-bit word, and the accumulator restarts at zero
// with the next vector.
//
// Results are modulo 2^16, the width of the data format. ovf is updated
// when an inner product is complete: it is set when the value did not fit,
// that is when a product exceeded 65535 or the accumulator carried out for
// any of its terms, and held until the next inner product completes.
//
// Timing: the result of a vector enters the output buffer 1 + MULT_STAGES
// clocks after its last pair was accepted (input register and multiplier
// ranks; the accumulation is in the same clock as the product), and the
// packed word appears on the clock after the second result of a pair, or
// after flush.
//
// From the design document: the structure (input buffer, pipelined array
// multiplier, adder with feedback, output buffer), the unsigned 16-bit
// format, the 16-bit multiplier and 16-bit carry-propagate adder. This
// design's own choices: the pipeline depth, in_last, the overflow flag and
// taking the low 16 bits of each product.
module int_mac
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
  output mem_word_t out_word,
  output logic      ovf
);

  logic                 op_valid, op_last;
  logic [1:0][15:0]     ops;

  input_buffer #(.WORDS(1)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_word, .in_last,
    .out_valid (op_valid),
    .out_ready (1'b1),
    .out_ops   (ops),
    .out_last  (op_last)
  );

  logic        p_valid;
  logic [31:0] prod;

  array_mult #(.W(16), .STAGES(MULT_STAGES)) u_mult (
    .clk, .rst_n,
    .in_valid  (op_valid),
    .a         (ops[0]),
    .b         (ops[1]),
    .out_valid (p_valid),
    .p         (prod)
  );

  // The last flag rides next to the multiplier.
  logic [MULT_STAGES-1:0] last_dly;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) last_dly <= '0;
    else        last_dly <= {last_dly[MULT_STAGES-2:0], op_last};
  logic p_last;
  assign p_last = last_dly[MULT_STAGES-1];

  // Accumulator.
  uint16_t     acc_q;
  logic        fresh_q;     // next product starts a new vector
  logic        ovf_run_q;   // overflow so far in this vector
  logic [16:0] sum;
  logic        ovf_now;

  assign sum     = cpa16(fresh_q ? 16'd0 : acc_q, prod[15:0]);
  assign ovf_now = (!fresh_q && ovf_run_q) || (prod[31:16] != '0) || sum[16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      fresh_q   <= 1'b1;
      ovf_run_q <= 1'b0;
    end else if (p_valid) begin
      acc_q     <= sum[15:0];
      fresh_q   <= p_last;
      ovf_run_q <= ovf_now;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 ovf <= 1'b0;
    else if (p_valid && p_last) ovf <= ovf_now;

  output_buffer u_out (
    .clk, .rst_n,
    .in_valid (p_valid && p_last),
    .in_data  (sum[15:0]),
    .flush,
    .out_valid, .out_half, .out_word
  );

  initial assert (MULT_STAGES >= 2)
    else $fatal(1, "int_mac: MULT_STAGES must be at least 2");

endmodule
