// input_buffer: gathers 32-bit memory words into the operand set of one
// co-processor step.
//
// The board memory delivers 32-bit words and every operand is 16 bits wide,
// so a word carries two operands: operand 2i in bits 15..0 of word i and
// operand 2i+1 in bits 31..16. A multiply-accumulate step needs two operands
// (WORDS = 1); a multiply-add step needs four (WORDS = 2), so the buffer
// collects two words, clocked in on consecutive cycles, and the datapath
// behind it is issued on every second clock at most.
//
// Interface: valid/ready handshake on both sides. in_last marks the last
// word of a vector and is returned as out_last with the operand set that
// holds it. The buffer accepts a word while it holds fewer than WORDS words
// or while its full set leaves in the same cycle, so a stream of one word
// per clock gives one operand set every WORDS clocks. An operand set is
// registered: it appears one clock after its last word was accepted.
//
// From the design document: the input buffer in front of the multipliers,
// the 32-bit memory word and the two-words-per-step scheme of the
// multiply-add co-processors (run here with an issue every second clock
// rather than a second, divided clock). The word layout and the handshake
// are this design's own.
module input_buffer
  import fp16_pkg::*;
#(
  parameter int unsigned WORDS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  mem_word_t                  in_word,
  input  logic                       in_last,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [2*WORDS-1:0][15:0]   out_ops,
  output logic                       out_last
);

  localparam int unsigned CW = $clog2(WORDS + 1);

  mem_word_t       words_q [WORDS];
  logic [CW-1:0]   count_q;
  logic            last_q;

  logic          full, drain, accept;
  logic [CW-1:0] base;      // slot the next accepted word goes to
  assign full      = (count_q == CW'(WORDS));
  assign drain     = full && out_ready;
  assign in_ready  = !full || out_ready;
  assign accept    = in_valid && in_ready;
  assign out_valid = full;
  assign out_last  = last_q;
  assign base      = drain ? '0 : count_q;

  for (genvar i = 0; i < WORDS; i++) begin : g_ops
    assign out_ops[2*i]   = words_q[i][15:0];
    assign out_ops[2*i+1] = words_q[i][31:16];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      last_q  <= 1'b0;
      for (int i = 0; i < WORDS; i++) words_q[i] <= '0;
    end else begin
      if (accept) begin
        for (int i = 0; i < WORDS; i++)
          if (base == CW'(i)) words_q[i] <= in_word;
        count_q       <= base + CW'(1);
        last_q        <= in_last;
      end else begin
        count_q       <= base;
      end
    end
  end

  initial assert (WORDS >= 1) else $fatal(1, "input_buffer: WORDS must be at least 1");

endmodule
