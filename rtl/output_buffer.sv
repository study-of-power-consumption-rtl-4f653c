// output_buffer: packs 16-bit co-processor results into 32-bit memory words.
//
// The first result of a pair goes to bits 15..0 and the second to bits
// 31..16; the word is presented (out_valid for one clock) on the clock after
// the second result arrives. flush pushes out a half-filled word, with its
// upper half zero, so that the final result of an odd-length stream is not
// held back. A result arriving together with flush is packed first.
//
// Interface: in_valid/in_data in, out_valid/out_word out, no back-pressure:
// the board memory is taken to accept a word on every clock. out_half says
// that only the lower half of out_word holds a result.
//
// From the design document: an output buffer between the last arithmetic
// unit and the 32-bit board memory. The packing order, flush and the
// absence of back-pressure are this design's own.
module output_buffer
  import fp16_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  uint16_t   in_data,
  input  logic      flush,
  output logic      out_valid,
  output logic      out_half,
  output mem_word_t out_word
);

  logic    have_q;     // lower half holds a result
  uint16_t low_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q    <= 1'b0;
      low_q     <= '0;
      out_valid <= 1'b0;
      out_half  <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_half  <= 1'b0;
      if (in_valid && have_q) begin
        out_valid <= 1'b1;
        out_word  <= {in_data, low_q};
        have_q    <= 1'b0;
      end else if (in_valid && flush) begin
        out_valid <= 1'b1;
        out_half  <= 1'b1;
        out_word  <= {16'h0000, in_data};
        have_q    <= 1'b0;
      end else if (in_valid) begin
        low_q     <= in_data;
        have_q    <= 1'b1;
      end else if (flush && have_q) begin
        out_valid <= 1'b1;
        out_half  <= 1'b1;
        out_word  <= {16'h0000, low_q};
        have_q    <= 1'b0;
      end
    end
  end

endmodule
