// tb_output_buffer: self-checking test of the result-packing output buffer.
//
// Random 16-bit results arrive with random gaps and flush is raised at
// random. A reference model in the testbench keeps the pending lower half
// and predicts every word: two results packed low then high, or a lone
// result in the low half with out_half set when flushed. Each word must
// appear on the clock after the result or flush that completes it.
module tb_output_buffer;
  import fp16_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      iv, fl, ov, oh;
  uint16_t   d;
  mem_word_t w;
  int        checks = 0;
  int        failures = 0;
  int        n_full = 0, n_half = 0;

  always #5 clk = ~clk;

  output_buffer dut (.clk, .rst_n, .in_valid(iv), .in_data(d), .flush(fl),
                     .out_valid(ov), .out_half(oh), .out_word(w));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: expected output in the clock after each edge.
  bit        have = 0;
  uint16_t   low;
  bit        exp_v, exp_h;
  mem_word_t exp_w;

  always @(posedge clk) if (rst_n) begin
    // check what the previous edge produced
    checks++;
    if (ov != exp_v || (exp_v && (w != exp_w || oh != exp_h))) begin
      failures++;
      $display("got v=%b h=%b %h, want v=%b h=%b %h", ov, oh, w, exp_v, exp_h, exp_w);
    end
    if (exp_v) begin if (exp_h) n_half++; else n_full++; end
    exp_v = 0; exp_h = 0;
    if (iv && have)      begin exp_v = 1; exp_w = {d, low}; have = 0; end
    else if (iv && fl)   begin exp_v = 1; exp_h = 1; exp_w = {16'h0, d}; have = 0; end
    else if (iv)         begin low = d; have = 1; end
    else if (fl && have) begin exp_v = 1; exp_h = 1; exp_w = {16'h0, low}; have = 0; end
  end

  initial begin
    exp_v = 0; exp_h = 0; exp_w = 0; low = 0;
    rst_n = 1'b0; iv = 0; fl = 0; d = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      iv = ($urandom_range(2) != 0);
      d  = 16'($urandom);
      fl = ($urandom_range(9) == 0);
    end
    @(negedge clk) begin iv = 0; fl = 0; end
    repeat (3) @(posedge clk);
    $display("words: full=%0d half=%0d", n_full, n_half);
    if (n_full == 0 || n_half == 0) begin failures++; $display("a word kind never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
