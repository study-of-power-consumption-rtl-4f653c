// tb_int_mac: self-checking test of the integer multiply-accumulate
// co-processor.
//
// Sends vectors of random length (1 to 12 pairs) as 32-bit words, with
// random idle clocks and random flushes of the output buffer. Most vectors
// use small operands whose inner product fits in 16 bits; some use the
// full range and overflow. The expected inner product (modulo 2^16) and
// overflow flag are computed in the testbench from the exact sum. The
// packed output words are unpacked and compared in order. Also checked:
// the co-processor never refuses a word (one pair per clock), and each
// result reaches the output buffer exactly 1 + MULT_STAGES clocks after
// its last pair was accepted. Counted: results with and without overflow,
// full and half output words, vectors of length one.
module tb_int_mac;
  import fp16_pkg::*;

  localparam int unsigned MULT_STAGES = 8;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      iv, ir, il, fl, ov, oh, ovf;
  mem_word_t iw, ow;
  int        checks = 0;
  int        failures = 0;
  int        cycle = 0;
  int        n_ovf = 0, n_ok = 0, n_full = 0, n_half = 0, n_len1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int_mac dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_word(iw),
               .in_last(il), .flush(fl), .out_valid(ov), .out_half(oh),
               .out_word(ow), .ovf);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uint16_t exp_res[$];
  bit      exp_ovf[$];
  int      last_cyc[$];
  bit      ovf_due = 0;
  bit      ovf_want;

  always @(posedge clk) if (rst_n) begin
    if (iv && !ir) begin failures++; $display("word refused"); end
    if (iv && ir && il) last_cyc.push_back(cycle);
    if (ovf_due) begin
      checks++;
      if (ovf != ovf_want) begin failures++; $display("ovf %b, want %b", ovf, ovf_want); end
      ovf_due = 0;
    end
    if (dut.u_out.in_valid) begin
      int c;
      checks++;
      c = last_cyc.pop_front();
      if (cycle - c != 1 + MULT_STAGES) begin
        failures++; $display("latency %0d, want %0d", cycle - c, 1 + MULT_STAGES);
      end
      ovf_want = exp_ovf.pop_front();
      ovf_due  = 1;
      if (ovf_want) n_ovf++; else n_ok++;
    end
    if (ov) begin
      uint16_t e;
      checks++;
      if (oh) n_half++; else n_full++;
      e = exp_res.pop_front();
      if (ow[15:0] != e) begin failures++; $display("result %0d, want %0d", ow[15:0], e); end
      if (!oh) begin
        checks++;
        e = exp_res.pop_front();
        if (ow[31:16] != e) begin failures++; $display("result %0d, want %0d", ow[31:16], e); end
      end else if (ow[31:16] != 0) begin
        failures++; $display("half word with upper half set");
      end
    end
  end

  task automatic send_vector(int len, bit big);
    longint  total;
    bit      o;
    total = 0; o = 0;
    if (len == 1) n_len1++;
    for (int i = 0; i < len; i++) begin
      uint16_t x, z;
      x = big ? 16'($urandom) : 16'($urandom_range(255));
      z = big ? 16'($urandom) : 16'($urandom_range(255));
      total += longint'(x) * longint'(z);
      if (longint'(x) * longint'(z) > 65535 || total > 65535) o = 1;
      while ($urandom_range(4) == 0) begin
        @(negedge clk); iv = 0; fl = ($urandom_range(15) == 0);
      end
      @(negedge clk);
      iv = 1; iw = {z, x}; il = (i == len - 1); fl = ($urandom_range(15) == 0);
    end
    exp_res.push_back(16'(total));
    exp_ovf.push_back(o);
  endtask

  initial begin
    rst_n = 1'b0; iv = 0; il = 0; fl = 0; iw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int v = 0; v < 400; v++)
      send_vector($urandom_range(12, 1), ($urandom_range(4) == 0));
    @(negedge clk) begin iv = 0; fl = 0; end
    repeat (MULT_STAGES + 5) @(posedge clk);
    @(negedge clk) fl = 1;
    @(negedge clk) fl = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_res.size() != 0) begin failures++; $display("%0d results missing", exp_res.size()); end
    $display("results ok=%0d ovf=%0d, words full=%0d half=%0d, length-1 vectors=%0d",
             n_ok, n_ovf, n_full, n_half, n_len1);
    if (n_ok == 0 || n_ovf == 0 || n_full == 0 || n_half == 0 || n_len1 == 0) begin
      failures++; $display("a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
