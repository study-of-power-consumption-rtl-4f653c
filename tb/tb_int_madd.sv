// tb_int_madd: self-checking test of the integer multiply-add co-processor.
//
// Sends operand quadruples (a, b, c, d) as pairs of 32-bit words, with
// random idle clocks and random flushes, then a long unbroken stream. The
// expected a*b + c*d (modulo 2^16) and overflow flag come from exact
// integer arithmetic. The packed output words are unpacked and compared in
// order. Also checked: no word is ever refused; each result reaches the
// output buffer exactly 1 + MULT_STAGES clocks after its second word; and
// an unbroken stream of 200 words gives exactly 100 results (the
// half-rate issue). Counted: results with and without overflow.
module tb_int_madd;
  import fp16_pkg::*;

  localparam int unsigned MULT_STAGES = 8;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      iv, ir, fl, ov, oh, ovf;
  mem_word_t iw, ow;
  int        checks = 0;
  int        failures = 0;
  int        cycle = 0;
  int        n_ovf = 0, n_ok = 0, n_res = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int_madd dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_word(iw),
                .flush(fl), .out_valid(ov), .out_half(oh), .out_word(ow), .ovf);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uint16_t exp_res[$];
  bit      exp_ovf[$];
  int      sec_cyc[$];
  int      nacc = 0;
  bit      ovf_due = 0;
  bit      ovf_want;

  always @(posedge clk) if (rst_n) begin
    if (iv && !ir) begin failures++; $display("word refused"); end
    if (iv && ir) begin
      nacc++;
      if (nacc % 2 == 0) sec_cyc.push_back(cycle);
    end
    if (ovf_due) begin
      checks++;
      if (ovf != ovf_want) begin failures++; $display("ovf %b, want %b", ovf, ovf_want); end
      ovf_due = 0;
    end
    if (dut.u_out.in_valid) begin
      int c;
      checks++;
      n_res++;
      c = sec_cyc.pop_front();
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
      e = exp_res.pop_front();
      if (ow[15:0] != e) begin failures++; $display("result %0d, want %0d", ow[15:0], e); end
      if (!oh) begin
        checks++;
        e = exp_res.pop_front();
        if (ow[31:16] != e) begin failures++; $display("result %0d, want %0d", ow[31:16], e); end
      end
    end
  end

  task automatic send_quad(bit big, bit gaps);
    uint16_t x[4];
    longint  p1, p2;
    for (int k = 0; k < 4; k++) x[k] = big ? 16'($urandom) : 16'($urandom_range(180));
    p1 = longint'(x[0]) * longint'(x[1]);
    p2 = longint'(x[2]) * longint'(x[3]);
    exp_res.push_back(16'(p1 + p2));
    exp_ovf.push_back(p1 > 65535 || p2 > 65535 || p1 + p2 > 65535);
    for (int w = 0; w < 2; w++) begin
      while (gaps && $urandom_range(4) == 0) begin
        @(negedge clk); iv = 0; fl = ($urandom_range(15) == 0);
      end
      @(negedge clk);
      iv = 1; iw = {x[2*w+1], x[2*w]}; fl = gaps && ($urandom_range(15) == 0);
    end
  endtask

  initial begin
    int r0;
    rst_n = 1'b0; iv = 0; fl = 0; iw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int q = 0; q < 600; q++) send_quad(($urandom_range(3) == 0), 1'b1);
    @(negedge clk) begin iv = 0; fl = 0; end
    repeat (MULT_STAGES + 5) @(posedge clk);
    r0 = n_res;
    for (int q = 0; q < 100; q++) send_quad(($urandom_range(3) == 0), 1'b0);
    @(negedge clk) iv = 0;
    repeat (MULT_STAGES + 5) @(posedge clk);
    checks++;
    if (n_res - r0 != 100) begin failures++; $display("stream gave %0d results", n_res - r0); end
    @(negedge clk) fl = 1;
    @(negedge clk) fl = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_res.size() != 0) begin failures++; $display("%0d results missing", exp_res.size()); end
    $display("results ok=%0d ovf=%0d", n_ok, n_ovf);
    if (n_ok == 0 || n_ovf == 0) begin failures++; $display("a case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
