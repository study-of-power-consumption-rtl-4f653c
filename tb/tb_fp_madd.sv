// tb_fp_madd: self-checking test of the floating-point multiply-add
// co-processor.
//
// Sends operand quadruples (a, b, c, d) in the 16-bit float format as pairs
// of 32-bit words, with random idle clocks and random flushes, then an
// unbroken stream. Operands come from the whole range with zeros and
// infinities mixed in, and from a narrow range around one where the two
// products often cancel. The expected a*b + c*d is built from the
// real-number reference. The packed output words are unpacked and compared
// in order. Also checked: no word is ever refused; each result reaches the
// output buffer exactly 1 + MULT_STAGES + FP_ADD_LATENCY clocks after its
// second word; an unbroken stream of 200 words gives 100 results. Counted:
// finite, zero and infinite results.
module tb_fp_madd;
  import fp16_pkg::*;
  import tb_fp16_ref_pkg::*;

  localparam int unsigned MULT_STAGES = 8;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      iv, ir, fl, ov, oh;
  mem_word_t iw, ow;
  int        checks = 0;
  int        failures = 0;
  int        cycle = 0;
  int        n_res = 0, n_fin = 0, n_zero = 0, n_inf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp_madd dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_word(iw),
               .flush(fl), .out_valid(ov), .out_half(oh), .out_word(ow));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp16_t exp_res[$];
  int    sec_cyc[$];
  int    nacc = 0;

  task automatic count(fp16_t e);
    if (e.exp == EXP_INF) n_inf++;
    else if (e.exp == EXP_ZERO) n_zero++;
    else n_fin++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (iv && !ir) begin failures++; $display("word refused"); end
    if (iv && ir) begin
      nacc++;
      if (nacc % 2 == 0) sec_cyc.push_back(cycle);
    end
    if (dut.u_out.in_valid) begin
      int c;
      checks++;
      n_res++;
      c = sec_cyc.pop_front();
      if (cycle - c != 1 + MULT_STAGES + FP_ADD_LATENCY) begin
        failures++;
        $display("latency %0d, want %0d", cycle - c, 1 + MULT_STAGES + FP_ADD_LATENCY);
      end
    end
    if (ov) begin
      fp16_t e;
      checks++;
      e = exp_res.pop_front();
      count(e);
      if (ow[15:0] != e) begin failures++; $display("result %h, want %h", ow[15:0], e); end
      if (!oh) begin
        checks++;
        e = exp_res.pop_front();
        count(e);
        if (ow[31:16] != e) begin failures++; $display("result %h, want %h", ow[31:16], e); end
      end
    end
  end

  task automatic send_quad(bit wide, bit gaps);
    fp16_t x[4];
    for (int k = 0; k < 4; k++) x[k] = wide ? rand_fp(8) : rand_fp_range(6, 8);
    exp_res.push_back(ref_add(ref_mul(x[0], x[1]), ref_mul(x[2], x[3])));
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
    for (int q = 0; q < 800; q++) send_quad($urandom_range(1), 1'b1);
    @(negedge clk) begin iv = 0; fl = 0; end
    repeat (MULT_STAGES + 10) @(posedge clk);
    r0 = n_res;
    for (int q = 0; q < 100; q++) send_quad($urandom_range(1), 1'b0);
    @(negedge clk) iv = 0;
    repeat (MULT_STAGES + 10) @(posedge clk);
    checks++;
    if (n_res - r0 != 100) begin failures++; $display("stream gave %0d results", n_res - r0); end
    @(negedge clk) fl = 1;
    @(negedge clk) fl = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_res.size() != 0) begin failures++; $display("%0d results missing", exp_res.size()); end
    $display("results finite=%0d zero=%0d infinite=%0d", n_fin, n_zero, n_inf);
    if (n_fin == 0 || n_zero == 0 || n_inf == 0) begin failures++; $display("a case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
