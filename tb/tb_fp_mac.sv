// tb_fp_mac: self-checking test of the floating-point multiply-accumulate
// co-processor.
//
// Sends vectors of random length (1 to 10 pairs) in the 16-bit float
// format as 32-bit words, with random idle clocks and random flushes.
// Operands mostly lie within a few binades of one so that running sums stay
// in range and mix signs (cancellation); a few vectors hold zeros, huge
// values (overflow to infinity) or infinities. The expected inner product
// is built pair by pair from the real-number reference (product, then sum
// with the running value, in the order the hardware uses). The packed
// output words are unpacked and compared in order. Also checked: pairs
// are issued to the multiplier at least, and with words offered on every
// clock exactly, FP_ADD_LATENCY clocks apart (the accumulation stall), and each result reaches
// the output buffer MULT_STAGES + FP_ADD_LATENCY clocks after its last
// pair was issued from the input buffer to the multiplier. Counted: stall clocks, infinite and finite results.
module tb_fp_mac;
  import fp16_pkg::*;
  import tb_fp16_ref_pkg::*;

  localparam int unsigned MULT_STAGES = 8;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      iv, ir, il, fl, ov, oh;
  mem_word_t iw, ow;
  int        checks = 0;
  int        failures = 0;
  int        cycle = 0;
  int        n_tight = 0, n_stall = 0, n_inf = 0, n_fin = 0, last_acc = -100;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp_mac dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_word(iw),
              .in_last(il), .flush(fl), .out_valid(ov), .out_half(oh),
              .out_word(ow));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp16_t exp_res[$];
  int    last_cyc[$];

  always @(posedge clk) if (rst_n) begin
    if (iv && !ir) n_stall++;
    if (dut.issue) begin
      // issues at least FP_ADD_LATENCY clocks apart, exactly that when
      // the words come back to back
      checks++;
      if (cycle - last_acc < FP_ADD_LATENCY) begin
        failures++; $display("pairs issued %0d clocks apart", cycle - last_acc);
      end
      if (cycle - last_acc == FP_ADD_LATENCY) n_tight++;
      last_acc = cycle;
    end
    if (dut.issue && dut.op_last) last_cyc.push_back(cycle);
    if (dut.u_out.in_valid) begin
      int c;
      checks++;
      c = last_cyc.pop_front();
      if (cycle - c != MULT_STAGES + FP_ADD_LATENCY) begin
        failures++;
        $display("latency %0d, want %0d", cycle - c, MULT_STAGES + FP_ADD_LATENCY);
      end
    end
    if (ov) begin
      fp16_t e;
      checks++;
      e = exp_res.pop_front();
      if (e.exp == EXP_INF) n_inf++; else n_fin++;
      if (ow[15:0] != e) begin failures++; $display("result %h, want %h", ow[15:0], e); end
      if (!oh) begin
        checks++;
        e = exp_res.pop_front();
        if (e.exp == EXP_INF) n_inf++; else n_fin++;
        if (ow[31:16] != e) begin failures++; $display("result %h, want %h", ow[31:16], e); end
      end
    end
  end

  task automatic send_vector(int len, int kind, bit gaps);
    fp16_t acc;
    acc = '0;
    for (int i = 0; i < len; i++) begin
      fp16_t x, z;
      if (kind == 0) begin
        x = rand_fp_range(5, 9);
        z = rand_fp_range(5, 9);
      end else begin
        x = rand_fp(10);
        z = rand_fp(10);
      end
      acc = ref_add(ref_mul(x, z), acc);
      while (gaps && $urandom_range(4) == 0) begin
        @(negedge clk); iv = 0; fl = ($urandom_range(15) == 0);
      end
      @(negedge clk);
      iv = 1; iw = {z, x}; il = (i == len - 1); fl = gaps && ($urandom_range(15) == 0);
      // hold the word until it is taken
      @(posedge clk);
      while (!ir) @(posedge clk);
    end
    exp_res.push_back(acc);
  endtask

  initial begin
    rst_n = 1'b0; iv = 0; il = 0; fl = 0; iw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int v = 0; v < 300; v++)
      send_vector($urandom_range(10, 1), ($urandom_range(5) == 0) ? 1 : 0, (v < 200));
    @(negedge clk) begin iv = 0; fl = 0; end
    repeat (MULT_STAGES + 10) @(posedge clk);
    @(negedge clk) fl = 1;
    @(negedge clk) fl = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_res.size() != 0) begin failures++; $display("%0d results missing", exp_res.size()); end
    $display("stall clocks=%0d, back-to-back issues=%0d, results finite=%0d infinite=%0d",
             n_stall, n_tight, n_fin, n_inf);
    if (n_stall == 0 || n_tight == 0 || n_inf == 0 || n_fin == 0) begin failures++; $display("a case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
