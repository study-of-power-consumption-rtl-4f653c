// tb_ipcp_top: end-to-end test of the four inner-product co-processors,
// with the top at its default parameters.
//
// Four drivers run at once, one per co-processor, each sending its own
// stream of 32-bit words: integer and floating-point vectors for the two
// multiply-accumulate units, integer and floating-point operand quadruples
// for the two multiply-add units. Idle clocks and output flushes are
// random. Every packed output word is unpacked and each result is compared
// with a reference computed in the testbench (exact integers, or the
// real-number float reference). The test counts how often each mechanism
// of the design occurred and fails if one never did:
//   - accumulation stall of the floating-point multiply-accumulate unit;
//   - half-rate issue of the multiply-add units (two words per step);
//   - vector restart of the accumulators (a vector of one pair included);
//   - 16-bit overflow of the integer units;
//   - float multiplier: product in [2,4) (exponent adjust), overflow to
//     infinity, underflow to zero;
//   - float adder: right shift, no shift and left shift normalisation, and
//     subtraction with a negative raw result;
//   - full and half (flushed) output words.
module tb_ipcp_top;
  import fp16_pkg::*;
  import tb_fp16_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic      im_iv, im_ir, im_il, im_fl, im_ov, im_oh, im_ovf;
  logic      ia_iv, ia_ir, ia_fl, ia_ov, ia_oh, ia_ovf;
  logic      fm_iv, fm_ir, fm_il, fm_fl, fm_ov, fm_oh;
  logic      fa_iv, fa_ir, fa_fl, fa_ov, fa_oh;
  mem_word_t im_iw, im_ow, ia_iw, ia_ow, fm_iw, fm_ow, fa_iw, fa_ow;

  ipcp_top dut (
    .clk, .rst_n,
    .im_in_valid(im_iv), .im_in_ready(im_ir), .im_in_word(im_iw), .im_in_last(im_il),
    .im_flush(im_fl), .im_out_valid(im_ov), .im_out_half(im_oh), .im_out_word(im_ow),
    .im_ovf(im_ovf),
    .ia_in_valid(ia_iv), .ia_in_ready(ia_ir), .ia_in_word(ia_iw),
    .ia_flush(ia_fl), .ia_out_valid(ia_ov), .ia_out_half(ia_oh), .ia_out_word(ia_ow),
    .ia_ovf(ia_ovf),
    .fm_in_valid(fm_iv), .fm_in_ready(fm_ir), .fm_in_word(fm_iw), .fm_in_last(fm_il),
    .fm_flush(fm_fl), .fm_out_valid(fm_ov), .fm_out_half(fm_oh), .fm_out_word(fm_ow),
    .fa_in_valid(fa_iv), .fa_in_ready(fa_ir), .fa_in_word(fa_iw),
    .fa_flush(fa_fl), .fa_out_valid(fa_ov), .fa_out_half(fa_oh), .fa_out_word(fa_ow)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ counters
  int n_stall = 0, n_madd_issue = 0, n_restart = 0, n_len1 = 0;
  int n_iovf = 0, n_madj = 0, n_minf = 0, n_mzero = 0;
  int n_aright = 0, n_anone = 0, n_aleft = 0, n_aneg = 0;
  int n_full = 0, n_half = 0;

  always @(posedge clk) if (rst_n) begin
    if (fm_iv && !fm_ir) n_stall++;
    if (dut.u_int_madd.op_valid) n_madd_issue++;
    if (dut.u_fp_madd.op_valid)  n_madd_issue++;
    if (dut.u_int_mac.p_valid && dut.u_int_mac.p_last) n_restart++;
    if (dut.u_fp_mac.p_valid && dut.u_fp_mac.p_last)   n_restart++;
    if (dut.u_int_mac.p_valid && dut.u_int_mac.ovf_now) n_iovf++;
    if (dut.u_int_madd.p1_valid && dut.u_int_madd.ovf_now) n_iovf++;
    if (dut.u_fp_madd.p1_valid) begin
      if (dut.u_fp_madd.u_mult_ab.upper[12]) n_madj++;
      if (dut.u_fp_madd.p1.exp == EXP_INF) n_minf++;
      if (dut.u_fp_madd.p1.exp == EXP_ZERO) n_mzero++;
    end
    if (dut.u_fp_madd.u_add.r4_q.v || dut.u_fp_mac.u_add.r4_q.v) begin
      logic [12:0] s;
      s = dut.u_fp_madd.u_add.r4_q.v ? dut.u_fp_madd.u_add.r4_q.sum : dut.u_fp_mac.u_add.r4_q.sum;
      if (s[12]) n_aright++; else if (s[11]) n_anone++; else if (s != 0) n_aleft++;
    end
    if (dut.u_fp_madd.u_add.r3_q.v && (dut.u_fp_madd.u_add.r3_q.s1 != dut.u_fp_madd.u_add.r3_q.s2) &&
        (dut.u_fp_madd.u_add.r3_q.s1 ? dut.u_fp_madd.u_add.r3_q.m1 > dut.u_fp_madd.u_add.r3_q.m2
                                      : dut.u_fp_madd.u_add.r3_q.m2 > dut.u_fp_madd.u_add.r3_q.m1))
      n_aneg++;
    if (im_ov || ia_ov || fm_ov || fa_ov) begin
      n_full += int'(im_ov && !im_oh) + int'(ia_ov && !ia_oh) + int'(fm_ov && !fm_oh) + int'(fa_ov && !fa_oh);
      n_half += int'(im_ov && im_oh) + int'(ia_ov && ia_oh) + int'(fm_ov && fm_oh) + int'(fa_ov && fa_oh);
    end
  end

  // ------------------------------------------------------------ checkers
  logic [15:0] q_im[$], q_ia[$], q_fm[$], q_fa[$];

  task automatic check_word(string name, ref logic [15:0] q[$], mem_word_t w, logic half);
    logic [15:0] e;
    checks++;
    if (q.size() == 0) begin failures++; $display("%s: unexpected word", name); return; end
    e = q.pop_front();
    if (w[15:0] != e) begin failures++; $display("%s: result %h, want %h", name, w[15:0], e); end
    if (!half) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("%s: unexpected result", name); return; end
      e = q.pop_front();
      if (w[31:16] != e) begin failures++; $display("%s: result %h, want %h", name, w[31:16], e); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (im_ov) check_word("int_mac",  q_im, im_ow, im_oh);
    if (ia_ov) check_word("int_madd", q_ia, ia_ow, ia_oh);
    if (fm_ov) check_word("fp_mac",   q_fm, fm_ow, fm_oh);
    if (fa_ov) check_word("fp_madd",  q_fa, fa_ow, fa_oh);
  end

  // ------------------------------------------------------------ drivers
  task automatic drive_im(int nvec);
    for (int v = 0; v < nvec; v++) begin
      int     len;
      longint tot;
      bit     big;
      len = (v % 7 == 3) ? 1 : $urandom_range(12, 1);
      if (len == 1) n_len1++;
      big = ($urandom_range(3) == 0);
      tot = 0;
      for (int i = 0; i < len; i++) begin
        logic [15:0] x, z;
        x = big ? 16'($urandom) : 16'($urandom_range(255));
        z = big ? 16'($urandom) : 16'($urandom_range(255));
        tot += longint'(x) * longint'(z);
        while ($urandom_range(5) == 0) begin @(negedge clk); im_iv = 0; im_fl = ($urandom_range(20) == 0); end
        @(negedge clk);
        im_iv = 1; im_iw = {z, x}; im_il = (i == len - 1); im_fl = ($urandom_range(20) == 0);
      end
      q_im.push_back(16'(tot));
    end
    @(negedge clk) begin im_iv = 0; im_fl = 0; end
  endtask

  task automatic drive_ia(int nq);
    for (int q = 0; q < nq; q++) begin
      logic [15:0] x[4];
      bit big;
      big = ($urandom_range(3) == 0);
      for (int k = 0; k < 4; k++) x[k] = big ? 16'($urandom) : 16'($urandom_range(180));
      q_ia.push_back(16'(longint'(x[0]) * x[1] + longint'(x[2]) * x[3]));
      for (int w = 0; w < 2; w++) begin
        while ($urandom_range(5) == 0) begin @(negedge clk); ia_iv = 0; ia_fl = ($urandom_range(20) == 0); end
        @(negedge clk);
        ia_iv = 1; ia_iw = {x[2*w+1], x[2*w]}; ia_fl = ($urandom_range(20) == 0);
      end
    end
    @(negedge clk) begin ia_iv = 0; ia_fl = 0; end
  endtask

  task automatic drive_fm(int nvec);
    for (int v = 0; v < nvec; v++) begin
      int    len;
      fp16_t acc;
      bit    wide;
      len  = (v % 7 == 3) ? 1 : $urandom_range(10, 1);
      if (len == 1) n_len1++;
      wide = ($urandom_range(4) == 0);
      acc  = '0;
      for (int i = 0; i < len; i++) begin
        fp16_t x, z;
        x = wide ? rand_fp(10) : rand_fp_range(5, 9);
        z = wide ? rand_fp(10) : rand_fp_range(5, 9);
        acc = ref_add(ref_mul(x, z), acc);
        while ($urandom_range(5) == 0) begin @(negedge clk); fm_iv = 0; fm_fl = ($urandom_range(20) == 0); end
        @(negedge clk);
        fm_iv = 1; fm_iw = {z, x}; fm_il = (i == len - 1); fm_fl = ($urandom_range(20) == 0);
        @(posedge clk);
        while (!fm_ir) @(posedge clk);
      end
      q_fm.push_back(acc);
    end
    @(negedge clk) begin fm_iv = 0; fm_fl = 0; end
  endtask

  task automatic drive_fa(int nq);
    for (int q = 0; q < nq; q++) begin
      fp16_t x[4];
      bit wide;
      wide = ($urandom_range(1) == 0);
      for (int k = 0; k < 4; k++) x[k] = wide ? rand_fp(8) : rand_fp_range(6, 8);
      q_fa.push_back(ref_add(ref_mul(x[0], x[1]), ref_mul(x[2], x[3])));
      for (int w = 0; w < 2; w++) begin
        while ($urandom_range(5) == 0) begin @(negedge clk); fa_iv = 0; fa_fl = ($urandom_range(20) == 0); end
        @(negedge clk);
        fa_iv = 1; fa_iw = {x[2*w+1], x[2*w]}; fa_fl = ($urandom_range(20) == 0);
      end
    end
    @(negedge clk) begin fa_iv = 0; fa_fl = 0; end
  endtask

  initial begin
    rst_n = 1'b0;
    im_iv = 0; im_il = 0; im_fl = 0; im_iw = 0;
    ia_iv = 0; ia_fl = 0; ia_iw = 0;
    fm_iv = 0; fm_il = 0; fm_fl = 0; fm_iw = 0;
    fa_iv = 0; fa_fl = 0; fa_iw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      drive_im(300);
      drive_ia(800);
      drive_fm(200);
      drive_fa(800);
    join
    repeat (40) @(posedge clk);
    @(negedge clk) begin im_fl = 1; ia_fl = 1; fm_fl = 1; fa_fl = 1; end
    @(negedge clk) begin im_fl = 0; ia_fl = 0; fm_fl = 0; fa_fl = 0; end
    repeat (3) @(posedge clk);
    checks++;
    if (q_im.size() + q_ia.size() + q_fm.size() + q_fa.size() != 0) begin
      failures++; $display("results missing");
    end
    $display("stall=%0d madd_issue=%0d restart=%0d len1=%0d int_ovf=%0d",
             n_stall, n_madd_issue, n_restart, n_len1, n_iovf);
    $display("mult: adjust=%0d inf=%0d zero=%0d  add: right=%0d none=%0d left=%0d neg=%0d",
             n_madj, n_minf, n_mzero, n_aright, n_anone, n_aleft, n_aneg);
    $display("words: full=%0d half=%0d", n_full, n_half);
    if (n_stall == 0 || n_madd_issue == 0 || n_restart == 0 || n_len1 == 0 || n_iovf == 0 ||
        n_madj == 0 || n_minf == 0 || n_mzero == 0 || n_aright == 0 || n_anone == 0 ||
        n_aleft == 0 || n_aneg == 0 || n_full == 0 || n_half == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
