// tb_fp_add: self-checking test of the pipelined 16-bit floating-point adder.
//
// Streams operand pairs into fp_add on most clocks and compares every sum
// with a reference computed on real numbers (tb_fp16_ref_pkg: align with
// truncation, add exactly, truncate to the format). Random operands cover
// the whole exponent range with zeros and infinities mixed in; a second
// random phase keeps both operands within two binades so that close
// subtractions (long left shifts) are frequent; directed cases reproduce
// the three normalisation examples (no shift, one place right, two places
// left) and force overflow and underflow. Every sum must appear exactly four
// clocks after its operands. The test counts the normalisation cases, the
// subtractions whose raw result is negative and must be converted back to
// magnitude, exact zero sums, overflow, underflow and infinite operands, and
// fails if one never occurred.
module tb_fp_add;
  import fp16_pkg::*;
  import tb_fp16_ref_pkg::*;

  localparam int unsigned LAT = 4;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  iv, ov;
  fp16_t a, b, y;
  int    checks = 0;
  int    failures = 0;
  int    cycle = 0;
  int    n_right = 0, n_none = 0, n_left = 0, n_neg = 0, n_zsum = 0;
  int    n_ovf = 0, n_unf = 0, n_inf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp_add dut (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(ov), .y);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp16_t qa[$], qb[$];
  int    qc[$];

  // Classify a pair by the exact aligned sum of its significands.
  task automatic classify(fp16_t x, fp16_t z);
    int  ex, ez, em;
    real sx, sz, s, v;
    if (x.exp == EXP_INF || z.exp == EXP_INF) begin n_inf++; return; end
    ex = x.exp; ez = z.exp; em = (ex > ez) ? ex : ez;
    sx = (ex == 0) ? 0.0 : $floor((2048.0 + x.man) / pow2(em - ex));
    sz = (ez == 0) ? 0.0 : $floor((2048.0 + z.man) / pow2(em - ez));
    if (x.sign) sx = -sx;
    if (z.sign) sz = -sz;
    s = sx + sz;
    if (x.sign != z.sign && ((x.sign && s < 0) || (z.sign && s < 0))) n_neg++;
    if (s < 0) s = -s;
    v = s / 2048.0 * pow2(em - 7);
    if (s == 0) n_zsum++;
    else if (v >= 256.0) n_ovf++;
    else if (v < pow2(-6)) n_unf++;
    else if (s >= 4096.0) n_right++;
    else if (s >= 2048.0) n_none++;
    else n_left++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (iv) begin qa.push_back(a); qb.push_back(b); qc.push_back(cycle); end
    if (ov) begin
      fp16_t ea, eb, e;
      int    c;
      checks++;
      if (qa.size() == 0) begin
        failures++; $display("unexpected sum");
      end else begin
        ea = qa.pop_front(); eb = qb.pop_front(); c = qc.pop_front();
        e  = ref_add(ea, eb);
        classify(ea, eb);
        if (y !== e || cycle - c != LAT) begin
          failures++;
          $display("%h + %h: got %h after %0d, want %h after %0d",
                   ea, eb, y, cycle - c, e, LAT);
        end
      end
    end
  end

  function automatic fp16_t mk(bit s, int e, int m);
    fp16_t f;
    f.sign = s; f.exp = 4'(e); f.man = 11'(m);
    return f;
  endfunction

  task automatic put(fp16_t x, fp16_t z);
    @(negedge clk);
    iv = 1'b1; a = x; b = z;
  endtask

  initial begin
    rst_n = 1'b0; iv = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    put(mk(0, 7, 11'b00100000000), mk(0, 5, 0));               // 1.125 + 0.25
    put(mk(0, 7, 11'b00100000000), mk(0, 7, 0));               // 1.125 + 1.0
    put(mk(0, 7, 11'b01100000000), mk(1, 7, 0));               // 1.375 - 1.0
    put(mk(1, 7, 0), mk(0, 7, 11'b01100000000));               // -1.0 + 1.375
    put(mk(0, 7, 11'b01100000000), mk(1, 8, 0));               // negative result
    put(mk(0, 9, 77), mk(1, 9, 77));                           // exact zero
    put(mk(0, 14, 2047), mk(0, 14, 1));                        // overflow
    put(mk(0, 1, 5), mk(1, 1, 0));                             // underflow
    put(mk(0, 0, 0), mk(1, 3, 9));                             // zero operand
    put(mk(1, 15, 0), mk(0, 15, 0));                           // infinities
    put(mk(0, 12, 1), mk(0, 1, 2047));                         // shifted away
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      iv = ($urandom_range(7) != 0);
      a  = rand_fp(6);
      b  = rand_fp(6);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      iv = ($urandom_range(7) != 0);
      a  = rand_fp_range(1, 3);
      b  = rand_fp_range(2, 3);
    end
    @(negedge clk) iv = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    if (qa.size() != 0) begin failures++; $display("sums missing"); end
    $display("cases: right=%0d none=%0d left=%0d neg=%0d zerosum=%0d ovf=%0d unf=%0d inf=%0d",
             n_right, n_none, n_left, n_neg, n_zsum, n_ovf, n_unf, n_inf);
    if (n_right == 0 || n_none == 0 || n_left == 0 || n_neg == 0 || n_zsum == 0 ||
        n_ovf == 0 || n_unf == 0 || n_inf == 0) begin
      failures++; $display("a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
