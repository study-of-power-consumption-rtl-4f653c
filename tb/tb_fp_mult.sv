// tb_fp_mult: self-checking test of the 16-bit floating-point multiplier.
//
// Streams operand pairs into fp_mult (default eight register ranks) on most
// clocks and compares every product with a reference computed on real
// numbers (tb_fp16_ref_pkg): exact product, then truncation to the 16-bit
// format. Operands are drawn from the whole exponent range, with zeros and
// infinities mixed in, and a set of directed cases covers the examples of
// both normalisation cases, overflow to infinity and underflow to zero. The
// product must appear exactly STAGES clocks after its operands. The test
// counts each case (product in [1,2), product in [2,4), overflow, underflow,
// zero operand, infinite operand) and fails if one never occurred.
module tb_fp_mult;
  import fp16_pkg::*;
  import tb_fp16_ref_pkg::*;

  localparam int unsigned STAGES = 8;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  iv, ov;
  fp16_t a, b, y;
  int    checks = 0;
  int    failures = 0;
  int    cycle = 0;
  int    n_low = 0, n_high = 0, n_ovf = 0, n_unf = 0, n_zero = 0, n_inf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp_mult dut (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(ov), .y);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp16_t qa[$], qb[$];
  int    qc[$];

  always @(posedge clk) if (rst_n) begin
    if (iv) begin qa.push_back(a); qb.push_back(b); qc.push_back(cycle); end
    if (ov) begin
      fp16_t ea, eb, e;
      int    c;
      real   r;
      checks++;
      if (qa.size() == 0) begin
        failures++; $display("unexpected product");
      end else begin
        ea = qa.pop_front(); eb = qb.pop_front(); c = qc.pop_front();
        e  = ref_mul(ea, eb);
        if (y !== e || cycle - c != STAGES) begin
          failures++;
          $display("%h * %h: got %h after %0d, want %h after %0d",
                   ea, eb, y, cycle - c, e, STAGES);
        end
        // classify
        if (ea.exp == EXP_INF || eb.exp == EXP_INF) n_inf++;
        else if (ea.exp == EXP_ZERO || eb.exp == EXP_ZERO) n_zero++;
        else begin
          r = fp_val(ea) * fp_val(eb);
          if (r < 0) r = -r;
          if (r >= 256.0) n_ovf++;
          else if (r < pow2(-6)) n_unf++;
          else if ((2048.0 + ea.man) * (2048.0 + eb.man) >= pow2(23)) n_high++;
          else n_low++;
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
    // 1.101 x 1.110 = 10.110110 and 1.001 x 1.011 = 01.100011 (w = 4 bits)
    put(mk(0, 7, 11'b10100000000), mk(0, 7, 11'b11000000000));
    put(mk(1, 7, 11'b00100000000), mk(0, 8, 11'b01100000000));
    put(mk(0, 14, 0), mk(0, 14, 0));          // overflow
    put(mk(1, 1, 0),  mk(0, 2, 0));           // underflow
    put(mk(0, 0, 0),  mk(0, 9, 5));           // zero
    put(mk(0, 15, 0), mk(1, 0, 0));           // infinity beats zero
    put(mk(0, 4, 2047), mk(0, 10, 2047));     // largest significands
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      iv = ($urandom_range(7) != 0);
      a  = rand_fp(6);
      b  = rand_fp(6);
    end
    @(negedge clk) iv = 1'b0;
    repeat (STAGES + 5) @(posedge clk);
    if (qa.size() != 0) begin failures++; $display("products missing"); end
    $display("cases: low=%0d high=%0d ovf=%0d unf=%0d zero=%0d inf=%0d",
             n_low, n_high, n_ovf, n_unf, n_zero, n_inf);
    if (n_low == 0 || n_high == 0 || n_ovf == 0 || n_unf == 0 || n_zero == 0 || n_inf == 0) begin
      failures++; $display("a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
