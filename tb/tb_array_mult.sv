// tb_array_mult: self-checking test of the pipelined array multiplier.
//
// Nine instances run at once: the 12-bit multiplier with every rank count
// from one to eight (the default being eight), and the 16-bit one of the
// integer co-processors with eight. Each is fed a random
// operand pair on most clocks (with random idle clocks), plus the corner
// values 0, 1 and all-ones. Every product is compared with the integer
// product, and the clock on which it appears must be exactly STAGES clocks
// after its operands were presented.
module tb_array_mult;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;
  int   cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One test harness per configuration.
  `define AM_HARNESS(NAME, WW, SS)                                          \
    logic           NAME``_iv, NAME``_ov;                                   \
    logic [WW-1:0]  NAME``_a, NAME``_b;                                     \
    logic [2*WW-1:0] NAME``_p;                                              \
    array_mult #(.W(WW), .STAGES(SS)) u_``NAME (                            \
      .clk(clk), .rst_n(rst_n), .in_valid(NAME``_iv), .a(NAME``_a),         \
      .b(NAME``_b), .out_valid(NAME``_ov), .p(NAME``_p));                   \
    longint NAME``_qexp[$];                                                 \
    int     NAME``_qcyc[$];                                                 \
    always @(posedge clk) if (rst_n) begin                                  \
      if (NAME``_iv) begin                                                  \
        NAME``_qexp.push_back(longint'(NAME``_a) * longint'(NAME``_b));     \
        NAME``_qcyc.push_back(cycle);                                       \
      end                                                                   \
      if (NAME``_ov) begin                                                  \
        longint e; int c;                                                   \
        checks++;                                                           \
        if (NAME``_qexp.size() == 0) begin                                  \
          failures++; $display("%s: unexpected product", `"NAME`");         \
        end else begin                                                      \
          e = NAME``_qexp.pop_front(); c = NAME``_qcyc.pop_front();         \
          if (longint'(NAME``_p) != e || cycle - c != SS) begin             \
            failures++;                                                     \
            $display("%s: got %0d after %0d cycles, want %0d after %0d",    \
                     `"NAME`", NAME``_p, cycle - c, e, SS);                 \
          end                                                               \
        end                                                                 \
      end                                                                   \
    end

  `AM_HARNESS(m12s8, 12, 8)
  `AM_HARNESS(m12s1, 12, 1)
  `AM_HARNESS(m12s5, 12, 5)
  `AM_HARNESS(m12s2, 12, 2)
  `AM_HARNESS(m12s3, 12, 3)
  `AM_HARNESS(m12s4, 12, 4)
  `AM_HARNESS(m12s6, 12, 6)
  `AM_HARNESS(m12s7, 12, 7)

  // Random pair, presented on nine clocks out of ten.
  `define AM_RAND(NAME, WW)                                                 \
    NAME``_iv = ($urandom_range(9) != 0);                                   \
    NAME``_a = WW'($urandom); NAME``_b = WW'($urandom);
  `AM_HARNESS(m16s8, 16, 8)

  task automatic drive(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      m12s8_iv = ($urandom_range(9) != 0);
      m12s1_iv = ($urandom_range(9) != 0);
      m12s5_iv = ($urandom_range(9) != 0);
      m16s8_iv = ($urandom_range(9) != 0);
      m12s8_a = 12'($urandom); m12s8_b = 12'($urandom);
      m12s1_a = 12'($urandom); m12s1_b = 12'($urandom);
      m12s5_a = 12'($urandom); m12s5_b = 12'($urandom);
      `AM_RAND(m12s2, 12)
      `AM_RAND(m12s3, 12)
      `AM_RAND(m12s4, 12)
      `AM_RAND(m12s6, 12)
      `AM_RAND(m12s7, 12)
      m16s8_a = 16'($urandom); m16s8_b = 16'($urandom);
      if (i % 50 == 0) begin
        m12s8_a = '1; m12s8_b = '1; m16s8_a = '1; m16s8_b = '1;
      end else if (i % 50 == 1) begin
        m12s8_a = '0; m12s8_b = 12'($urandom); m16s8_a = 16'd1;
      end
    end
    @(negedge clk);
    m12s8_iv = 0; m12s1_iv = 0; m12s5_iv = 0; m16s8_iv = 0;
    m12s2_iv = 0; m12s3_iv = 0; m12s4_iv = 0; m12s6_iv = 0; m12s7_iv = 0;
  endtask

  initial begin
    rst_n = 1'b0;
    m12s8_iv = 0; m12s1_iv = 0; m12s5_iv = 0; m16s8_iv = 0;
    m12s8_a = 0; m12s8_b = 0; m12s1_a = 0; m12s1_b = 0;
    m12s5_a = 0; m12s5_b = 0; m16s8_a = 0; m16s8_b = 0;
    m12s2_iv = 0; m12s3_iv = 0; m12s4_iv = 0; m12s6_iv = 0; m12s7_iv = 0;
    m12s2_a = 0; m12s2_b = 0; m12s3_a = 0; m12s3_b = 0; m12s4_a = 0;
    m12s4_b = 0; m12s6_a = 0; m12s6_b = 0; m12s7_a = 0; m12s7_b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    drive(3000);
    repeat (20) @(posedge clk);
    if (m12s8_qexp.size() != 0 || m12s1_qexp.size() != 0 ||
        m12s5_qexp.size() != 0 || m16s8_qexp.size() != 0 ||
        m12s2_qexp.size() != 0 || m12s3_qexp.size() != 0 ||
        m12s4_qexp.size() != 0 || m12s6_qexp.size() != 0 ||
        m12s7_qexp.size() != 0) begin
      failures++;
      $display("products missing at the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
