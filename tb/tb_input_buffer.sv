// tb_input_buffer: self-checking test of the word-gathering input buffer.
//
// Two instances: one word per operand set (multiply-accumulate) and two
// (multiply-add). Random words are offered with random valid gaps and the
// consumer side drops ready at random. Every operand set that leaves must
// hold the next words in order, operands split 15..0 / 31..16, with the
// last flag of its final word. With valid and ready held high, the
// two-word instance must deliver exactly one set every second clock and
// the one-word instance one set per clock; the test measures both rates
// and counts back-pressure events.
module tb_input_buffer;
  import fp16_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;
  int   n_bp = 0;
  bit   stream;             // free-running phase: valid and ready held high

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // words WW per set
  `define IB_HARNESS(NAME, WW)                                               \
    logic NAME``_iv, NAME``_ir, NAME``_il, NAME``_ov, NAME``_or, NAME``_ol;  \
    mem_word_t NAME``_w;                                                     \
    logic [2*WW-1:0][15:0] NAME``_ops;                                       \
    input_buffer #(.WORDS(WW)) u_``NAME (                                    \
      .clk(clk), .rst_n(rst_n), .in_valid(NAME``_iv), .in_ready(NAME``_ir),  \
      .in_word(NAME``_w), .in_last(NAME``_il), .out_valid(NAME``_ov),        \
      .out_ready(NAME``_or), .out_ops(NAME``_ops), .out_last(NAME``_ol));    \
    mem_word_t NAME``_q[$];                                                  \
    logic      NAME``_lq[$];                                                 \
    int        NAME``_sets = 0;                                              \
    always @(posedge clk) if (rst_n) begin                                   \
      if (NAME``_iv && NAME``_ir) begin                                      \
        NAME``_q.push_back(NAME``_w); NAME``_lq.push_back(NAME``_il);        \
      end                                                                    \
      if (NAME``_ov && !NAME``_or) n_bp++;                                   \
      if (NAME``_ov && NAME``_or) begin                                      \
        logic lst;                                                           \
        NAME``_sets++;                                                       \
        checks++;                                                            \
        if (NAME``_q.size() < WW) begin                                      \
          failures++; $display("%s: set without words", `"NAME`");          \
        end else begin                                                       \
          for (int k = 0; k < WW; k++) begin                                 \
            mem_word_t w;                                                    \
            w = NAME``_q.pop_front(); lst = NAME``_lq.pop_front();           \
            if (NAME``_ops[2*k] != w[15:0] || NAME``_ops[2*k+1] != w[31:16]) \
            begin                                                            \
              failures++;                                                    \
              $display("%s: word %0d of set is %h%h, want %h", `"NAME`", k,  \
                       NAME``_ops[2*k+1], NAME``_ops[2*k], w);               \
            end                                                              \
          end                                                                \
          if (NAME``_ol != lst) begin                                        \
            failures++; $display("%s: last flag wrong", `"NAME`");          \
          end                                                                \
        end                                                                  \
      end                                                                    \
    end

  `IB_HARNESS(b1, 1)
  `IB_HARNESS(b2, 2)

  initial begin
    int s1, s2;
    rst_n = 1'b0;
    b1_iv = 0; b1_il = 0; b1_w = 0; b1_or = 0;
    b2_iv = 0; b2_il = 0; b2_w = 0; b2_or = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      b1_iv = ($urandom_range(3) != 0); b1_w = $urandom; b1_il = $urandom_range(1);
      b2_iv = ($urandom_range(3) != 0); b2_w = $urandom; b2_il = $urandom_range(1);
      b1_or = ($urandom_range(3) != 0);
      b2_or = ($urandom_range(3) != 0);
    end
    // Rate: valid and ready high for 200 clocks.
    @(negedge clk);
    b1_iv = 1; b2_iv = 1; b1_or = 1; b2_or = 1;
    repeat (4) @(negedge clk);
    s1 = b1_sets; s2 = b2_sets;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      b1_w = $urandom; b2_w = $urandom;
    end
    checks++;
    if (b1_sets - s1 != 200 || b2_sets - s2 != 100) begin
      failures++;
      $display("rate: %0d and %0d sets in 200 clocks, want 200 and 100",
               b1_sets - s1, b2_sets - s2);
    end
    b1_iv = 0; b2_iv = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_bp == 0) begin failures++; $display("no back-pressure seen"); end
    $display("back-pressure clocks: %0d", n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
