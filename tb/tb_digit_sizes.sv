// Runs the multiplier unit at the three configurations it was evaluated in:
// word size 16 with digit sizes (and phase counts) 2, 4 and 8. Each instance
// gets its own agent that checks the unsigned and signed products, the
// latency of 2W/N digit cycles and the digit hold time, and counts the
// mechanisms; each mechanism must have happened in every configuration.
module tb_digit_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done2, done4, done8;
  int   c2, f2, c4, f4, c8, f8;
  int   m2 [6];
  int   m4 [6];
  int   m8 [6];
  int   checks, failures;

  tb_top_agent #(.W(16), .N(2), .NPROD(120)) ag2 (.clk(clk), .rst_n(rst_n), .done(done2),
    .checks(c2), .failures(f2), .n_first(m2[0]), .n_neg_a(m2[1]), .n_min_a(m2[2]),
    .n_zero_digits(m2[3]), .n_back_to_back(m2[4]), .n_idle_start(m2[5]));
  tb_top_agent #(.W(16), .N(4), .NPROD(120)) ag4 (.clk(clk), .rst_n(rst_n), .done(done4),
    .checks(c4), .failures(f4), .n_first(m4[0]), .n_neg_a(m4[1]), .n_min_a(m4[2]),
    .n_zero_digits(m4[3]), .n_back_to_back(m4[4]), .n_idle_start(m4[5]));
  tb_top_agent #(.W(16), .N(8), .NPROD(120)) ag8 (.clk(clk), .rst_n(rst_n), .done(done8),
    .checks(c8), .failures(f8), .n_first(m8[0]), .n_neg_a(m8[1]), .n_min_a(m8[2]),
    .n_zero_digits(m8[3]), .n_back_to_back(m8[4]), .n_idle_start(m8[5]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done2 && done4 && done8);
    @(negedge clk);
    checks   = c2 + c4 + c8;
    failures = f2 + f4 + f8;
    for (int i = 0; i < 6; i++) begin
      checks += 3;
      if (m2[i] == 0) begin failures++; $display("FAIL N=2: mechanism %0d never happened", i); end
      if (m4[i] == 0) begin failures++; $display("FAIL N=4: mechanism %0d never happened", i); end
      if (m8[i] == 0) begin failures++; $display("FAIL N=8: mechanism %0d never happened", i); end
    end
    $display("N=2: starts=%0d neg_a=%0d min_a=%0d zero_digits=%0d back_to_back=%0d idle_starts=%0d",
             m2[0], m2[1], m2[2], m2[3], m2[4], m2[5]);
    $display("N=4: starts=%0d neg_a=%0d min_a=%0d zero_digits=%0d back_to_back=%0d idle_starts=%0d",
             m4[0], m4[1], m4[2], m4[3], m4[4], m4[5]);
    $display("N=8: starts=%0d neg_a=%0d min_a=%0d zero_digits=%0d back_to_back=%0d idle_starts=%0d",
             m8[0], m8[1], m8[2], m8[3], m8[4], m8[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c8, f2 + f4 + f8 + 1);
    $finish;
  end
endmodule
