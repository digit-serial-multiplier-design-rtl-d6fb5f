// Testbench for phase_gen at N = 4 (the main configuration), 2 and 8.
// For each clock after reset it checks against an independent step count:
// eval is one-hot on the current step, cyc_last marks step N-1, phase k is
// high exactly in steps k .. k+N/2-1 (mod N), so every phase has a 50% duty
// cycle, rises 1/N cycle after the previous one and overlaps it.
module tb_phase_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] ph4, ev4;  logic last4;
  logic [1:0] ph2, ev2;  logic last2;
  logic [7:0] ph8, ev8;  logic last8;

  phase_gen #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .clk_ph(ph4), .eval(ev4), .cyc_last(last4));
  phase_gen #(.N(2)) dut2 (.clk(clk), .rst_n(rst_n), .clk_ph(ph2), .eval(ev2), .cyc_last(last2));
  phase_gen #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .clk_ph(ph8), .eval(ev8), .cyc_last(last8));

  function automatic logic [7:0] exp_ph(int n, int s);
    logic [7:0] r = '0;
    for (int k = 0; k < n; k++) r[k] = ((s - k + n) % n) < n / 2;
    return r;
  endfunction

  task automatic chk(string name, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", name, got, exp);
    end
  endtask

  int overlaps = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      chk("eval4", 8'(ev4), 8'(1 << (t % 4)));
      chk("eval2", 8'(ev2), 8'(1 << (t % 2)));
      chk("eval8", 8'(ev8), 8'(1 << (t % 8)));
      chk("last", {5'b0, last2, last4, last8}, {5'b0, t % 2 == 1, t % 4 == 3, t % 8 == 7});
      chk("ph4", 8'(ph4), exp_ph(4, t % 4));
      chk("ph2", 8'(ph2), exp_ph(2, t % 2));
      chk("ph8", 8'(ph8), exp_ph(8, t % 8));
      if (ph4[0] && ph4[1]) overlaps++;
      @(negedge clk);
    end
    checks++;
    if (overlaps != 16) begin
      failures++;
      $display("FAIL CLK1/CLK2 overlap in %0d steps, expected 16", overlaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
