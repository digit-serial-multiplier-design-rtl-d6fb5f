// Testbench for domino_buf: the output takes the input at a clock edge where
// en is high, holds it otherwise, and is zero after reset.
module tb_domino_buf;
  localparam int W = 3;
  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q, model;

  domino_buf #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: q=%h expected %h", i, q, model);
      end
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
