// Testbench for ds_mult_unsigned at W = 16, N = 4.
// The testbench steps the one-hot phase itself (N clocks per digit cycle),
// feeds the W/N digits of B LSD first and then W/N zero digits, with con in
// the first cycle, and
// reassembles the output digits. Each 2W-bit product is compared with the
// unsigned product computed here. It also checks the timing: the digit of
// cycle c appears right after the last phase of cycle c and holds for a full
// digit cycle, so the full product is out 2W/N digit cycles after the first
// digit entered. Products run back to back, including extreme operands.
module tb_ds_mult_unsigned;
  localparam int W = 16;
  localparam int N = 4;
  localparam int D = W / N;
  localparam int C = 2 * D;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] eval = N'(1);
  logic         con = 0, con2 = 0;
  logic [W-1:0] a = '0;
  logic [W:0]   a_neg;
  logic [N-1:0] b = '0;
  logic [N-1:0] out_digit;

  assign a_neg = -{a[W-1], a};

  ds_mult_unsigned #(.W(W), .N(N)) dut (.clk(clk), .rst_n(rst_n), .eval(eval), .con(con),
                                          .a(a), .b(b), .out_digit(out_digit));

  always #5 clk = ~clk;

  task automatic run_product(logic [W-1:0] av, logic [W-1:0] bw);
    logic [2*W-1:0] got, exp;
    logic [N-1:0]   held;
    a = av;
    exp = 64'(a) * 64'(bw);
    got = '0;
    for (int c = 0; c < C; c++) begin
      b    = (c < D) ? bw[c*N +: N] : '0;
      con  = (c == 0);
      con2 = (c == D - 1);
      for (int s = 0; s < N; s++) begin
        eval = N'(1) << s;
        @(posedge clk);
        #1;
        if (s == N - 1) begin
          got[c*N +: N] = out_digit;
          held = out_digit;
        end else if (c > 0) begin
          // the previous digit must still be held during this cycle
          checks++;
          if (out_digit !== got[(c-1)*N +: N]) begin
            failures++;
            $display("FAIL digit %0d not held in step %0d", c - 1, s);
          end
        end
      end
    end
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h: product %h expected %h", av, bw, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_product(16'hFFFF, 16'hFFFF);
    run_product(16'h8000, 16'h8000);
    run_product(16'h8000, 16'h7FFF);
    run_product(16'h7FFF, 16'h8000);
    run_product(16'h0000, 16'hFFFF);
    run_product(16'h0001, 16'hFFFF);
    run_product(16'hFFFF, 16'h0001);
    for (int i = 0; i < 300; i++) run_product(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
