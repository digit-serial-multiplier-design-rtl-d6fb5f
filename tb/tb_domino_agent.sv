// Stimulus and checking agent for one ds_mult_domino_model instance.
//
// A clock of period TC_PS/N drives phase_gen, whose phases clock the model.
// The agent feeds NPROD products, one digit per cycle, just before each rise
// of the first phase. It collects the output digits when out_valid rises and
// compares each product with the one computed here. It also records when
// each digit completes relative to the start of its cycle, and the time each
// row borrowed. With EXPECT_OK = 1 there must be no timing error, every digit
// must be complete within its own cycle, and the borrowing must equal
// EXP_BORROW_PS. With EXPECT_OK = 0 the cycle is too short for the row
// delays, and the model must report timing errors.
module tb_domino_agent #(
  parameter bit          SIGNED       = 1'b0,
  parameter int unsigned TC_PS        = 1600,
  parameter int unsigned ROW_DELAY_PS [4] = '{700, 400, 290, 210},
  parameter int          EXP_BORROW_PS [4] = '{300, 300, 190, 0},
  parameter bit          EXPECT_OK    = 1'b1,
  parameter int          NPROD        = 40
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_borrow_rows   // rows seen borrowing time
);
  localparam int W = 16;
  localparam int N = 4;
  localparam int D = W / N;
  localparam int C = 2 * D;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] clk_ph, eval;
  logic         cyc_last;
  logic         con = 0, con2 = 0, b_valid = 0;
  logic [W-1:0] a = '0;
  logic [W:0]   a_neg;
  logic [N-1:0] b_digit = '0;
  logic [N-1:0] out_digit;
  logic         out_valid;
  int           timing_errors, evaluations;
  int           borrow_ps [N];

  assign a_neg = -{a[W-1], a};

  always #((TC_PS / (2 * N)) * 1ps) clk = ~clk;

  phase_gen #(.N(N)) u_phase (.clk(clk), .rst_n(rst_n), .clk_ph(clk_ph), .eval(eval),
                              .cyc_last(cyc_last));

  ds_mult_domino_model #(.W(W), .N(N), .SIGNED(SIGNED), .TC_PS(TC_PS),
                         .ROW_DELAY_PS(ROW_DELAY_PS)) dut (
    .rst_n(rst_n), .clk_ph(clk_ph), .con(con), .con2(con2), .a(a), .a_neg(a_neg),
    .b_digit(b_digit), .b_valid(b_valid), .out_digit(out_digit), .out_valid(out_valid),
    .timing_errors(timing_errors), .borrow_ps(borrow_ps), .evaluations(evaluations));

  logic [W-1:0] ops_a [NPROD];
  logic [W-1:0] ops_b [NPROD];
  realtime      cyc_start [NPROD * C];
  int           fed = 0;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL domino model (SIGNED=%0d, Tc=%0d ps): %s", SIGNED, TC_PS, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; n_borrow_rows = 0;
    for (int p = 0; p < NPROD; p++) begin
      ops_a[p] = (p == 0) ? 16'h8000 : (p == 1) ? 16'hFFFF : W'($urandom);
      ops_b[p] = (p == 0) ? 16'h8000 : (p == 1) ? 16'hFFFF : W'($urandom);
    end
    #((3 * TC_PS) * 1ps);
    rst_n = 1;
    @(posedge clk_ph[0]);
    for (int p = 0; p < NPROD; p++) begin
      for (int c = 0; c < C; c++) begin
        #((TC_PS - 1) * 1ps);       // just before the next rise of phase 0
        a       = ops_a[p];
        b_digit = (c < D) ? ops_b[p][c*N +: N] : '0;
        con     = (c == 0);
        con2    = (c == D - 1);
        b_valid = 1'b1;
        @(posedge clk_ph[0]);
        cyc_start[fed] = $realtime;
        fed++;
      end
    end
    #((TC_PS - 1) * 1ps);
    b_valid = 1'b0;
    #((3 * TC_PS) * 1ps);
    chk("all digits came out", got == NPROD * C || !EXPECT_OK);
    if (EXPECT_OK) begin
      chk("no timing errors", timing_errors == 0);
      for (int k = 0; k < N; k++) begin
        chk($sformatf("time borrowed by row %0d is %0d ps, expected %0d", k, borrow_ps[k],
                      EXP_BORROW_PS[k]), borrow_ps[k] == EXP_BORROW_PS[k]);
        if (borrow_ps[k] > 0) n_borrow_rows++;
      end
      chk("last row evaluated once per cycle", evaluations == NPROD * C);
    end else begin
      chk("timing errors reported at a too short cycle", timing_errors > 0);
    end
    done = 1;
  end

  // Output side.
  int             got = 0;
  logic [2*W-1:0] acc_u;
  logic [2*W-1:0] exp_p;
  always @(posedge out_valid) begin
    if (EXPECT_OK) begin
      int p, d;
      p = got / C;
      d = got % C;
      // the digit of cycle got completes within that cycle
      chk("digit complete within its cycle",
          ($realtime - cyc_start[got]) / 1ps <= real'(TC_PS) + 0.5);
      acc_u[d*N +: N] = out_digit;
      if (d == C - 1) begin
        if (SIGNED) exp_p = (2*W)'(longint'($signed(ops_a[p])) * longint'($signed(ops_b[p])));
        else        exp_p = (2*W)'(longint'(ops_a[p]) * longint'(ops_b[p]));
        chk($sformatf("product %0d: %h x %h = %h, got %h", p, ops_a[p], ops_b[p], exp_p, acc_u),
            acc_u == exp_p);
      end
    end
    got++;
  end
endmodule
