// Testbench for ds_control at W = 16, N = 4 (D = 4 data digits, C = 8 digit
// cycles per product). The testbench makes its own cyc_last (every 4th
// clock), starts products with gaps and back to back, and checks at every
// clock the controls against a model of the schedule: ready only at
// cyc_last and when idle or in the last cycle; b_take for digits 1..3;
// con only in cycle 0, con2 only in cycle 3; b_q the taken digit in cycles
// 0..3 and zero in cycles 4..7; a_q and a_neg_q = -A held; out_valid,
// out_first and out_last one digit cycle behind.
module tb_ds_control;
  localparam int W = 16;
  localparam int N = 4;
  localparam int D = W / N;
  localparam int C = 2 * D;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0, cyc_last = 0, start = 0;
  logic [W-1:0] a_in = '0;
  logic [N-1:0] b_in = '0;
  logic         ready, b_take, busy, con_q, con2_q, out_valid, out_first, out_last;
  logic [W-1:0] a_q;
  logic [W:0]   a_neg_q;
  logic [N-1:0] b_q;

  ds_control #(.W(W), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .cyc_last(cyc_last), .start(start), .ready(ready),
    .a_in(a_in), .b_in(b_in), .b_take(b_take), .busy(busy), .a_q(a_q), .a_neg_q(a_neg_q),
    .b_q(b_q), .con_q(con_q), .con2_q(con2_q), .out_valid(out_valid),
    .out_first(out_first), .out_last(out_last));

  always #5 clk = ~clk;

  // model state
  int           m_cyc = -1;      // digit cycle of the product in progress, -1 idle
  int           m_prev = -1;     // cycle whose digit is on the outputs
  logic [W-1:0] m_a = '0;
  logic [N-1:0] m_b = '0;
  int           tick = 0;
  int           products = 0, back_to_back = 0;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL tick %0d: %s", tick, what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (tick = 0; tick < 1200; tick++) begin
      // inputs for this clock (set at the negative edge)
      cyc_last = (tick % N == N - 1);
      start    = (products < 4) ? (tick > 20) : ($urandom % 3 == 0);
      a_in     = W'($urandom);
      b_in     = N'($urandom);
      #1;
      // outputs during the clock
      chk("ready", ready == (cyc_last && (m_cyc < 0 || m_cyc == C - 1)));
      chk("b_take", b_take == (cyc_last && m_cyc >= 0 && m_cyc + 1 < D));
      chk("busy", busy == (m_cyc >= 0));
      if (m_cyc >= 0) begin
        chk("con", con_q == (m_cyc == 0));
        chk("con2", con2_q == (m_cyc == D - 1));
        chk("b_q", b_q == ((m_cyc < D) ? m_b : '0));
        chk("a_q", a_q == m_a);
        chk("a_neg_q", a_neg_q == (W + 1)'(-longint'($signed(m_a))));
      end
      chk("out_valid", out_valid == (m_prev >= 0));
      if (m_prev >= 0) begin
        chk("out_first", out_first == (m_prev == 0));
        chk("out_last", out_last == (m_prev == C - 1));
      end
      @(posedge clk);
      // advance the model at the end of a digit cycle
      if (cyc_last) begin
        m_prev = m_cyc;
        if (start && (m_cyc < 0 || m_cyc == C - 1)) begin
          if (m_cyc == C - 1) back_to_back++;
          m_cyc = 0;
          m_a   = a_in;
          m_b   = b_in;
          products++;
        end else if (m_cyc >= 0 && m_cyc < C - 1) begin
          m_cyc++;
          if (m_cyc < D) m_b = b_in;
        end else begin
          m_cyc = -1;
        end
      end
      @(negedge clk);
    end
    chk("products started", products > 10);
    chk("back-to-back starts", back_to_back > 2);
    $display("products=%0d back_to_back=%0d", products, back_to_back);
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
