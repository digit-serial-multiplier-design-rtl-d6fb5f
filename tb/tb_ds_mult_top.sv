// End-to-end testbench of ds_mult_top at its default parameters (W = 16,
// N = 4): one unsigned and one two's complement 16 x 16 multiplier with
// 4-bit digits and four overlapping clock phases.
//
// It starts NPROD products with random and extreme operands, some back to
// back and some after idle gaps, feeds B digit by digit when the unit asks
// for it, reassembles both product streams and compares them with products
// computed here. It checks the latency (the last digit is out 2W/N = 8
// digit cycles after the product started) and that each output digit holds
// for a whole digit cycle. It counts each mechanism of the design and fails
// if one never happened: the zero load of the first row (con), the use of
// -A in Block-B (con2 with a set sign bit), -A of the most negative A
// (needs 17 bits), zero-digit insertion for the high half, back-to-back
// products and starts from idle.
module tb_ds_mult_top;
  localparam int W     = dsm_pkg::DSM_W;
  localparam int N     = dsm_pkg::DSM_N;
  localparam int NPROD = 300;

  logic clk = 0, rst_n = 0;
  logic done = 0;
  int   checks = 0, failures = 0;
  int   n_first = 0, n_neg_a = 0, n_min_a = 0, n_zero_digits = 0;
  int   n_back_to_back = 0, n_idle_start = 0;
  int   n_con_seen = 0, n_con2_neg_seen = 0;

  always #5 clk = ~clk;

  localparam int D = W / N;
  localparam int C = 2 * D;

  typedef struct {
    logic [W-1:0] a;
    logic [W-1:0] b;
    int           t_start;
  } op_t;

  logic         start = 0;
  logic [W-1:0] a = '0;
  logic [N-1:0] b_digit = '0;
  logic         ready, b_take, busy, cyc_last, out_valid, out_first, out_last;
  logic [N-1:0] clk_ph, p_u, p_s, p_u_first, p_s_first;

  ds_mult_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .a(a), .b_digit(b_digit),
    .b_take(b_take), .busy(busy), .clk_ph(clk_ph), .cyc_last(cyc_last),
    .out_valid(out_valid), .out_first(out_first), .out_last(out_last),
    .p_u_digit(p_u), .p_s_digit(p_s));

  op_t out_q[$];
  op_t feed;
  op_t o;
  int  feed_idx = D;
  int  started = 0, tick = 0, digit = 0;
  logic [2*W-1:0] acc_u, acc_s;
  logic was_last = 0;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL tick %0d: %s", tick, what);
    end
  endtask

  function automatic op_t pick(int i);
    op_t o;
    case (i)
      0: begin o.a = {1'b1, {(W-1){1'b0}}}; o.b = {1'b1, {(W-1){1'b0}}}; end
      1: begin o.a = '1; o.b = '1; end
      2: begin o.a = {1'b0, {(W-1){1'b1}}}; o.b = {1'b1, {(W-1){1'b0}}}; end
      3: begin o.a = {1'b1, {(W-1){1'b0}}}; o.b = W'($urandom) | {1'b1, {(W-1){1'b0}}}; end
      default: begin o.a = W'($urandom); o.b = W'($urandom); end
    endcase
    o.t_start = 0;
    return o;
  endfunction

  initial begin
    acc_u = '0; acc_s = '0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      tick++;
      start = 0;
      // outputs: digit sampled at the last step of the cycle it is held in
      if (out_valid && cyc_last) begin
        chk("digit held for the whole cycle", p_u == p_u_first && p_s == p_s_first);
        if (out_first) digit = 0;
        chk("digit order", out_q.size() > 0 && (digit == 0) == out_first);
        acc_u[digit*N +: N] = p_u;
        acc_s[digit*N +: N] = p_s;
        if (digit >= D) n_zero_digits++;
        chk("out_last position", out_last == (digit == C - 1));
        if (out_last && out_q.size() > 0) begin
          o = out_q.pop_front();
          chk("unsigned product", acc_u == (2*W)'(longint'(o.a) * longint'(o.b)));
          chk("signed product", acc_s == (2*W)'(longint'($signed(o.a)) * longint'($signed(o.b))));
          chk("latency of 2W/N digit cycles", tick - o.t_start == N * (C + 1) - 1);
          if (acc_u != (2*W)'(longint'(o.a) * longint'(o.b)) ||
              acc_s != (2*W)'(longint'($signed(o.a)) * longint'($signed(o.b))))
            $display("  a=%h b=%h u=%h s=%h", o.a, o.b, acc_u, acc_s);
        end
        digit++;
      end
      if (was_last) begin
        p_u_first = p_u;
        p_s_first = p_s;
      end
      was_last = cyc_last;
      // inputs
      if (ready && started < NPROD && ($urandom % 3 != 0)) begin
        feed = pick(started);
        feed.t_start = tick + 1;
        start   = 1;
        a       = feed.a;
        b_digit = feed.b[0 +: N];
        feed_idx = 1;
        out_q.push_back(feed);
        if (busy) n_back_to_back++;
        else      n_idle_start++;
        n_first++;
        if (feed.b[W-1]) n_neg_a++;
        if (feed.b[W-1] && feed.a == {1'b1, {(W-1){1'b0}}}) n_min_a++;
        started++;
      end else if (b_take) begin
        chk("b_take only while feeding", feed_idx < D);
        b_digit = feed.b[feed_idx*N +: N];
        feed_idx++;
      end else begin
        b_digit = N'($urandom);  // ignored by the unit
      end
      if (started == NPROD && out_q.size() == 0 && !busy) done = 1;
    end
  end

  // Internal controls as seen by the multipliers, counted at the end of each
  // digit cycle.
  always @(posedge clk) begin
    if (rst_n && dut.cyc_last && dut.busy) begin
      if (dut.u_ctrl.con_q) n_con_seen++;
      if (dut.u_ctrl.con2_q && dut.u_ctrl.b_q[N-1]) n_con2_neg_seen++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    @(negedge clk);
    chk("zero load (con) happened", n_con_seen > 0 && n_con_seen == n_first);
    chk("-A used in Block-B", n_neg_a > 0 && n_con2_neg_seen == n_neg_a);
    chk("-A of the most negative A", n_min_a > 0);
    chk("zero digits inserted", n_zero_digits == NPROD * D);
    chk("back-to-back products", n_back_to_back > 0);
    chk("starts from idle", n_idle_start > 0);
    $display("starts=%0d con=%0d neg_a=%0d con2_neg=%0d min_a=%0d zero_digits=%0d back_to_back=%0d idle_starts=%0d",
             n_first, n_con_seen, n_neg_a, n_con2_neg_seen, n_min_a, n_zero_digits,
             n_back_to_back, n_idle_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
