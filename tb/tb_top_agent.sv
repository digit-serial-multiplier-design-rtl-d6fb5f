// Stimulus and checking agent for one ds_mult_top instance with word size W
// and digit size N; used to run several digit sizes side by side.
//
// It starts NPROD products with random operands (plus extreme ones), some
// back to back and some after idle gaps, feeds B digit by digit when the
// unit asks for it, reassembles both product streams and compares them with
// the unsigned and two's complement products computed here. It checks the
// latency (the last digit is out 2W/N digit cycles after the product
// started) and that each output digit holds for a whole digit cycle, and it
// counts how often each mechanism happened. done rises when all products
// are checked.
module tb_top_agent #(
  parameter int W     = 16,
  parameter int N     = 4,
  parameter int NPROD = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_first,        // products started with zero-loaded state (con)
  output int   n_neg_a,        // products whose sign digit made Block-B use -A
  output int   n_min_a,        // ... with A = -2^(W-1), whose negation needs W+1 bits
  output int   n_zero_digits,  // zero digits inserted for the high half
  output int   n_back_to_back, // products started in the last cycle of the previous one
  output int   n_idle_start    // products started from idle
);
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

  ds_mult_top #(.W(W), .N(N)) dut (
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
      $display("FAIL W=%0d N=%0d tick %0d: %s", W, N, tick, what);
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
    checks = 0; failures = 0; done = 0;
    n_first = 0; n_neg_a = 0; n_min_a = 0; n_zero_digits = 0;
    n_back_to_back = 0; n_idle_start = 0;
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
endmodule
