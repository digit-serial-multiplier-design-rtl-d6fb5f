// Unsigned digit-serial multiplier, W x W bits, digit size N, one row per
// clock phase.
//
// The multiplicand A is applied in parallel; the multiplier B enters N bits
// per digit cycle, least significant digit first. There are N rows of Block-A.
// Row k works in phase k on bit k of the current digit: it adds b(k)*A to the
// carry-save state from row k-1 and emits one finished product bit. Row 0
// takes its state through the MUX: zeros in the first cycle of a product
// (con = 1), otherwise the carry (tc, W bits) and sum (ts, W-1 bits) state
// that the last row produced in the previous cycle. So one N-bit product digit
// is finished per digit cycle. Feeding W/N data digits and then W/N zero
// digits yields the full 2W-bit product in 2W/N cycles, LSD first.
//
// Product bit k is made in phase k but the digit is only complete in phase
// N-1, so bit k passes through domino buffers in phases k+1 .. N-1
// (N(N-1)/2 buffers in all).
//
// Timing: clk steps the phases (N clocks per digit cycle) and eval is the
// one-hot step from the phase generator. Each row's outputs are registered
// at the end of its step. b and con must be stable for the whole digit
// cycle; a must be stable for the whole product. The digit that entered in a
// cycle appears on out_digit at the start of the next cycle and stays there
// for one digit cycle.
//
// The row structure, the MUX, the feedback and the buffer placement are the
// document's. Modelling the domino stages as registers clocked at the end of
// their phase, and the reset, are this design's.
module ds_mult_unsigned #(
  parameter int unsigned W = dsm_pkg::DSM_W,
  parameter int unsigned N = dsm_pkg::DSM_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] eval,       // one-hot phase step
  input  logic         con,        // first digit cycle of a product
  input  logic [W-1:0] a,          // multiplicand
  input  logic [N-1:0] b,          // multiplier digit
  output logic [N-1:0] out_digit   // product digit of the previous cycle
);
  // Carry-save state leaving each row (registered at the end of its phase).
  logic [W-2:0] ts_q [N];
  logic [W-1:0] tc_q [N];
  logic [W-2:0] ts_d [N];
  logic [W-1:0] tc_d [N];
  logic [W-2:0] ts_in0;
  logic [W-1:0] tc_in0;
  logic [N-1:0] p_d, p_q;
  // hold[k][m]: product bit k as held in phase m (m >= k).
  logic [N-1:0] hold [N];

  init_mux #(.W(W-1)) u_mux_s (.con(con), .fb(ts_q[N-1]), .y(ts_in0));
  init_mux #(.W(W))   u_mux_c (.con(con), .fb(tc_q[N-1]), .y(tc_in0));

  for (genvar k = 0; k < N; k++) begin : g_row
    block_a #(.W(W), .SIGNED(1'b0)) u_row (
      .a   (a),
      .b   (b[k]),
      .si  ((k == 0) ? ts_in0 : ts_q[(k == 0) ? 0 : k - 1]),
      .ci  ((k == 0) ? tc_in0 : tc_q[(k == 0) ? 0 : k - 1]),
      .ts_o(ts_d[k]),
      .tc_o(tc_d[k]),
      .p_o (p_d[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ts_q[k] <= '0;
        tc_q[k] <= '0;
        p_q[k]  <= 1'b0;
      end else if (eval[k]) begin
        ts_q[k] <= ts_d[k];
        tc_q[k] <= tc_d[k];
        p_q[k]  <= p_d[k];
      end
    end

    assign hold[k][k] = p_q[k];
    for (genvar m = k + 1; m < N; m++) begin : g_buf
      domino_buf #(.W(1)) u_buf (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (eval[m]),
        .d    (hold[k][m-1]),
        .q    (hold[k][m])
      );
    end
    if (k > 0) begin : g_unused
      for (genvar m = 0; m < k; m++) begin : g_tie
        assign hold[k][m] = 1'b0;
      end
    end

    assign out_digit[k] = hold[k][N-1];
  end

  a_eval_onehot : assert property (@(posedge clk) disable iff (!rst_n)
                                   eval != '0 && (eval & (eval - 1'b1)) == '0);
endmodule
