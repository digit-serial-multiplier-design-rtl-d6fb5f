// Signed (two's complement) digit-serial multiplier, W x W bits, digit size
// N, one row per clock phase.
//
// Same organisation as the unsigned multiplier: A in parallel, B in N-bit
// digits LSD first, one row per phase, a MUX that loads zeros in the first
// cycle (con1) and otherwise the state fed back from the last row, and domino
// buffers that carry early product bits to the last phase. The differences
// follow from P = -A*b(W-1)*2^(W-1) + sum_{i<W-1} A*b(i)*2^i:
//  * rows 0 .. N-2 are sign-extending Block-A rows, and the sum state between
//    rows is W bits wide;
//  * row N-1 is Block-B, which uses the precomputed -A (a_neg, W+1 bits) in
//    place of A while con2 = 1. con2 must be 1 in the cycle of the last data
//    digit, whose top bit is the sign bit b(W-1); in other cycles Block-B acts
//    as Block-A.
// After the W/N data digits, W/N zero digits bring out the high half, so the
// 2W-bit two's complement product takes 2W/N digit cycles.
//
// Timing is that of the unsigned multiplier: clk steps the phases, eval is
// the one-hot step, b/con1/con2 are stable for a digit cycle, a and a_neg for
// the whole product, and a digit's product bits appear on out_digit at the
// start of the next digit cycle. The structure is the document's; the
// register model of the domino stages and the reset are this design's.
module ds_mult_signed #(
  parameter int unsigned W = dsm_pkg::DSM_W,
  parameter int unsigned N = dsm_pkg::DSM_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] eval,       // one-hot phase step
  input  logic         con1,       // first digit cycle of a product
  input  logic         con2,       // digit holding the sign bit of B
  input  logic [W-1:0] a,          // multiplicand A
  input  logic [W:0]   a_neg,      // -A, W+1 bits
  input  logic [N-1:0] b,          // multiplier digit
  output logic [N-1:0] out_digit   // product digit of the previous cycle
);
  logic [W-1:0] ts_q [N];
  logic [W-1:0] tc_q [N];
  logic [W-1:0] ts_d [N];
  logic [W-1:0] tc_d [N];
  logic [W-1:0] ts_in0;
  logic [W-1:0] tc_in0;
  logic [N-1:0] p_d, p_q;
  logic [N-1:0] hold [N];

  init_mux #(.W(W)) u_mux_s (.con(con1), .fb(ts_q[N-1]), .y(ts_in0));
  init_mux #(.W(W)) u_mux_c (.con(con1), .fb(tc_q[N-1]), .y(tc_in0));

  for (genvar k = 0; k < N; k++) begin : g_row
    if (k < N - 1) begin : g_a
      block_a #(.W(W), .SIGNED(1'b1)) u_row (
        .a   (a),
        .b   (b[k]),
        .si  ((k == 0) ? ts_in0 : ts_q[(k == 0) ? 0 : k - 1]),
        .ci  ((k == 0) ? tc_in0 : tc_q[(k == 0) ? 0 : k - 1]),
        .ts_o(ts_d[k]),
        .tc_o(tc_d[k]),
        .p_o (p_d[k])
      );
    end else begin : g_b
      block_b #(.W(W)) u_row (
        .a    (a),
        .a_neg(a_neg),
        .con2 (con2),
        .b    (b[k]),
        .si   ((k == 0) ? ts_in0 : ts_q[(k == 0) ? 0 : k - 1]),
        .ci   ((k == 0) ? tc_in0 : tc_q[(k == 0) ? 0 : k - 1]),
        .ts_o (ts_d[k]),
        .tc_o (tc_d[k]),
        .p_o  (p_d[k])
      );
    end

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
  // con2 selects -A only for the sign digit, never for the first digit of a
  // product unless B is a single digit.
  a_con_exclusive : assert property (@(posedge clk) disable iff (!rst_n)
                                     (W > N) |-> !(con1 && con2));
endmodule
