// Simulation-only timing model (not synthesizable) of the skew-tolerant domino
// implementation of the digit-serial multiplier, unsigned or signed.
//
// The arithmetic is the same as in ds_mult_unsigned / ds_mult_signed and
// uses the same Block-A / Block-B rows. What this model adds is the timing
// of dual-rail domino logic clocked by N overlapping phases, with no latches:
//  * Every bus is dual-rail. It is either precharged (no value; modelled as
//    valid = 0) or carries a value (valid = 1).
//  * Row k is precharged while its phase clk_ph[k] is low. While the phase is
//    high, the row starts to evaluate as soon as its inputs carry a value,
//    and its outputs carry the result ROW_DELAY_PS[k] later. Once fired, they
//    hold until the phase falls, whatever the inputs do.
//  * A row may finish after the nominal end of its 1/N slot of the cycle.
//    This is time borrowing; the model reports the amount per row (borrow_ps).
//  * Two things are timing failures, counted in timing_errors: a phase that
//    falls before its row finished evaluating, and a phase that rises and
//    falls without the row's inputs ever arriving.
//  * Each early product bit k passes through domino buffers in phases
//    k+1..N-1 (delay BUF_DELAY_PS each) to reach the last phase.
//  * out_digit carries a value while out_valid is high, which is in the
//    last phase of the cycle.
// Row 0 takes zeros through the MUX when con = 1. Otherwise it takes the
// last row's outputs, which are still present at the start of the next cycle
// because phase N-1 overlaps phase 0.
//
// Inputs: a, a_neg (used by the signed multiplier), b_digit, b_valid, con
// and con2 are set just before the rise of clk_ph[0] and held until every
// row has started its evaluation in that cycle; each row takes them when it
// starts. b_valid = 0 means the b digit is precharged, and no row evaluates.
//
// The row delays default to the values printed for the four-phase unsigned
// multiplier (700, 400, 290, 210 ps, cycle 1.6 ns). For the signed one they
// are 900, 370, 310, 420 ps at a 2.0 ns cycle. BUF_DELAY_PS and the hold
// behaviour of the first gate of a row are not given and are this model's
// assumptions. The input hold requirement of the first gate is not checked.
// The phases come from phase_gen clocked at N times the digit rate.
// Being a timing model, its processes wait on levels and delays and assign
// with blocking statements on purpose; it is for simulation only.
module ds_mult_domino_model #(
  parameter int unsigned W            = dsm_pkg::DSM_W,
  parameter int unsigned N            = dsm_pkg::DSM_N,
  parameter bit          SIGNED       = 1'b0,
  parameter int unsigned TC_PS        = 1600,
  parameter int unsigned ROW_DELAY_PS [N] = '{700, 400, 290, 210},
  parameter int unsigned BUF_DELAY_PS = 100,
  localparam int unsigned SW          = SIGNED ? W : W - 1
) (
  input  logic         rst_n,
  input  logic [N-1:0] clk_ph,      // overlapping phase clocks CLK1..CLKN
  input  logic         con,         // first digit cycle: MUX loads zeros
  input  logic         con2,        // sign digit: Block-B uses -A (signed only)
  input  logic [W-1:0] a,
  input  logic [W:0]   a_neg,       // -A (used by the signed multiplier)
  input  logic [N-1:0] b_digit,
  input  logic         b_valid,     // b_digit carries a value
  output logic [N-1:0] out_digit,
  output logic         out_valid,
  output int           timing_errors,
  output int           borrow_ps [N],   // time borrowed by each row, last cycle
  output int           evaluations      // evaluations of the last row
);
  // Row outputs (dual-rail modelled as value + valid).
  logic [SW-1:0] ts_q [N];
  logic [W-1:0]  tc_q [N];
  logic [N-1:0]  p_q;
  logic [N-1:0]  row_valid;
  // Row inputs as captured when the evaluation starts.
  logic [SW-1:0] si_cap [N];
  logic [W-1:0]  ci_cap [N];
  logic [N-1:0]  b_cap;
  logic          con2_cap;
  logic [SW-1:0] ts_d [N];
  logic [W-1:0]  tc_d [N];
  logic [N-1:0]  p_d;
  // Buffers: hold[k][m] is product bit k in phase m (m > k).
  logic [N-1:0]  hold [N];
  logic [N-1:0]  hold_valid [N];

  int errors_row [N];
  int buf_err [N][N];   // timing errors of the buffer of bit k in phase m

  for (genvar k = 0; k < N; k++) begin : g_row
    logic [W-1:0] ac;
    logic [W:0]   anc;
    if (SIGNED && k == N - 1) begin : g_b
      block_b #(.W(W)) u_row (
        .a(ac), .a_neg(anc), .con2(con2_cap), .b(b_cap[k]),
        .si(si_cap[k]), .ci(ci_cap[k]),
        .ts_o(ts_d[k]), .tc_o(tc_d[k]), .p_o(p_d[k]));
    end else begin : g_a
      block_a #(.W(W), .SIGNED(SIGNED)) u_row (
        .a(ac), .b(b_cap[k]), .si(si_cap[k]), .ci(ci_cap[k]),
        .ts_o(ts_d[k]), .tc_o(tc_d[k]), .p_o(p_d[k]));
    end

    // Inputs of this row: the MUX for row 0, the previous row otherwise.
    logic in_valid;
    always_comb begin
      if (k == 0) in_valid = b_valid && (con || row_valid[N-1]);
      else        in_valid = b_valid && row_valid[(k == 0) ? 0 : k - 1];
    end

    // State of this row, gathered into the arrays above.
    logic          rv, pq, c2c;
    logic [SW-1:0] tsq, sic;
    logic [W-1:0]  tcq, cic;
    logic          bc;
    int            err, borrow, evals;
    assign row_valid[k] = rv;
    assign p_q[k]       = pq;
    assign ts_q[k]      = tsq;
    assign tc_q[k]      = tcq;
    assign si_cap[k]    = sic;
    assign ci_cap[k]    = cic;
    assign b_cap[k]     = bc;
    assign errors_row[k] = err;
    assign borrow_ps[k] = borrow;
    if (k == N - 1) begin : g_last
      assign con2_cap    = c2c;
      assign evaluations = evals;
    end

    initial begin
      rv = 1'b0; pq = 1'b0; c2c = 1'b0; bc = 1'b0;
      tsq = '0; tcq = '0; sic = '0; cic = '0; ac = '0; anc = '0;
      err = 0; borrow = 0; evals = 0;
    end

    // One evaluation per rise of this row's phase.
    always @(posedge clk_ph[k]) begin : evaluate
      realtime t_rise, t_done;
      logic    live;
      if (rst_n) begin
        t_rise = $realtime;
        live   = b_valid;
        // Evaluate phase: wait for the inputs or the end of the phase.
        wait (in_valid || !clk_ph[k]);
        if (!clk_ph[k]) begin
          if (live) err++;                 // inputs never arrived in this phase
        end else begin
          if (k == 0) begin
            sic = con ? '0 : ts_q[N-1];
            cic = con ? '0 : tc_q[N-1];
          end else begin
            sic = ts_q[(k == 0) ? 0 : k - 1];
            cic = tc_q[(k == 0) ? 0 : k - 1];
          end
          bc  = b_digit[k];
          c2c = con2;
          ac  = a;
          anc = a_neg;
          #(ROW_DELAY_PS[k] * 1ps);
          if (!clk_ph[k]) begin
            err++;                         // precharged before it finished
          end else begin
            tsq    = ts_d[k];
            tcq    = tc_d[k];
            pq     = p_d[k];
            rv     = 1'b1;
            t_done = $realtime;
            borrow = (t_done - t_rise) / 1ps > real'(TC_PS / N)
                   ? int'((t_done - t_rise) / 1ps) - int'(TC_PS / N) : 0;
            evals++;
            // Precharge when the phase falls.
            wait (!clk_ph[k]);
            rv = 1'b0;
          end
        end
      end
    end

    // Domino buffers carrying bit k through phases k+1 .. N-1.
    for (genvar m = 0; m < N; m++) begin : g_hold
      if (m <= k) begin : g_none
        assign hold[k][m]       = (m == k) ? p_q[k] : 1'b0;
        assign hold_valid[k][m] = (m == k) ? row_valid[k] : 1'b0;
        assign buf_err[k][m]    = 0;
      end else begin : g_buf
        logic hv;
        logic hd;
        int   berr;
        assign hold[k][m]       = hd;
        assign hold_valid[k][m] = hv;
        assign buf_err[k][m]    = berr;
        initial begin
          hv   = 1'b0;
          hd   = 1'b0;
          berr = 0;
        end

        always @(posedge clk_ph[m]) begin : evaluate
          logic live;
          if (rst_n) begin
            live = b_valid;
            wait (hold_valid[k][m-1] || !clk_ph[m]);
            if (!clk_ph[m]) begin
              if (live) berr++;
            end else begin
              hd = hold[k][m-1];
              #(BUF_DELAY_PS * 1ps);
              if (!clk_ph[m]) begin
                berr++;
              end else begin
                hv = 1'b1;
                wait (!clk_ph[m]);
                hv = 1'b0;
              end
            end
          end
        end
      end
    end

    assign out_digit[k] = hold[k][N-1];
  end

  always_comb begin
    out_valid = 1'b1;
    for (int k = 0; k < N; k++) out_valid &= hold_valid[k][N-1];
  end

  always_comb begin
    timing_errors = 0;
    for (int k = 0; k < N; k++) timing_errors += errors_row[k];
    for (int k = 0; k < N; k++)
      for (int m = 0; m < N; m++) timing_errors += buf_err[k][m];
  end
endmodule
