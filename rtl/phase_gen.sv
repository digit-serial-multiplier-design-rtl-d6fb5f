// Generator of the N overlapping clock phases of a digit cycle.
//
// One digit cycle is N steps of the input clock clk. Phase k (clk_ph[k], the
// document's CLK(k+1)) is a 50% duty-cycle clock that rises at the start of
// step k and stays high for N/2 steps, so each phase lags the previous one by
// 1/N of the cycle and adjacent phases overlap; with N = 4 this is the
// four-phase scheme of CLK1..CLK4. The waveforms are registered, so they are
// free of decode glitches.
//
// eval is one-hot and marks the step in which each phase's row of logic is
// evaluated; eval[N-1] (cyc_last) is the last step of a digit cycle. The
// synchronous datapath in this design captures each row's result at the end of
// its step. The phase shape (count, 50% duty, 1/N offset) is the document's;
// deriving the phases from a clock N times faster is this design's choice.
// After reset, step 0 starts with the first clock edge.
module phase_gen #(
  parameter int unsigned N = dsm_pkg::DSM_N
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] clk_ph,   // overlapping 50% duty-cycle phases
  output logic [N-1:0] eval,     // one-hot evaluation step
  output logic         cyc_last  // last step of the digit cycle
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [SW-1:0] step_q, step_d;

  // Phase k is high during steps k .. k+N/2-1 (mod N).
  function automatic logic [N-1:0] phases_at(input logic [SW-1:0] s);
    logic [N-1:0] ph;
    for (int k = 0; k < N; k++) begin
      ph[k] = ((int'(s) - k + int'(N)) % int'(N)) < int'(N / 2);
    end
    return ph;
  endfunction

  always_comb begin
    step_d = (int'(step_q) == N - 1) ? '0 : step_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= '0;
      eval   <= N'(1);
      clk_ph <= phases_at('0);
    end else begin
      step_q <= step_d;
      eval   <= {eval[N-2:0], eval[N-1]};
      clk_ph <= phases_at(step_d);
    end
  end

  assign cyc_last = eval[N-1];

  // The step counter and the one-hot ring must agree.
  a_eval_step : assert property (@(posedge clk) disable iff (!rst_n)
                                 eval == (N'(1) << step_q));

  initial begin
    assert (N >= 2 && N % 2 == 0) else $error("phase_gen: N must be even and at least 2");
  end
endmodule
