// Sequencer of the digit-serial multipliers.
//
// A product takes C = 2W/N digit cycles. In the first D = W/N cycles the
// digits of B enter, least significant first; in the remaining D cycles the
// sequencer inserts zero digits so that the high half of the product comes
// out. It drives the multipliers' controls: con (load zeros into the first
// row) in the first cycle, con2 (use -A in the last row) in cycle D-1, whose
// digit holds the sign bit of B. At the start of a product it captures A and
// precomputes -A (W+1 bits) for the signed multiplier, and holds both for
// the whole product.
//
// Handshake, all at the last phase step of a digit cycle (cyc_last):
//  * ready is high when a new product may start: no product in progress, or
//    the current one is in its last cycle (products may follow back to back).
//    start && ready starts a product and takes a and the first B digit.
//  * b_take is high when the next B digit (digits 1 .. D-1) is taken.
//  * out_valid/out_first/out_last describe the digit on the multipliers'
//    out_digit; they change together with it and hold for a digit cycle.
// The control signals and the zero insertion are the document's; the
// handshake, the counter and capturing A here are this design's.
module ds_control #(
  parameter int unsigned W = dsm_pkg::DSM_W,
  parameter int unsigned N = dsm_pkg::DSM_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cyc_last,   // last phase step of the digit cycle
  input  logic         start,
  output logic         ready,
  input  logic [W-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic         b_take,
  output logic         busy,
  // to the multipliers, stable for a digit cycle
  output logic [W-1:0] a_q,
  output logic [W:0]   a_neg_q,
  output logic [N-1:0] b_q,
  output logic         con_q,
  output logic         con2_q,
  // tags of the product digit on the multipliers' outputs
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last
);
  localparam int unsigned D  = W / N;
  localparam int unsigned C  = 2 * D;
  localparam int unsigned CW = $clog2(C);

  logic [CW-1:0] cnt_q;     // digit cycle of the product in progress
  logic          accept;
  logic          last_cyc;  // the product in progress is in its last cycle

  always_comb begin
    last_cyc = busy && (int'(cnt_q) == C - 1);
    ready    = cyc_last && (!busy || last_cyc);
    accept   = ready && start;
    b_take   = cyc_last && busy && (int'(cnt_q) + 1 < D);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt_q     <= '0;
      a_q       <= '0;
      a_neg_q   <= '0;
      b_q       <= '0;
      con_q     <= 1'b0;
      con2_q    <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else if (cyc_last) begin
      // The multipliers finish the digit of the ending cycle now.
      out_valid <= busy;
      out_first <= busy && cnt_q == '0;
      out_last  <= last_cyc;
      if (accept) begin
        busy    <= 1'b1;
        cnt_q   <= '0;
        a_q     <= a_in;
        a_neg_q <= -{a_in[W-1], a_in};
        b_q     <= b_in;
        con_q   <= 1'b1;
        con2_q  <= (D == 1);
      end else if (busy && !last_cyc) begin
        cnt_q   <= cnt_q + 1'b1;
        b_q     <= b_take ? b_in : '0;
        con_q   <= 1'b0;
        con2_q  <= (int'(cnt_q) + 1 == D - 1);
      end else begin
        busy    <= 1'b0;
        b_q     <= '0;
        con_q   <= 1'b0;
        con2_q  <= 1'b0;
      end
    end
  end

  initial begin
    assert (W % N == 0) else $error("ds_control: W must be a multiple of N");
  end
endmodule
