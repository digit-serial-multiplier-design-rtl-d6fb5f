// Digit-serial multiplier unit: an unsigned and a two's complement W x W
// multiplier with digit size N, driven by one N-phase clock generator and one
// sequencer.
//
// The multiplicand A is given as a parallel word; the multiplier B is given
// N bits at a time, least significant digit first. Each digit cycle consists
// of N phases, and each multiplier has one row per phase, so a whole digit is
// processed per cycle. The sequencer feeds the W/N digits of B, then W/N zero
// digits, so both 2W-bit products emerge as 2W/N digits, least significant
// first: p_u_digit is the product of A and B read as unsigned numbers,
// p_s_digit the product read as two's complement numbers.
//
// Interface and timing (clk steps the phases; a digit cycle is N clocks):
//  * At the clock where ready is high, start takes a and b_digit (digit 0).
//  * At each later clock where b_take is high, b_digit must hold the next
//    digit (digits 1 .. W/N-1).
//  * The product digit of a cycle appears on p_u_digit/p_s_digit at the
//    start of the next cycle and holds for N clocks, tagged by out_valid,
//    out_first and out_last. Sample it when cyc_last is high.
//  * A product takes 2W/N digit cycles; a new one may start in the last of
//    them, so products can follow back to back.
//  * clk_ph are the overlapping phase clocks (CLK1..CLKN) for reference.
// The organisation follows the document; the handshake is this design's.
module ds_mult_top #(
  parameter int unsigned W = dsm_pkg::DSM_W,
  parameter int unsigned N = dsm_pkg::DSM_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  logic [W-1:0] a,
  input  logic [N-1:0] b_digit,
  output logic         b_take,
  output logic         busy,
  output logic [N-1:0] clk_ph,
  output logic         cyc_last,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [N-1:0] p_u_digit,
  output logic [N-1:0] p_s_digit
);
  logic [N-1:0] eval;
  logic [W-1:0] a_q;
  logic [W:0]   a_neg_q;
  logic [N-1:0] b_q;
  logic         con_q, con2_q;

  phase_gen #(.N(N)) u_phase (
    .clk     (clk),
    .rst_n   (rst_n),
    .clk_ph  (clk_ph),
    .eval    (eval),
    .cyc_last(cyc_last)
  );

  ds_control #(.W(W), .N(N)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .cyc_last (cyc_last),
    .start    (start),
    .ready    (ready),
    .a_in     (a),
    .b_in     (b_digit),
    .b_take   (b_take),
    .busy     (busy),
    .a_q      (a_q),
    .a_neg_q  (a_neg_q),
    .b_q      (b_q),
    .con_q    (con_q),
    .con2_q   (con2_q),
    .out_valid(out_valid),
    .out_first(out_first),
    .out_last (out_last)
  );

  ds_mult_unsigned #(.W(W), .N(N)) u_mult_u (
    .clk      (clk),
    .rst_n    (rst_n),
    .eval     (eval),
    .con      (con_q),
    .a        (a_q),
    .b        (b_q),
    .out_digit(p_u_digit)
  );

  ds_mult_signed #(.W(W), .N(N)) u_mult_s (
    .clk      (clk),
    .rst_n    (rst_n),
    .eval     (eval),
    .con1     (con_q),
    .con2     (con2_q),
    .a        (a_q),
    .a_neg    (a_neg_q),
    .b        (b_q),
    .out_digit(p_s_digit)
  );
endmodule
