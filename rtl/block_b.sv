// Block-B: the last row of the signed digit-serial multiplier.
//
// In two's complement the most significant multiplier bit b(W-1) has weight
// -2^(W-1), so its partial product is -A rather than A. Block-B therefore
// chooses, bit by bit, between A and the precomputed -A (W+1 bits, since
// -(-2^(W-1)) needs W+1 bits) under the control input con2, and otherwise
// works like the signed Block-A: AND gates and a carry-save row of W Cell-A
// cells with sign extension. An extra sign cell adds the sign-extended sum-in
// and carry-in to bit W of the selected multiplicand; a multiplexer, again
// under con2, takes its sum as the sum state's top bit instead of the copy of
// So(W-1). Its carry-out has weight 2^(2W) or more in the final product and is
// dropped. With con2 = 0 the block computes exactly what Block-A does.
//
// con2 must be 1 in the cycle where the digit holding the sign bit b(W-1)
// enters, and this row must be the one that sees that bit. The multiplexers
// and the extra cell follow the document's drawing of the block; dropping the
// extra cell's carry is this design's reading of it. Purely combinational.
module block_b #(
  parameter int unsigned W = dsm_pkg::DSM_W
) (
  input  logic [W-1:0] a,      // multiplicand A
  input  logic [W:0]   a_neg,  // precomputed -A, W+1 bits
  input  logic         con2,   // 1: use -A (sign digit of B)
  input  logic         b,      // one bit of the multiplier digit
  input  logic [W-1:0] si,     // sum state from the row above
  input  logic [W-1:0] ci,     // carry state from the row above
  output logic [W-1:0] ts_o,   // sum state to the next row
  output logic [W-1:0] tc_o,   // carry state to the next row
  output logic         p_o     // finished product bit
);
  logic [W:0]   a_sel;
  logic [W-1:0] so;
  logic         so_x, co_x, so_top;

  always_comb begin
    a_sel = con2 ? a_neg : {a[W-1], a};
  end

  for (genvar j = 0; j < W; j++) begin : g_cell
    cell_a u_cell (
      .a (a_sel[j]),
      .b (b),
      .si(si[j]),
      .ci(ci[j]),
      .so(so[j]),
      .co(tc_o[j])
    );
  end

  // Sign cell at weight W; its carry-out is beyond the product and unused.
  cell_a u_sign_cell (
    .a (a_sel[W]),
    .b (b),
    .si(si[W-1]),
    .ci(ci[W-1]),
    .so(so_x),
    .co(co_x)
  );

  always_comb begin
    so_top = con2 ? so_x : so[W-1];
    p_o    = so[0];
    ts_o   = {so_top, so[W-1:1]};
  end
endmodule
