// Block-A: one row of a digit-serial multiplier, a partial-product generator
// followed by a carry-save adder row of W Cell-A cells.
//
// The row adds the partial product b*A to the carry-save state (si, ci) handed
// down by the row above. Bit 0 of the resulting sum vector is a finished
// product bit (p_o). The rest of the sum vector, shifted down one place, and
// the carry vector, unshifted, form the state for the next row, whose weight
// is one higher.
//
// SIGNED = 0 (unsigned multiplier): the top cell's sum-in is tied to 0, so the
// sum state between rows is W-1 bits wide and the carry state W bits.
// SIGNED = 1 (two's complement multiplier): A, the sum state and the carry
// state are sign-extended. A cell above position W-1 would see the same three
// inputs as cell W-1, so the row's extra sum bit So(W) is a copy of So(W-1);
// both state vectors are W bits wide. Bit widths follow the row drawings of
// the document; the copy of So(W-1) is how this design reads the sign cell.
// Purely combinational: the multiplier registers the row's outputs at the end
// of the row's clock phase.
module block_a #(
  parameter int unsigned W      = dsm_pkg::DSM_W,
  parameter bit          SIGNED = 1'b0,
  localparam int unsigned SW    = SIGNED ? W : W - 1   // width of the sum state
) (
  input  logic [W-1:0]  a,     // multiplicand, parallel
  input  logic          b,     // one bit of the multiplier digit
  input  logic [SW-1:0] si,    // sum state from the row above
  input  logic [W-1:0]  ci,    // carry state from the row above
  output logic [SW-1:0] ts_o,  // sum state to the next row
  output logic [W-1:0]  tc_o,  // carry state to the next row
  output logic          p_o    // finished product bit
);
  logic [W-1:0] si_cell;
  logic [W-1:0] so;

  always_comb begin
    si_cell = '0;
    si_cell[SW-1:0] = si;
  end

  for (genvar j = 0; j < W; j++) begin : g_cell
    cell_a u_cell (
      .a (a[j]),
      .b (b),
      .si(si_cell[j]),
      .ci(ci[j]),
      .so(so[j]),
      .co(tc_o[j])
    );
  end

  always_comb begin
    p_o = so[0];
    if (SIGNED) ts_o = SW'({so[W-1], so[W-1:1]});
    else        ts_o = SW'(so[W-1:1]);
  end
endmodule
