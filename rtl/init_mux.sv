// MUX at the input of the first multiplier row.
//
// On the first digit cycle of a multiplication (con = 1) the first row must
// start from a zero carry-save state; on every later cycle it continues from
// the carry and sum state fed back from the last row. The multiplier uses one
// instance for the carry state and one for the sum state. Combinational; the
// function is the document's, the width is set by the instantiating design.
module init_mux #(
  parameter int unsigned W = dsm_pkg::DSM_W
) (
  input  logic         con,  // 1: load zeros (first digit of a product)
  input  logic [W-1:0] fb,   // state fed back from the last row
  output logic [W-1:0] y     // state into the first row
);
  always_comb begin
    y = con ? '0 : fb;
  end
endmodule
