// Cell-A: one bit of a multiplier row.
//
// An AND gate forms the partial-product bit a & b, and a full adder adds it to
// the sum-in and carry-in bits coming from the row above. The sum-out stays in
// the row's sum vector, the carry-out goes to the carry vector one weight up.
// Purely combinational. The cell (AND plus full adder) is the document's;
// nothing in it is a local choice.
module cell_a (
  input  logic a,   // multiplicand bit
  input  logic b,   // multiplier bit shared by the whole row
  input  logic si,  // sum-in
  input  logic ci,  // carry-in
  output logic so,  // sum-out
  output logic co   // carry-out
);
  logic pp;

  always_comb begin
    pp = a & b;
    so = si ^ ci ^ pp;
    co = (si & ci) | (si & pp) | (ci & pp);
  end
endmodule
