// Domino buffer: keeps a finished product bit alive from one clock phase to
// the next.
//
// A product bit made by the row of phase k would be lost when that row
// precharges, so a chain of buffers, one in each later phase, carries it to
// the last phase where the whole output digit is present at once. This design
// models a buffer as a register that takes its input at the end of its own
// phase (en = 1 in the last clock of that phase) and holds it otherwise; the
// output is therefore valid for one full digit cycle. The role of the block is
// the document's; the register model is this design's.
module domino_buf #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,   // evaluation step of this buffer's phase
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
