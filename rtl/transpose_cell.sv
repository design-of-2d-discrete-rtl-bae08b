// transpose_cell: one storage cell of the register-based matrix transposer.
//
// The cell is a W-bit register with two data inputs.  In mode A (mode = 0)
// it loads the word arriving from its horizontal neighbour (h_i); in mode B
// (mode = 1) it loads the word from its vertical neighbour (v_i).  When en is
// low it holds its value.  q is the registered word, passed on to the next
// cell in either direction.  The two modes follow the published transposer
// cell; the hold enable is the gating signal the controller drives.
// No reset: the cell only ever holds data that the array has loaded.
module transpose_cell #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         en,
  input  logic         mode,   // 0: mode A (horizontal), 1: mode B (vertical)
  input  logic [W-1:0] h_i,
  input  logic [W-1:0] v_i,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (en) q <= mode ? v_i : h_i;
  end

endmodule
