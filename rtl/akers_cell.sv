// akers_cell: the primitive cell of an Akers logic array.
//
// The cell has three inputs and computes F(X, Y, Z) = X + Y.Z. X arrives from
// the cell above, Y from the cell to the left, and Z is the cell's control
// input, which in the processing-in-memory use of the array is the bit the
// cell stores. The cell drives F on two identical outputs, one to the right
// neighbour and one to the neighbour below.
//
// The function and the two identical outputs follow the cell description the
// design is built from. The QCA layout of the cell is not reproduced: this is
// the plain Boolean equivalent, with no internal state and no delay.
module akers_cell (
  input  logic x,        // from the cell above
  input  logic y,        // from the cell to the left
  input  logic z,        // control input (stored bit)
  output logic f_right,  // F towards the right neighbour
  output logic f_down    // F towards the neighbour below
);

  logic f;

  always_comb f = x | (y & z);

  assign f_right = f;
  assign f_down  = f;

endmodule : akers_cell
