// akers_array: a rectangular ROWS x COLS Akers logic array.
//
// Cell (r, c) takes X from the down output of cell (r-1, c) and Y from the
// right output of cell (r, c-1). Along the top edge X is the constant TOP_IN
// ('0'), along the left edge Y is the constant LEFT_IN ('1'). Every cell gets
// its own control input Z from the flat vector z, indexed row-major
// (bit r*COLS + c). The function the array realizes is read at the lower-right
// cell, f_out; the right-edge and bottom-edge outputs are also brought out.
//
// The grid, its edge constants and the 3 x 3 default size follow the array
// the design is built from. The array is purely combinational: the result
// follows z after the ripple through at most ROWS + COLS - 1 cells.
module akers_array #(
  parameter int unsigned ROWS    = 3,
  parameter int unsigned COLS    = 3,
  parameter logic        TOP_IN  = qca_pkg::POL_MINUS_ONE,  // X of the top row (0)
  parameter logic        LEFT_IN = qca_pkg::POL_PLUS_ONE    // Y of the left column (1)
) (
  input  logic [ROWS*COLS-1:0] z,           // control input of cell (r,c) at bit r*COLS+c
  output logic                 f_out,       // output of the lower-right cell
  output logic [ROWS-1:0]      right_edge,  // right outputs of the last column
  output logic [COLS-1:0]      bottom_edge  // down outputs of the last row
);

  // Horizontal nets: h[r][c] is the Y input of cell (r,c); h[r][COLS] leaves the array.
  // Vertical nets:   v[r][c] is the X input of cell (r,c); v[ROWS][c] leaves the array.
  logic [COLS:0] h [ROWS];
  logic [COLS-1:0] v [ROWS+1];

  assign v[0] = {COLS{TOP_IN}};

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign h[r][0] = LEFT_IN;
    for (genvar c = 0; c < COLS; c++) begin : g_col
      akers_cell u_cell (
        .x       (v[r][c]),
        .y       (h[r][c]),
        .z       (z[r*COLS + c]),
        .f_right (h[r][c+1]),
        .f_down  (v[r+1][c])
      );
    end
    assign right_edge[r] = h[r][COLS];
  end

  assign bottom_edge = v[ROWS];
  assign f_out       = h[ROWS-1][COLS];

endmodule : akers_array
