// akers_pim_array: an Akers array whose cells store their own Z bit.
//
// Each of the ROWS x COLS cells holds one bit in a register, and that bit is
// the cell's control input Z. The same bits therefore serve two purposes:
// as a memory they are written and read one cell at a time through the
// write port (we, w_row, w_col, w_data) and the read port (r_row, r_col,
// r_data); as a processor the array of stored bits computes, through the
// grid of Akers cells, the Boolean function read at the lower-right cell,
// f_out. Which Boolean function it is depends only on the stored pattern.
//
// Timing: a write takes effect at the rising edge of clk; r_data and f_out
// are combinational from the stored bits, so they show the new pattern in
// the cycle after the write. An out-of-range write address is ignored; an
// out-of-range read returns 0. Reset clears every stored bit.
//
// Storing Z in every cell, so that the array both holds and processes the
// data, follows the processing-in-memory array this design is built from,
// as do the 3 x 3 default and the edge constants. The addressed read and
// write ports are this design's choice.
module akers_pim_array #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,   // active-low, synchronous
  // memory write port
  input  logic          we,
  input  logic [RW-1:0] w_row,
  input  logic [CW-1:0] w_col,
  input  logic          w_data,
  // memory read port
  input  logic [RW-1:0] r_row,
  input  logic [CW-1:0] r_col,
  output logic          r_data,
  // processing result
  output logic          f_out
);

  logic [ROWS*COLS-1:0] zbits;
  logic [ROWS-1:0]      right_edge;
  logic [COLS-1:0]      bottom_edge;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zbits <= '0;
    end else if (we && (int'(w_row) < ROWS) && (int'(w_col) < COLS)) begin
      zbits[int'(w_row)*COLS + int'(w_col)] <= w_data;
    end
  end

  always_comb begin
    r_data = 1'b0;
    if ((int'(r_row) < ROWS) && (int'(r_col) < COLS)) begin
      r_data = zbits[int'(r_row)*COLS + int'(r_col)];
    end
  end

  akers_array #(
    .ROWS (ROWS),
    .COLS (COLS)
  ) u_array (
    .z           (zbits),
    .f_out       (f_out),
    .right_edge  (right_edge),
    .bottom_edge (bottom_edge)
  );

endmodule : akers_pim_array
