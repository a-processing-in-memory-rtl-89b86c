// akers_xor_pim: a two-input exclusive-OR built as an Akers array whose
// operands are held in memory blocks.
//
// Each operand, A and B, enters through its own memory_block, a ring that
// stores the bit and keeps it after the input changes. The stored bits drive
// the control inputs of a 2 x 2 Akers array laid out as
//
//            '0'     '0'
//     '1' ->  A   ->  B'
//     '1' ->  B   ->  A'   -> F
//
// With F = X + Y.Z per cell, the upper-left cell gives A, the upper-right
// A.B', the lower-left A + B, and the lower-right A.B' + (A + B).A', which is
// A xor B. The operands are stored and computed on in the same structure.
//
// Interface: `adv` turns both memory rings by one QCA clock, `wr` loads a and
// b into them. Timing: f follows the stored bits a_q and b_q combinationally;
// after a write, a_q, b_q and f show the new operands LOOP_CLOCKS advances
// later. Hold `wr` for LOOP_CLOCKS advances to store the operands cleanly.
//
// The cell pattern, the edge constants, one memory block per input and the
// two-clock ring follow the gate this design is built from. Taking the
// array's Z inputs from the stored bits rather than the live inputs is this
// design's choice.
module akers_xor_pim #(
  parameter int unsigned LOOP_CLOCKS = 2
) (
  input  logic clk,
  input  logic rst_n,  // active-low, synchronous
  input  logic adv,    // one QCA clock step of the memory rings
  input  logic wr,     // load a and b into the memory blocks
  input  logic a,
  input  logic b,
  output logic a_q,    // stored A
  output logic b_q,    // stored B
  output logic f       // A xor B of the stored operands
);

  logic [3:0] z;
  logic [1:0] right_edge;
  logic [1:0] bottom_edge;

  memory_block #(.LOOP_CLOCKS(LOOP_CLOCKS)) u_mem_a (
    .clk (clk), .rst_n (rst_n), .adv (adv), .wr (wr), .d (a), .q (a_q)
  );

  memory_block #(.LOOP_CLOCKS(LOOP_CLOCKS)) u_mem_b (
    .clk (clk), .rst_n (rst_n), .adv (adv), .wr (wr), .d (b), .q (b_q)
  );

  // Control inputs, row-major: (0,0)=A (0,1)=B' (1,0)=B (1,1)=A'.
  assign z = {~a_q, b_q, ~b_q, a_q};

  akers_array #(
    .ROWS (2),
    .COLS (2)
  ) u_array (
    .z           (z),
    .f_out       (f),
    .right_edge  (right_edge),
    .bottom_edge (bottom_edge)
  );

endmodule : akers_xor_pim
