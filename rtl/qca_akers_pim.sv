// qca_akers_pim: top level of the QCA Akers processing-in-memory design.
//
// Two parts stand side by side.
//
// The XOR gate: the two-input exclusive-OR of akers_xor_pim, whose operand
// memory rings are clocked by the four-zone QCA clock of qca_clock_gen. The
// rings turn once per complete QCA clock period (four phases), so an operand
// written with xor_wr appears at xor_a_q / xor_b_q, and its XOR at xor_f,
// LOOP_CLOCKS periods later. The phase of each of the four clock zones is
// brought out on zone_phase.
//
// The general array: an ARR_ROWS x ARR_COLS Akers array whose cells store
// their own Z bits (akers_pim_array). Its bits are written and read like a
// small memory through arr_we / arr_w_* and arr_r_*, and arr_f is the
// Boolean function the stored pattern computes.
//
// The QCA clock runs freely (enabled every cycle) after reset. The 2 x 2
// XOR layout, the two-clock memory ring and the 3 x 3 array follow the
// design this RTL is built from; clocking one ring stage per full QCA clock
// period, and the two parts sharing one reset and one clock, are this
// design's choices.
module qca_akers_pim
  import qca_pkg::*;
#(
  parameter int unsigned LOOP_CLOCKS = 2,
  parameter int unsigned ARR_ROWS    = 3,
  parameter int unsigned ARR_COLS    = 3,
  localparam int unsigned RW = (ARR_ROWS > 1) ? $clog2(ARR_ROWS) : 1,
  localparam int unsigned CW = (ARR_COLS > 1) ? $clog2(ARR_COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,      // active-low, synchronous
  // QCA clock
  output qca_phase_e    zone_phase [NUM_ZONES],
  output logic          qca_period, // last phase of a QCA clock period
  // XOR gate
  input  logic          xor_wr,
  input  logic          xor_a,
  input  logic          xor_b,
  output logic          xor_a_q,
  output logic          xor_b_q,
  output logic          xor_f,
  // general PIM array
  input  logic          arr_we,
  input  logic [RW-1:0] arr_w_row,
  input  logic [CW-1:0] arr_w_col,
  input  logic          arr_w_data,
  input  logic [RW-1:0] arr_r_row,
  input  logic [CW-1:0] arr_r_col,
  output logic          arr_r_data,
  output logic          arr_f
);

  qca_clock_gen u_clock (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (1'b1),
    .phase      (zone_phase),
    .period_end (qca_period)
  );

  akers_xor_pim #(
    .LOOP_CLOCKS (LOOP_CLOCKS)
  ) u_xor (
    .clk   (clk),
    .rst_n (rst_n),
    .adv   (qca_period),
    .wr    (xor_wr),
    .a     (xor_a),
    .b     (xor_b),
    .a_q   (xor_a_q),
    .b_q   (xor_b_q),
    .f     (xor_f)
  );

  akers_pim_array #(
    .ROWS (ARR_ROWS),
    .COLS (ARR_COLS)
  ) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (arr_we),
    .w_row  (arr_w_row),
    .w_col  (arr_w_col),
    .w_data (arr_w_data),
    .r_row  (arr_r_row),
    .r_col  (arr_r_col),
    .r_data (arr_r_data),
    .f_out  (arr_f)
  );

endmodule : qca_akers_pim
