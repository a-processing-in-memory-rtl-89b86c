// qca_pkg: types and constants shared by the QCA Akers processing-in-memory
// design.
//
// A QCA circuit is timed by four clock zones. Each zone steps through four
// phases, switch, hold, release and relax, and at any moment the four zones
// are in four different phases. The phase names and the zone count follow
// the description of QCA clocking this design is built from; the 2-bit
// encoding is this design's own choice.
package qca_pkg;

  // Number of QCA clock zones (clock 0 .. clock 3).
  localparam int unsigned NUM_ZONES = 4;

  // The four phases of one QCA clock, in the order each zone goes through them.
  typedef enum logic [1:0] {
    PH_SWITCH  = 2'd0,  // cells polarize to follow their neighbours
    PH_HOLD    = 2'd1,  // cells hold their polarization and drive the next zone
    PH_RELEASE = 2'd2,  // barriers lower, polarization is lost
    PH_RELAX   = 2'd3   // cells are unpolarized (null)
  } qca_phase_e;

  // Fixed-polarization QCA cells: -1.00 is logic 0, +1.00 is logic 1.
  localparam logic POL_MINUS_ONE = 1'b0;
  localparam logic POL_PLUS_ONE  = 1'b1;

endpackage : qca_pkg
