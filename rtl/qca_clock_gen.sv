// qca_clock_gen: the four-zone QCA clock.
//
// A QCA circuit is divided into four clock zones, clock 0 to clock 3. Each
// zone steps through switch, hold, release and relax, and the four zones are
// a quarter period apart: when clock 0 is in switch, clock 1 is in hold,
// clock 2 in release and clock 3 in relax. This generator advances every
// zone by one phase per rising edge of `clk` while `en` is high, so one full
// QCA clock period takes four enabled cycles.
//
// `phase[k]` is the current phase of zone k. `period_end` is high in the
// cycle in which zone 0 is in relax, the last step of a period; it marks one
// complete QCA clock and is what the rest of the design counts clocks by.
//
// The four zones, the four phases and their relative order follow the QCA
// clocking description this design is built from. The step counter, the
// enable and the period strobe are this design's choices. Reset puts zone 0
// in switch.
module qca_clock_gen
  import qca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,                 // active-low, synchronous
  input  logic       en,                    // advance one phase
  output qca_phase_e phase [NUM_ZONES],     // phase of each clock zone
  output logic       period_end             // zone 0 in relax: one QCA clock done
);

  logic [1:0] step;

  always_ff @(posedge clk) begin
    if (!rst_n)  step <= 2'd0;
    else if (en) step <= step + 2'd1;
  end

  // Zone k runs k phases ahead of zone 0.
  always_comb begin
    for (int unsigned k = 0; k < NUM_ZONES; k++) begin
      phase[k] = qca_phase_e'(step + 2'(k));
    end
  end

  assign period_end = en && (step == 2'(PH_RELAX));

endmodule : qca_clock_gen
