// tb_qca_clock_gen: checks the four-zone QCA clock.
//
// After reset zone 0 must be in switch, zone 1 in hold, zone 2 in release and
// zone 3 in relax. Each enabled cycle every zone must move to the next phase
// of switch -> hold -> release -> relax -> switch, nothing may move while en
// is low, and period_end must come exactly once per four enabled cycles, in
// the cycle where zone 0 is in relax.
module tb_qca_clock_gen;
  import qca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  qca_phase_e phase [NUM_ZONES];
  logic period_end;
  int checks = 0, failures = 0;

  qca_clock_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .phase(phase), .period_end(period_end));

  always #5 clk = ~clk;

  function automatic qca_phase_e next_phase(input qca_phase_e p);
    case (p)
      PH_SWITCH:  return PH_HOLD;
      PH_HOLD:    return PH_RELEASE;
      PH_RELEASE: return PH_RELAX;
      default:    return PH_SWITCH;
    endcase
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qca_phase_e exp [NUM_ZONES];
    automatic int periods = 0;

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp[0] = PH_SWITCH; exp[1] = PH_HOLD; exp[2] = PH_RELEASE; exp[3] = PH_RELAX;

    // Frozen while en low.
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < 40; i++) begin
      for (int k = 0; k < NUM_ZONES; k++) begin
        checks++;
        if (phase[k] !== exp[k]) begin
          failures++;
          $display("FAIL step %0d zone %0d: %s expected %s", i, k, phase[k].name(), exp[k].name());
        end
      end
      en = (i % 5) != 4;  // skip every fifth cycle
      checks++;
      #0;
      if (period_end !== (en && exp[0] == PH_RELAX)) begin
        failures++;
        $display("FAIL step %0d: period_end=%b", i, period_end);
      end
      if (period_end) periods++;
      @(posedge clk); #1;
      if (en) for (int k = 0; k < NUM_ZONES; k++) exp[k] = next_phase(exp[k]);
    end

    // 40 steps with 8 disabled leaves 32 enabled steps: 8 periods.
    checks++;
    if (periods != 8) begin
      failures++;
      $display("FAIL %0d periods counted, expected 8", periods);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_qca_clock_gen
