// tb_memory_block: checks the one-bit loop memory at its default ring of two
// clocks: the latency from write to output, that a cleanly written bit is
// kept while the input toggles and wr is low, that nothing moves while adv
// is low, and that during a write the earlier input is still seen at q for
// two advances after the input changes.
module tb_memory_block;

  localparam int L = 2;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, wr = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;

  memory_block dut (.clk(clk), .rst_n(rst_n), .adv(adv), .wr(wr), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  // One advance of the ring with the given controls.
  task automatic step(input logic w, input logic din);
    wr  = w;
    d   = din;
    adv = 1'b1;
    @(posedge clk); #1;
    adv = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("after reset", 1'b0);

    // Write a 1: appears after exactly L advances.
    for (int i = 0; i < L; i++) begin
      check($sformatf("latency, advance %0d", i), 1'b0);
      step(1'b1, 1'b1);
    end
    check("written 1 visible after L advances", 1'b1);

    // Hold: input toggles, wr low, value stays.
    for (int i = 0; i < 10; i++) begin
      step(1'b0, i[0]);
      check("hold 1 while input toggles", 1'b1);
    end

    // No advance: nothing moves even with wr high.
    wr = 1'b1; d = 1'b0;
    repeat (5) @(posedge clk);
    #1 check("frozen while adv low", 1'b1);

    // Write 0 and hold.
    for (int i = 0; i < L; i++) step(1'b1, 1'b0);
    check("written 0", 1'b0);
    for (int i = 0; i < 6; i++) begin
      step(1'b0, 1'b1);
      check("hold 0", 1'b0);
    end

    // Streaming write: q is d delayed by L advances.
    begin
      logic [15:0] pat = 16'b1011_0010_1110_0101;
      logic hist [$];
      for (int i = 0; i < 16; i++) begin
        hist.push_back(pat[i]);
        step(1'b1, pat[i]);
        if (i >= L - 1) check($sformatf("stream delay, bit %0d", i - (L - 1)), hist[i-(L-1)]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_memory_block
