// memory_block: a one-bit QCA loop memory.
//
// The block is a closed ring of LOOP_CLOCKS stages, one per clock of the
// loop. Each time `adv` is high the ring turns by one stage. While `wr` is
// high the first stage takes the input `d`; while `wr` is low it takes the
// last stage, so the bit goes round the ring and is kept for as long as
// wanted. The output `q` is the last stage of the ring.
//
// Timing: a new input reaches `q` LOOP_CLOCKS advances after it is written,
// so an earlier input is still seen at `q` for LOOP_CLOCKS advances after the
// input changes. To store a bit cleanly, hold `wr` for LOOP_CLOCKS advances:
// then every stage holds the same value and `q` stays constant afterwards.
//
// A ring that keeps its value, with two clocks between input and output,
// follows the memory block this design is built from; the write-enable that
// chooses between the input and the ring's own output is this design's
// choice, since a digital ring needs one to keep a bit while the input
// changes. Reset clears the ring.
module memory_block #(
  parameter int unsigned LOOP_CLOCKS = 2
) (
  input  logic clk,
  input  logic rst_n,  // active-low, synchronous
  input  logic adv,    // one QCA clock step of the loop
  input  logic wr,     // 1: load d into the ring, 0: recirculate
  input  logic d,      // input bit
  output logic q       // stored bit, last stage of the ring
);

  logic [LOOP_CLOCKS-1:0] ring;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ring <= '0;
    end else if (adv) begin
      ring[0] <= wr ? d : ring[LOOP_CLOCKS-1];
      for (int unsigned i = 1; i < LOOP_CLOCKS; i++) ring[i] <= ring[i-1];
    end
  end

  assign q = ring[LOOP_CLOCKS-1];

endmodule : memory_block
