// tb_akers_xor_pim: checks the Akers XOR gate with its two operand memory
// blocks.
//
// For every pair of operands the testbench writes them (wr held for two
// advances), checks that the stored bits and the XOR change exactly two
// advances after the write starts, then drives the inputs with other values
// while wr is low and checks that the stored operands and their XOR are kept.
// Advances are spaced several clock cycles apart to show nothing moves in
// between.
module tb_akers_xor_pim;

  localparam int L = 2;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, wr = 1'b0, a = 1'b0, b = 1'b0;
  logic a_q, b_q, f;
  int checks = 0, failures = 0;

  akers_xor_pim dut (.clk(clk), .rst_n(rst_n), .adv(adv), .wr(wr), .a(a), .b(b),
                     .a_q(a_q), .b_q(b_q), .f(f));

  always #5 clk = ~clk;

  task automatic advance();
    adv = 1'b1;
    @(posedge clk); #1;
    adv = 1'b0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  task automatic check(input string what, input logic ea, input logic eb);
    checks += 3;
    if (a_q !== ea || b_q !== eb || f !== (ea ^ eb)) begin
      failures++;
      $display("FAIL %s: a_q=%b b_q=%b f=%b expected %b %b %b", what, a_q, b_q, f, ea, eb, ea ^ eb);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic pa = 1'b0, pb = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("after reset", 1'b0, 1'b0);

    for (int rep = 0; rep < 3; rep++)
      for (int ab = 0; ab < 4; ab++) begin
        logic na, nb;
        {na, nb} = 2'(ab ^ rep);
        // write: wr for L advances
        a = na; b = nb; wr = 1'b1;
        for (int i = 0; i < L; i++) begin
          check($sformatf("old operands kept during write, advance %0d", i), pa, pb);
          advance();
        end
        wr = 1'b0;
        check($sformatf("after write a=%b b=%b", na, nb), na, nb);
        // hold with inputs changing
        for (int i = 0; i < 4; i++) begin
          a = 1'($urandom); b = 1'($urandom);
          advance();
          check($sformatf("hold a=%b b=%b", na, nb), na, nb);
        end
        pa = na; pb = nb;
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_akers_xor_pim
