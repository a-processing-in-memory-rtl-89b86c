// tb_akers_cell: exhaustive check of the Akers cell, F = X + Y.Z, on both of
// its outputs, against a truth table written out by hand.
module tb_akers_cell;

  logic x, y, z, f_right, f_down;
  int checks = 0, failures = 0;

  // Expected F for {x,y,z} = 0..7.
  localparam logic [7:0] TRUTH = 8'b1111_1000;

  akers_cell dut (.x(x), .y(y), .z(z), .f_right(f_right), .f_down(f_down));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      checks += 2;
      if (f_right !== TRUTH[i]) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b f_right=%b expected %b", x, y, z, f_right, TRUTH[i]);
      end
      if (f_down !== TRUTH[i]) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b f_down=%b expected %b", x, y, z, f_down, TRUTH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_akers_cell
