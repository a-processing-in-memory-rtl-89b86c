// tb_akers_array: checks the default 3 x 3 Akers array and a 2 x 2 one.
//
// Every one of the 512 control patterns of the 3 x 3 array is compared with
// a grid model evaluated in the testbench, and a few patterns with
// closed-form results are checked by value: the top row of an array with
// '0' above and '1' on the left is an AND chain, the left column an OR
// chain. The 2 x 2 array with the pattern A, B', B, A' must give A xor B.
module tb_akers_array;

  localparam int R = 3, C = 3;

  logic [R*C-1:0] z;
  logic           f_out;
  logic [R-1:0]   right_edge;
  logic [C-1:0]   bottom_edge;

  logic [3:0] z2;
  logic       f2;
  logic [1:0] re2, be2;

  int checks = 0, failures = 0;

  akers_array dut (.z(z), .f_out(f_out), .right_edge(right_edge), .bottom_edge(bottom_edge));

  akers_array #(.ROWS(2), .COLS(2)) dut2 (.z(z2), .f_out(f2), .right_edge(re2), .bottom_edge(be2));

  // Grid model: out[r][c] = above + left . z
  function automatic void model(input logic [R*C-1:0] zz, output logic f,
                                output logic [R-1:0] re, output logic [C-1:0] be);
    logic o [R][C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic above, left;
        above = (r == 0) ? 1'b0 : o[r-1][c];
        left  = (c == 0) ? 1'b1 : o[r][c-1];
        o[r][c] = above | (left & zz[r*C+c]);
      end
    f = o[R-1][C-1];
    for (int r = 0; r < R; r++) re[r] = o[r][C-1];
    for (int c = 0; c < C; c++) be[c] = o[R-1][c];
  endfunction

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ef;
    logic [R-1:0] ere;
    logic [C-1:0] ebe;

    for (int p = 0; p < (1 << (R*C)); p++) begin
      z = 9'(p);
      #1;
      model(z, ef, ere, ebe);
      check($sformatf("f_out z=%b", z), f_out, ef);
      checks++;
      if (right_edge !== ere || bottom_edge !== ebe) begin
        failures++;
        $display("FAIL edges z=%b: right %b/%b bottom %b/%b", z, right_edge, ere, bottom_edge, ebe);
      end
    end

    // Top row only (row 0 = 1,1,1; others 0): right edge of row 0 is AND = 1, f_out = 1 via column 2
    z = 9'b000_000_111; #1;
    check("top row AND all ones", right_edge[0], 1'b1);
    z = 9'b000_000_101; #1;
    check("top row AND with a zero", right_edge[0], 1'b0);
    // Left column only: bottom of column 0 is OR of the column
    z = 9'b000_001_000; #1;
    check("left column OR", bottom_edge[0], 1'b1);
    z = 9'b000_000_000; #1;
    check("all zero gives 0", f_out, 1'b0);
    z = 9'b111_111_111; #1;
    check("all one gives 1", f_out, 1'b1);

    // 2 x 2 XOR pattern
    for (int ab = 0; ab < 4; ab++) begin
      logic a, b;
      {a, b} = 2'(ab);
      z2 = {~a, b, ~b, a};
      #1;
      check($sformatf("2x2 xor a=%b b=%b", a, b), f2, a ^ b);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_akers_array
