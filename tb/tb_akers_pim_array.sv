// tb_akers_pim_array: checks the 3 x 3 Akers array with stored Z bits, both
// as a memory and as a processor.
//
// Random patterns are written cell by cell through the write port. After
// each write every cell is read back and compared with a shadow copy held in
// the testbench, and f_out is compared with a grid model (each cell gives
// above + left . z, '0' above the top row, '1' left of the left column).
// Writes to addresses outside the array must change nothing.
module tb_akers_pim_array;

  localparam int R = 3, C = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, w_data = 1'b0;
  logic [1:0] w_row = '0, w_col = '0, r_row = '0, r_col = '0;
  logic r_data, f_out;
  logic [R*C-1:0] shadow = '0;
  int checks = 0, failures = 0;

  akers_pim_array dut (
    .clk(clk), .rst_n(rst_n), .we(we), .w_row(w_row), .w_col(w_col), .w_data(w_data),
    .r_row(r_row), .r_col(r_col), .r_data(r_data), .f_out(f_out)
  );

  always #5 clk = ~clk;

  function automatic logic model(input logic [R*C-1:0] zz);
    logic o [R][C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        o[r][c] = ((r == 0) ? 1'b0 : o[r-1][c]) | (((c == 0) ? 1'b1 : o[r][c-1]) & zz[r*C+c]);
    return o[R-1][C-1];
  endfunction

  task automatic write(input int r, input int c, input logic v);
    w_row = 2'(r); w_col = 2'(c); w_data = v; we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
    if (r < R && c < C) shadow[r*C+c] = v;
  endtask

  task automatic check_all(input string what);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        logic exp;
        r_row = 2'(r); r_col = 2'(c);
        #1;
        exp = (r < R && c < C) ? shadow[r*C+c] : 1'b0;
        checks++;
        if (r_data !== exp) begin
          failures++;
          $display("FAIL %s: read (%0d,%0d)=%b expected %b", what, r, c, r_data, exp);
        end
      end
    checks++;
    if (f_out !== model(shadow)) begin
      failures++;
      $display("FAIL %s: f_out=%b expected %b for pattern %b", what, f_out, model(shadow), shadow);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ones = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_all("after reset");

    // Fill with ones: the function is 1.
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) write(r, c, 1'b1);
    check_all("all ones");
    checks++;
    if (f_out !== 1'b1) begin failures++; $display("FAIL all ones gives %b", f_out); end

    // Out-of-range writes change nothing.
    write(3, 0, 1'b0); write(0, 3, 1'b0); write(3, 3, 1'b0);
    check_all("out of range writes");

    // Random single-cell writes.
    for (int i = 0; i < 300; i++) begin
      write($urandom_range(R - 1), $urandom_range(C - 1), 1'($urandom));
      check_all($sformatf("random write %0d", i));
      if (f_out) ones++;
    end
    // Both values of f must have been seen.
    checks++;
    if (ones == 0 || ones == 300) begin
      failures++;
      $display("FAIL f_out never changed over random writes");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_akers_pim_array
