// tb_qca_akers_pim: end-to-end test of the QCA Akers processing-in-memory top
// level with every parameter at its default.
//
// The XOR part: operands are written with xor_wr held across two QCA clock
// periods; the testbench checks that each stored operand and its XOR appear
// exactly two QCA periods (eight cycles) after the write starts, that the
// stored operands survive while the inputs change, and that the four clock
// zones keep their quarter-period offsets throughout.
//
// The array part: the 3 x 3 array is used first as a memory (write a pattern,
// read every cell back) and then as a processor (f is compared with a grid
// model of the stored pattern), switching between the two again and again.
//
// Each mechanism is counted: XOR of each of the four operand pairs, operand
// hold while the input changes, a complete QCA clock period, array write,
// array read-back, array evaluation giving 0 and giving 1, and an ignored
// out-of-range write, and the XOR pattern loaded into the array. A mechanism that never happens counts as a failure.
module tb_qca_akers_pim;
  import qca_pkg::*;

  localparam int L = 2, R = 3, C = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  qca_phase_e zone_phase [NUM_ZONES];
  logic qca_period;
  logic xor_wr = 1'b0, xor_a = 1'b0, xor_b = 1'b0, xor_a_q, xor_b_q, xor_f;
  logic arr_we = 1'b0, arr_w_data = 1'b0, arr_r_data, arr_f;
  logic [1:0] arr_w_row = '0, arr_w_col = '0, arr_r_row = '0, arr_r_col = '0;

  int checks = 0, failures = 0;
  int n_xor [4] = '{default: 0};
  int n_hold = 0, n_period = 0, n_write = 0, n_read = 0, n_eval0 = 0, n_eval1 = 0, n_oob = 0,
      n_arr_xor = 0;
  logic [R*C-1:0] shadow = '0;

  qca_akers_pim dut (
    .clk(clk), .rst_n(rst_n),
    .zone_phase(zone_phase), .qca_period(qca_period),
    .xor_wr(xor_wr), .xor_a(xor_a), .xor_b(xor_b),
    .xor_a_q(xor_a_q), .xor_b_q(xor_b_q), .xor_f(xor_f),
    .arr_we(arr_we), .arr_w_row(arr_w_row), .arr_w_col(arr_w_col), .arr_w_data(arr_w_data),
    .arr_r_row(arr_r_row), .arr_r_col(arr_r_col), .arr_r_data(arr_r_data), .arr_f(arr_f)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // Clock zones: zone k is always k phases ahead of zone 0; count periods.
  always @(negedge clk) if (rst_n) begin
    for (int k = 1; k < NUM_ZONES; k++) begin
      checks++;
      if (2'(zone_phase[k]) !== 2'(2'(zone_phase[0]) + 2'(k))) fail($sformatf("zone %0d offset", k));
    end
    checks++;
    if (qca_period !== (zone_phase[0] == PH_RELAX)) fail("period strobe");
    if (qca_period) n_period++;
  end

  function automatic logic model(input logic [R*C-1:0] zz);
    logic o [R][C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        o[r][c] = ((r == 0) ? 1'b0 : o[r-1][c]) | (((c == 0) ? 1'b1 : o[r][c-1]) & zz[r*C+c]);
    return o[R-1][C-1];
  endfunction

  // Called just after a clock edge: return just after the next edge at which
  // a QCA period ends (the edge that turns the memory rings).
  task automatic next_period();
    while (qca_period !== 1'b1) begin
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
  endtask

  task automatic check_xor(input string what, input logic ea, input logic eb);
    checks += 3;
    if (xor_a_q !== ea || xor_b_q !== eb || xor_f !== (ea ^ eb))
      fail($sformatf("%s: a_q=%b b_q=%b f=%b expected %b %b %b", what, xor_a_q, xor_b_q, xor_f, ea, eb, ea ^ eb));
  endtask

  task automatic xor_op(input logic na, input logic nb, input logic pa, input logic pb);
    int t0, cycles;
    // line the write up with the start of a period
    next_period();
    xor_a = na; xor_b = nb; xor_wr = 1'b1;
    t0 = 0;
    cycles = 0;
    while (xor_a_q !== na || xor_b_q !== nb) begin
      if (cycles < L * 4) check_xor("old operands during write", pa, pb);
      @(posedge clk); #1;
      cycles++;
      if (cycles > 100) break;
    end
    checks++;
    if ((pa !== na || pb !== nb) && cycles != L * 4)
      fail($sformatf("operand write took %0d cycles, expected %0d", cycles, L * 4));
    xor_wr = 1'b0;
    check_xor("after write", na, nb);
    if (xor_f === (na ^ nb)) n_xor[{na, nb}]++;
    // hold across three periods with changing inputs
    for (int i = 0; i < 3; i++) begin
      xor_a = ~na; xor_b = ~nb;
      next_period();
      check_xor("hold", na, nb);
      if (xor_a_q === na && xor_b_q === nb) n_hold++;
    end
  endtask

  task automatic arr_write(input int r, input int c, input logic v);
    arr_w_row = 2'(r); arr_w_col = 2'(c); arr_w_data = v; arr_we = 1'b1;
    @(posedge clk); #1;
    arr_we = 1'b0;
    if (r < R && c < C) begin shadow[r*C+c] = v; n_write++; end
    else n_oob++;
  endtask

  task automatic arr_check();
    logic all_ok = 1'b1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        arr_r_row = 2'(r); arr_r_col = 2'(c);
        #1;
        checks++;
        if (arr_r_data !== shadow[r*C+c]) begin
          fail($sformatf("array read (%0d,%0d)", r, c));
          all_ok = 1'b0;
        end
      end
    if (all_ok) n_read++;
    checks++;
    if (arr_f !== model(shadow)) fail($sformatf("array f=%b for pattern %b", arr_f, shadow));
    else if (arr_f) n_eval1++;
    else n_eval0++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic pa = 1'b0, pb = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check_xor("after reset", 1'b0, 1'b0);

    // XOR truth table, twice in different orders.
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 4; i++) begin
        logic na, nb;
        {na, nb} = 2'(rep ? (3 - i) : ((i + 1) % 4));
        xor_op(na, nb, pa, pb);
        pa = na; pb = nb;
      end

    // Array: alternate memory use and processing.
    arr_check();
    for (int i = 0; i < 60; i++) begin
      if (i % 15 == 7) arr_write(3, $urandom_range(3), 1'($urandom));
      else arr_write($urandom_range(R - 1), $urandom_range(C - 1), 1'($urandom));
      arr_check();
    end
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) arr_write(r, c, 1'b1);
    arr_check();
    // Akers XOR pattern in the upper-left 2 x 2, rest cleared except a path of ones
    // along the last column and row so the result reaches the lower-right cell.
    for (int ab = 0; ab < 4; ab++) begin
      logic a, b;
      {a, b} = 2'(ab);
      arr_write(0, 0, a);  arr_write(0, 1, ~b); arr_write(0, 2, 1'b0);
      arr_write(1, 0, b);  arr_write(1, 1, ~a); arr_write(1, 2, 1'b1);
      arr_write(2, 0, 1'b0); arr_write(2, 1, 1'b0); arr_write(2, 2, 1'b0);
      arr_check();
      checks++;
      if (arr_f !== (a ^ b)) fail($sformatf("array XOR pattern a=%b b=%b gives %b", a, b, arr_f));
      else n_arr_xor++;
    end

    // Mechanism coverage.
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_xor[i] == 0) fail($sformatf("xor of operands %b never computed", 2'(i)));
    end
    checks += 8;
    if (n_arr_xor != 4) fail("XOR pattern in the array not seen for all operand pairs");
    if (n_hold == 0)   fail("operand hold never seen");
    if (n_period == 0) fail("no QCA clock period completed");
    if (n_write == 0)  fail("no array write");
    if (n_read == 0)   fail("no array read-back");
    if (n_eval0 == 0)  fail("array never evaluated to 0");
    if (n_eval1 == 0)  fail("array never evaluated to 1");
    if (n_oob == 0)    fail("no out-of-range write");
    $display("coverage: xor %0d/%0d/%0d/%0d hold %0d periods %0d writes %0d reads %0d eval0 %0d eval1 %0d oob %0d array-xor %0d",
             n_xor[0], n_xor[1], n_xor[2], n_xor[3], n_hold, n_period, n_write, n_read, n_eval0, n_eval1, n_oob, n_arr_xor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_qca_akers_pim
