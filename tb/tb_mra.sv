// tb_mra: self-checking testbench of the must-repair analyzer (two spare
// rows, two spare columns, eight fault-list entries). Directed sequences
// check: storing faults, a row must-repair (third fault in a row), faults
// covered by the solution record, a column must-repair, a repeated fault,
// must-repair with no spare left, fault-list overflow, and the analysis
// interface (walking the fault-list, covered flags, R_Insert/C_Insert and
// RESTART restoring the must-repair part of the solution record).
module tb_mra;
  logic clk = 1'b0, rst_n = 1'b1;
  logic clear = 1'b0, bist_valid = 1'b0;
  logic [3:0] bist_row = '0, bist_col = '0;
  logic r_mustrepair, c_mustrepair, fail, overflow;
  logic analyse = 1'b0, restart = 1'b0, r_insert = 1'b0, c_insert = 1'b0;
  logic ent_valid, ent_last, r_covered, c_covered, r_full, c_full;
  logic [1:0] used_must_rows, used_must_cols;
  logic [1:0] sol_row_valid, sol_col_valid;
  logic [3:0] sol_row [2];
  logic [3:0] sol_col [2];
  int checks = 0, failures = 0;

  mra dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Present one fault; sample the combinational must-repair flags.
  task automatic fault(input int r, input int c, output bit rmr, output bit cmr);
    bist_valid = 1'b1; bist_row = 4'(r); bist_col = 4'(c);
    #1;
    rmr = r_mustrepair; cmr = c_mustrepair;
    @(negedge clk);
    bist_valid = 1'b0;
  endtask

  // Count valid fault-list entries by walking the list.
  task automatic walk(output int n);
    analyse = 1'b1; restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    n = 0;
    for (int i = 0; i < 8; i++) begin
      #1;
      if (ent_valid && !r_covered && !c_covered) n++;
      if (i == 7) check(ent_last, "last entry flag");
      @(negedge clk);
    end
    analyse = 1'b0;
  endtask

  task automatic do_clear();
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rm, cm;
    int n;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do_clear();
    // Two faults in row 5: stored.
    fault(5, 1, rm, cm); check(!rm && !cm, "1st fault stored");
    fault(5, 2, rm, cm); check(!rm && !cm, "2nd fault stored");
    walk(n); check(n == 2, "two entries in fault-list");
    // Third fault in row 5: row must-repair (c = 2 matches).
    fault(5, 3, rm, cm); check(rm && !cm, "row must-repair");
    check(sol_row_valid == 2'b01 && sol_row[0] == 4'd5, "row 5 in solution record");
    check(used_must_rows == 1 && used_must_cols == 0, "used must-repair rows");
    walk(n); check(n == 0, "covered entries removed");
    // Another fault in row 5 is covered and dropped.
    fault(5, 9, rm, cm); check(!rm && !cm, "covered fault");
    walk(n); check(n == 0, "covered fault not stored");
    // Column 7: rows 1 and 2 stored, row 3 triggers a column must-repair.
    fault(1, 7, rm, cm);
    fault(2, 7, rm, cm);
    fault(1, 7, rm, cm); check(!rm && !cm, "repeated fault ignored");
    walk(n); check(n == 2, "repeat not stored");
    fault(3, 7, rm, cm); check(!rm && cm, "column must-repair");
    check(sol_col_valid == 2'b01 && sol_col[0] == 4'd7, "column 7 in solution record");
    check(!fail, "still repairable");
    // Analysis interface: insert a row and a column, then restart.
    fault(8, 8, rm, cm);
    fault(9, 10, rm, cm);
    analyse = 1'b1; restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    // (8,8) went into the lowest free entry, so it is met first.
    n = 0;
    for (int i = 0; i < 8; i++) begin
      #1;
      r_insert = 1'b0; c_insert = 1'b0;
      if (ent_valid && !r_covered && !c_covered) begin
        if (n == 0) r_insert = 1'b1; else c_insert = 1'b1;
        n++;
      end
      @(negedge clk);
    end
    r_insert = 1'b0; c_insert = 1'b0;
    check(sol_row_valid == 2'b11 && sol_row[1] == 4'd8, "row inserted");
    check(sol_col_valid == 2'b11 && sol_col[1] == 4'd10, "column inserted");
    check(r_full && c_full, "redundancy full");
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0; analyse = 1'b0;
    check(sol_row_valid == 2'b01 && sol_col_valid == 2'b01, "restart restores L_Save");
    // Must-repair with no spare: fill rows then a third row must-repair.
    do_clear();
    for (int r = 0; r < 3; r++) begin
      fault(r, 0 + 3*r, rm, cm); fault(r, 1 + 3*r, rm, cm); fault(r, 2 + 3*r, rm, cm);
    end
    check(fail && !overflow, "must-repair with redundancy full -> fail");
    // Overflow: nine faults in distinct rows and columns.
    do_clear();
    check(!fail && sol_row_valid == 0, "clear");
    for (int i = 0; i < 8; i++) fault(i, i, rm, cm);
    check(!fail, "eight faults fit");
    fault(9, 9, rm, cm);
    check(fail && overflow, "ninth fault overflows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
