// tb_solver: self-checking testbench of the final-analysis solver, run with
// the must-repair analyzer it drives (two spare rows, two spare columns).
// Each of 400 random trials sends 0..11 faults in an 8x8 corner of the array
// to the analyzer, pulses BIST_Done and waits for BISR_Done. An exhaustive
// search in the testbench (every set of at most two rows, with the remaining
// faults' columns counted) gives the true minimum number of spares. The
// testbench checks that 'unrepairable' is right, that the solution record
// covers every fault with exactly the minimum number of spares, that
// UsedRepairElOpt equals it, and that the analysis ends within
// 2 + 6*8 + 8 + 1 clocks (six strategies of at most eight entries, then the
// recovery pass).
module tb_solver;
  logic clk = 1'b0, rst_n = 1'b1;
  logic clear = 1'b0, bist_valid = 1'b0, bist_done = 1'b0;
  logic [3:0] bist_row = '0, bist_col = '0;
  logic r_mustrepair, c_mustrepair, mra_fail, overflow;
  logic analyse, restart, r_insert, c_insert;
  logic ent_valid, ent_last, r_covered, c_covered, r_full, c_full;
  logic [1:0] used_must_rows, used_must_cols;
  logic [1:0] sol_row_valid, sol_col_valid;
  logic [3:0] sol_row [2];
  logic [3:0] sol_col [2];
  logic bisr_done, unrepairable;
  logic [3:0] strategy, strategy_opt;
  logic [2:0] cost_opt;
  logic [15:0] n_strategies;
  int checks = 0, failures = 0;
  int n_restart = 0, n_must = 0, n_unrep_mra = 0, n_unrep_solver = 0, n_repaired = 0;

  mra u_mra (
    .clk, .rst_n, .clear, .bist_valid, .bist_row, .bist_col,
    .r_mustrepair, .c_mustrepair, .fail(mra_fail), .overflow,
    .analyse, .restart, .r_insert, .c_insert,
    .ent_valid, .ent_last, .r_covered, .c_covered, .r_full, .c_full,
    .used_must_rows, .used_must_cols,
    .sol_row_valid, .sol_row, .sol_col_valid, .sol_col);

  solver dut (
    .clk, .rst_n, .clear, .bist_done, .mra_fail,
    .ent_valid, .ent_last, .r_covered, .c_covered, .r_full, .c_full,
    .used_must_rows, .used_must_cols,
    .analyse, .restart, .r_insert, .c_insert,
    .bisr_done, .unrepairable, .strategy, .strategy_opt, .cost_opt, .n_strategies);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int fr [16], fc [16], nf;

  // Minimum number of spares covering all faults, or 99 if impossible.
  function automatic int optimum();
    int best = 99;
    for (int m = 0; m < 256; m++) begin
      int nr = 0, ncol = 0;
      logic [7:0] cols = '0;
      for (int b = 0; b < 8; b++) nr += (m >> b) & 1;
      if (nr > 2) continue;
      for (int i = 0; i < nf; i++)
        if (!((m >> fr[i]) & 1)) cols[fc[i]] = 1'b1;
      for (int b = 0; b < 8; b++) ncol += cols[b];
      if (ncol <= 2 && nr + ncol < best) best = nr + ncol;
    end
    return best;
  endfunction

  // Restarts after the one that opens each analysis.
  always @(posedge clk) if (analyse && restart && n_strategies != 0) n_restart++;
  always @(posedge clk) if (r_mustrepair || c_mustrepair) n_must++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int opt, cyc, used;
    bit covered;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      nf = $urandom_range(0, 11);
      for (int i = 0; i < nf; i++) begin
        // Bias towards shared rows and columns.
        fr[i] = ($urandom_range(0, 2) == 0 && i > 0) ? fr[$urandom_range(0, i-1)] : $urandom_range(0, 7);
        fc[i] = ($urandom_range(0, 2) == 0 && i > 0) ? fc[$urandom_range(0, i-1)] : $urandom_range(0, 7);
        bist_valid = 1'b1; bist_row = 4'(fr[i]); bist_col = 4'(fc[i]);
        @(negedge clk);
      end
      bist_valid = 1'b0;
      bist_done = 1'b1;
      @(negedge clk);
      bist_done = 1'b0;
      cyc = 1;
      while (!bisr_done && cyc < 1000) begin @(negedge clk); cyc++; end
      opt = optimum();
      check(cyc <= 2 + 6*8 + 8 + 1, $sformatf("analysis time %0d clocks", cyc));
      check(unrepairable == (opt == 99), $sformatf("trial %0d: unrepairable=%0b, optimum %0d", t, unrepairable, opt));
      if (mra_fail) n_unrep_mra++;
      else if (unrepairable) n_unrep_solver++;
      if (!unrepairable && opt != 99) begin
        n_repaired++;
        used = 0;
        for (int j = 0; j < 2; j++) used += sol_row_valid[j] + sol_col_valid[j];
        check(used == opt, $sformatf("trial %0d: %0d spares used, optimum %0d", t, used, opt));
        check(int'(cost_opt) == opt, "UsedRepairElOpt");
        for (int i = 0; i < nf; i++) begin
          covered = 1'b0;
          for (int j = 0; j < 2; j++) begin
            if (sol_row_valid[j] && int'(sol_row[j]) == fr[i]) covered = 1'b1;
            if (sol_col_valid[j] && int'(sol_col[j]) == fc[i]) covered = 1'b1;
          end
          check(covered, $sformatf("trial %0d: fault (%0d,%0d) covered", t, fr[i], fc[i]));
        end
      end
    end
    $display("repaired %0d, unrepairable by must-repair %0d, by search %0d, must-repairs %0d, restarts %0d",
             n_repaired, n_unrep_mra, n_unrep_solver, n_must, n_restart);
    check(n_repaired > 0 && n_unrep_mra > 0 && n_unrep_solver > 0 && n_must > 0 && n_restart > 0,
          "every outcome seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
