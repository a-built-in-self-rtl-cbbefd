// tb_bisr_top: end-to-end self-checking testbench of the whole self-repair
// design at its default size (256 words of 8 bits as 16 rows x 16 word
// columns, two spare rows, two spare columns). Each run injects stuck-at
// defects, pulses start and waits for the test to finish. An independent
// model of the pattern generator tells which defects the test can see; an
// exhaustive search gives the minimum number of spares. Checked for every
// run: the unrepairable verdict, the cost of the solution (UsedRepairElOpt),
// that the repair covers every visible fault, that the verify pass is clean
// when repairable, the fault log, and the test time. Directed runs: a clean
// memory; the worked example (bit 0 wrong in words 14, 9 and 4, all in row 0:
// a row must-repair); a column must-repair; fault-list overflow with early
// termination; an array only the search finds unrepairable; then random
// defect sets. After a repair the normal port must read back what it wrote
// into a defective word. Each mechanism is counted and must occur.
module tb_bisr_top;
  import bisr_pkg::*;
  localparam int NF = 16;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic norm_we = 1'b0, norm_re = 1'b0;
  logic [7:0] norm_addr = '0, norm_wdata = '0, rdata;
  logic [NF-1:0] inj_en = '0, inj_val = '0;
  logic [3:0] inj_row [NF];
  logic [3:0] inj_col [NF];
  logic [2:0] inj_bit [NF];
  logic test_mode, bisr_done, unrepairable, test_done, test_pass;
  logic sig_ok_test, sig_ok_verify;
  logic [7:0] signature;
  logic [15:0] n_verify_errors, n_strategies, fl_count;
  logic [3:0] strategy_opt;
  logic [2:0] cost_opt;
  logic mra_overflow, fl_overflow, r_mustrepair, c_mustrepair;
  logic [3:0] strategy;
  bist_phase_e phase;
  logic [1:0] used_must_rows, used_must_cols;
  logic [1:0] rep_row_valid, rep_col_valid;
  logic [3:0] rep_row [2];
  logic [3:0] rep_col [2];
  logic [3:0] fl_rd_idx = '0;
  logic [7:0] fl_rd_addr;
  int checks = 0, failures = 0;

  bisr_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- independent model of the test pattern ----
  logic [7:0] pat [256];
  function automatic logic [7:0] ref_step(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [7:0] ref_pat(input logic [7:0] s);
    return s[3] ? s : {s[7:2], s[0], s[1]};
  endfunction

  // ---- mechanism counters ----
  int m_row_must = 0, m_col_must = 0, m_covered = 0, m_overflow = 0, m_restart = 0;
  int m_recover = 0, m_unrep_search = 0, m_verify_pass = 0, m_normal = 0, m_early = 0, m_sig_detect = 0;
  always @(posedge clk) begin
    if (r_mustrepair) m_row_must++;
    if (c_mustrepair) m_col_must++;
    if (dut.u_mra.bist_valid && (dut.u_mra.t_rcov || dut.u_mra.t_ccov)) m_covered++;
    if (dut.u_solver.state == SV_EVAL && dut.u_solver.fail) m_restart++;
    if (dut.u_solver.state == SV_RECOVER && dut.u_solver.success) m_recover++;
  end

  // ---- expected outcome ----
  int vis_r [$], vis_c [$];   // visible faulty words
  function automatic int optimum();
    int best = 99;
    for (int m = 0; m < 65536; m++) begin
      int nr = 0, ncol = 0;
      logic [15:0] cols = '0;
      for (int b = 0; b < 16; b++) nr += (m >> b) & 1;
      if (nr > 2) continue;
      for (int i = 0; i < vis_r.size(); i++)
        if (!((m >> vis_r[i]) & 1)) cols[vis_c[i]] = 1'b1;
      for (int b = 0; b < 16; b++) ncol += cols[b];
      if (ncol <= 2 && nr + ncol < best) best = nr + ncol;
    end
    return best;
  endfunction

  // Set defect f; val_visible chooses a stuck value the pattern exposes.
  task automatic defect(input int f, input int r, input int c, input int b, input bit visible);
    inj_en[f] = 1'b1; inj_row[f] = 4'(r); inj_col[f] = 4'(c); inj_bit[f] = 3'(b);
    inj_val[f] = visible ? ~pat[r*16 + c][b] : pat[r*16 + c][b];
  endtask

  task automatic run(input string name, output int opt);
    int cyc;
    logic [7:0] w;
    bit seen [256];
    bit cov;
    vis_r.delete(); vis_c.delete();
    for (int a = 0; a < 256; a++) seen[a] = 0;
    for (int f = 0; f < NF; f++) begin
      int a;
      a = int'(inj_row[f]) * 16 + int'(inj_col[f]);
      if (inj_en[f]) begin
        w = pat[a];
        for (int g = 0; g < NF; g++)
          if (inj_en[g] && inj_row[g] == inj_row[f] && inj_col[g] == inj_col[f]) w[inj_bit[g]] = inj_val[g];
        if (w != pat[a] && !seen[a]) begin
          seen[a] = 1; vis_r.push_back(int'(inj_row[f])); vis_c.push_back(int'(inj_col[f]));
        end
      end
    end
    opt = optimum();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!test_done && cyc < 3000) begin @(negedge clk); cyc++; end
    check(test_done, {name, ": test finished"});
    check(unrepairable == (opt == 99), $sformatf("%s: unrepairable=%0b, optimum %0d", name, unrepairable, opt));
    // Signature of the first read pass, when it ran to the end. A single
    // wrong word can never give the golden signature; several could by
    // chance, so then only the detection is counted.
    if (cyc >= 2*256 + 2) begin
      if (vis_r.size() == 0) check(sig_ok_test, {name, ": golden signature on a clean read"});
      if (vis_r.size() == 1) check(!sig_ok_test, {name, ": one wrong word changes the signature"});
      if (vis_r.size() > 0 && !sig_ok_test) m_sig_detect++;
    end
    check(fl_count == 16'(vis_r.size()) || unrepairable, $sformatf("%s: %0d faults logged, %0d visible", name, fl_count, vis_r.size()));
    if (opt != 99) begin
      check(test_pass && n_verify_errors == 0, {name, ": verify passes"});
      check(sig_ok_verify, {name, ": golden signature after repair"});
      check(int'(cost_opt) == opt, $sformatf("%s: cost %0d, optimum %0d", name, cost_opt, opt));
      for (int i = 0; i < vis_r.size(); i++) begin
        cov = 1'b0;
        for (int j = 0; j < 2; j++)
          if ((rep_row_valid[j] && int'(rep_row[j]) == vis_r[i]) || (rep_col_valid[j] && int'(rep_col[j]) == vis_c[i])) cov = 1'b1;
        check(cov, $sformatf("%s: fault (%0d,%0d) repaired", name, vis_r[i], vis_c[i]));
      end
      // Two passes of 2*256+1 clocks, plus the analysis.
      check(cyc <= 2*(2*256 + 2) + 70, $sformatf("%s: %0d clocks", name, cyc));
      if (test_pass) m_verify_pass++;
    end else begin
      check(!test_pass, {name, ": no pass when unrepairable"});
      if (cyc < 2*256 + 2) m_early++;
      if (!mra_overflow) m_unrep_search++;
      if (mra_overflow) m_overflow++;
    end
    $display("%-10s visible faults %0d  optimum %0d  cost %0d  unrepairable %0b  clocks %0d",
             name, vis_r.size(), opt, cost_opt, unrepairable, cyc);
  endtask

  task automatic normal_access(input int a, input logic [7:0] d);
    norm_we = 1'b1; norm_addr = 8'(a); norm_wdata = d;
    @(negedge clk);
    norm_we = 1'b0; norm_re = 1'b1;
    @(negedge clk);
    norm_re = 1'b0;
    check(rdata == d, $sformatf("normal port word %0d: %h expected %h", a, rdata, d));
    m_normal++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s;
    int opt;
    for (int f = 0; f < NF; f++) begin inj_row[f] = '0; inj_col[f] = '0; inj_bit[f] = '0; end
    s = LFSR_SEED;
    for (int a = 0; a < 256; a++) begin pat[a] = ref_pat(s); s = ref_step(s); end
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    run("clean", opt);
    check(opt == 0 && cost_opt == 0 && rep_row_valid == 0 && rep_col_valid == 0, "clean: no repair");

    // Worked example: bit 0 of words 14, 9 and 4.
    inj_en = '0;
    defect(0, 0, 14, 0, 1); defect(1, 0, 9, 0, 1); defect(2, 0, 4, 0, 1);
    run("example", opt);
    check(rep_row_valid == 2'b01 && rep_row[0] == 4'd0 && used_must_rows == 1, "example: row 0 must-repair");
    fl_rd_idx = 4'd0; #1 check(fl_rd_addr == 8'd14, "fault log entry 0 = 14");
    fl_rd_idx = 4'd1; #1 check(fl_rd_addr == 8'd9,  "fault log entry 1 = 9");
    fl_rd_idx = 4'd2; #1 check(fl_rd_addr == 8'd4,  "fault log entry 2 = 4");
    @(negedge clk);
    normal_access(14, ~pat[14]);
    normal_access(4, 8'h00);

    // Column must-repair: three faults in column 5, and a covered fault.
    inj_en = '0;
    defect(0, 2, 5, 1, 1); defect(1, 7, 5, 3, 1); defect(2, 11, 5, 7, 1); defect(3, 1, 5, 2, 1);
    defect(4, 9, 12, 4, 1);
    run("column", opt);
    check(used_must_cols == 1, "column: column must-repair");
    normal_access(7*16 + 5, 8'hA5);

    // Fault-list overflow: nine faults in distinct rows and columns.
    inj_en = '0;
    // High rows: the descending read meets them first, so the stop is early.
    for (int f = 0; f < 9; f++) defect(f, 15 - f, (f * 5 + 3) % 16, f % 8, 1);
    run("overflow", opt);
    check(mra_overflow, "overflow flagged");

    // Five faults in distinct rows and columns: only the search sees it.
    inj_en = '0;
    for (int f = 0; f < 5; f++) defect(f, 2 * f + 1, 3 * f + 2, f, 1);
    run("search", opt);
    check(!mra_overflow, "search: no overflow");

    // Random defect sets.
    for (int t = 0; t < 40; t++) begin
      int nd;
      inj_en = '0;
      nd = $urandom_range(1, 10);
      for (int f = 0; f < nd; f++) begin
        int r, c;
        r = (f > 0 && $urandom_range(0, 2) == 0) ? int'(inj_row[$urandom_range(0, f-1)]) : $urandom_range(0, 15);
        c = (f > 0 && $urandom_range(0, 2) == 0) ? int'(inj_col[$urandom_range(0, f-1)]) : $urandom_range(0, 15);
        defect(f, r, c, $urandom_range(0, 7), $urandom_range(0, 3) != 0);
      end
      run($sformatf("random%0d", t), opt);
      // Normal access to a repaired word, with data that the defect would spoil.
      if (test_pass && vis_r.size() > 0)
        normal_access(vis_r[0] * 16 + vis_c[0], 8'($urandom));
    end

    $display("row must-repair %0d, column must-repair %0d, covered %0d, overflow %0d, restart %0d",
             m_row_must, m_col_must, m_covered, m_overflow, m_restart);
    $display("recovery %0d, unrepairable by search %0d, verify pass %0d, normal access %0d, early stop %0d, signature mismatch %0d",
             m_recover, m_unrep_search, m_verify_pass, m_normal, m_early, m_sig_detect);
    check(m_row_must > 0, "row must-repair happened");
    check(m_col_must > 0, "column must-repair happened");
    check(m_covered > 0, "covered fault happened");
    check(m_overflow > 0, "overflow happened");
    check(m_restart > 0, "restart happened");
    check(m_recover > 0, "recovery happened");
    check(m_unrep_search > 0, "unrepairable by search happened");
    check(m_verify_pass > 0, "verify pass happened");
    check(m_normal > 0, "normal access happened");
    check(m_sig_detect > 0, "signature mismatch happened");
    check(m_early > 0, "early termination happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
