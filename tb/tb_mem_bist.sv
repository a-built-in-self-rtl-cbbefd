// tb_mem_bist: self-checking testbench of the memory BIST engine, with a
// behavioural memory of 256 words (read data one clock after the request)
// and stuck-at bits in the testbench. The expected patterns are computed by
// an independent model of the bit-swapping LFSR. Three runs:
//   A  bit 0 stuck at 1 in words 14, 9 and 4 plus bit 6 stuck at 0 in word
//      200: the reported faults must be exactly the words whose pattern bit
//      differs from the stuck value, in descending address order; BIST_Done
//      must come 2*256+2 clocks after start; the "repair" (the testbench
//      removes the defects on repair_load) must make the verify pass; the
//      read words flagged for compaction must be the 256 words of each pass,
//      top address first, with one last-word flag;
//   B  same defects, no repair: the verify pass must count them as errors;
//   C  the analyzer aborts at the second fault: the read pass must stop
//      early and, being unrepairable, no verify pass may follow.
module tb_mem_bist;
  import bisr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0;
  logic test_mode, m_we, m_re;
  logic [7:0] m_addr, m_wdata, m_rdata;
  logic flt_valid, flt_verify;
  logic rd_valid, rd_last, rd_verify;
  logic [3:0] flt_row, flt_col;
  logic analysis_clear, mra_abort = 1'b0, bist_done;
  logic bisr_done = 1'b0, unrepairable = 1'b0, repair_load;
  bist_phase_e phase;
  logic done, pass;
  logic [15:0] n_verify_errors;
  int checks = 0, failures = 0;

  mem_bist dut (.*);

  always #5 clk = ~clk;

  // ---- behavioural memory with stuck-at bits ----
  logic [7:0] mem [256];
  logic       defects_on;
  int         d_addr [4] = '{14, 9, 4, 200};
  int         d_bit  [4] = '{0, 0, 0, 6};
  logic       d_val  [4] = '{1'b1, 1'b1, 1'b1, 1'b0};
  bit         repair_removes;

  always_ff @(posedge clk) begin
    if (m_we) mem[m_addr] <= m_wdata;
    if (m_re) begin
      logic [7:0] w;
      w = mem[m_addr];
      if (defects_on)
        for (int i = 0; i < 4; i++) if (int'(m_addr) == d_addr[i]) w[d_bit[i]] = d_val[i];
      m_rdata <= w;
    end
    if (repair_load && repair_removes) defects_on <= 1'b0;
  end

  function automatic logic [7:0] ref_step(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [7:0] ref_pat(input logic [7:0] s);
    return s[3] ? s : {s[7:2], s[0], s[1]};
  endfunction

  logic [7:0] exp_word [256];
  int exp_faults [$];
  int got_faults [$];
  int n_writes_after;
  logic [7:0] rd_words [2][$];
  int rd_lasts [2];
  int rd_last_pos [2];

  always @(posedge clk) begin
    if (flt_valid && !flt_verify) got_faults.push_back({flt_row, flt_col});
    if (rd_valid) begin
      rd_words[rd_verify].push_back(m_rdata);
      if (rd_last) begin rd_lasts[rd_verify]++; rd_last_pos[rd_verify] = rd_words[rd_verify].size(); end
    end
    if (flt_valid) begin
      checks++;
      if (!test_mode) begin failures++; $display("FAIL fault outside test mode"); end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input bit removes, input int abort_at, output int t_done);
    int cyc;
    repair_removes = removes;
    defects_on = 1'b1;
    got_faults.delete();
    for (int p = 0; p < 2; p++) begin rd_words[p].delete(); rd_lasts[p] = 0; rd_last_pos[p] = 0; end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    check(test_mode, "test mode during test");
    while (!bist_done && cyc < 5000) begin
      if (abort_at > 0 && got_faults.size() >= abort_at) mra_abort = 1'b1;
      @(negedge clk);
      cyc++;
    end
    t_done = cyc;
    repeat (5) @(negedge clk);
    unrepairable = (abort_at > 0);
    bisr_done = 1'b1;
    n_writes_after = 0;
    while (!done && cyc < 10000) begin
      @(negedge clk);
      if (m_we) n_writes_after++;
      cyc++;
    end
    bisr_done = 1'b0;
    mra_abort = 1'b0;
    unrepairable = 1'b0;
    @(negedge clk);
    check(!test_mode, "normal mode after test");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s;
    int t_done;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    s = LFSR_SEED;
    for (int a = 0; a < 256; a++) begin
      exp_word[a] = ref_pat(s);
      s = ref_step(s);
    end
    for (int a = 255; a >= 0; a--)
      for (int i = 0; i < 4; i++)
        if (a == d_addr[i] && exp_word[a][d_bit[i]] != d_val[i]) exp_faults.push_back(a);
    $display("expected faulty words: %p", exp_faults);
    check(exp_faults.size() > 0, "defects are visible with this pattern");

    // Run A
    run(1'b1, 0, t_done);
    check(t_done == 2*256 + 2, $sformatf("BIST_Done after %0d clocks", t_done));
    check(got_faults == exp_faults, $sformatf("reported faults %p", got_faults));
    for (int a = 0; a < 256; a++)
      if (mem[a] != exp_word[a]) begin check(1'b0, $sformatf("word %0d holds %h", a, mem[a])); break; end
    check(pass && n_verify_errors == 0, "verify passes after repair");
    check(n_writes_after == 256, "verify pass writes every word");
    // Read words handed on for compaction: 256 per pass, top address first,
    // the last one flagged once; the first pass carries the defects.
    for (int p = 0; p < 2; p++) begin
      int bad;
      bad = 0;
      check(rd_words[p].size() == 256 && rd_lasts[p] == 1 && rd_last_pos[p] == 256,
            $sformatf("pass %0d: %0d read words, last flag %0d times at word %0d", p, rd_words[p].size(), rd_lasts[p], rd_last_pos[p]));
      for (int k = 0; k < rd_words[p].size() && k < 256; k++)
        if (rd_words[p][k] != exp_word[255 - k]) bad++;
      check(bad == (p == 0 ? exp_faults.size() : 0), $sformatf("pass %0d: %0d read words differ from the pattern", p, bad));
    end

    // Run B
    run(1'b0, 0, t_done);
    check(got_faults == exp_faults, "faults again");
    check(!pass && int'(n_verify_errors) == exp_faults.size(), $sformatf("verify errors %0d", n_verify_errors));

    // Run C
    run(1'b1, 2, t_done);
    check(t_done < 2*256 + 2, $sformatf("early termination after %0d clocks", t_done));
    check(!pass && n_writes_after == 0, "no verify pass when unrepairable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
