// mra: must-repair analyzer. It watches the fault addresses the memory BIST
// reports during the test and keeps two CAM pairs:
//   - the fault-list: a row CAM (CAM0_R) and a column CAM (CAM0_C) of
//     FL = 2*r*c entries holding the faults that no repair has covered yet;
//   - the solution record: a row CAM (CAM1_R, r entries) and a column CAM
//     (CAM1_C, c entries) holding the spare-row and spare-column assignments.
//     Their valid bits are the L registers; L_Save keeps the must-repair part.
//
// During the test (one fault per cycle, bist_valid):
//   - a fault whose row or column is already in the solution record is
//     covered (R_Covered / C_Covered) and dropped; so is an exact repeat of a
//     fault already in the fault-list;
//   - the parallel counters count the fault-list entries in the same row and
//     in the same column. If c entries share the row, the row now has c+1
//     faults and must be repaired by a spare row (R_MustRepair); if r entries
//     share the column, it must be repaired by a spare column (C_MustRepair).
//     The row or column goes into the solution record (L and L_Save), and the
//     fault-list entries it covers are invalidated. If both conditions hold the
//     row is taken first;
//   - otherwise the fault is written into the first free fault-list entry.
//   - a must-repair with no spare left (R/C_RedundancyFull) or a full
//     fault-list makes the array unrepairable; 'fail' is set and stays set.
//
// During the final analysis (Fig. "solver") an address counter walks the
// fault-list one entry per cycle. For the current entry the analyzer reports
// whether it is valid and whether the solution record covers it, and the
// solver answers with R_Insert or C_Insert to add the entry's row or column
// to the solution record, or with RESTART, which restores L from L_Save and
// sets the counter back to 0.
//
// Interface timing: every input is sampled at the rising clock edge; all
// status outputs for the current fault or entry are combinational.
//
// Follows the document: CAM pairs, 2rc fault-list entries, r/c solution
// record entries, parallel counters with "= c" and "= r" tests, L and L_Save,
// redundancy-full and covered signals, RESTART / R_Insert / C_Insert and the
// fault-list address counter. This design's own choices: invalidating
// covered fault-list entries (so counts only include uncovered faults),
// dropping repeated faults, row priority, and the 'fail' flag.
module mra #(
  parameter int unsigned ROW_W = bisr_pkg::ROW_W,
  parameter int unsigned COL_W = bisr_pkg::COL_W,
  parameter int unsigned R     = bisr_pkg::R_SPARE,
  parameter int unsigned C     = bisr_pkg::C_SPARE,
  localparam int unsigned FL   = 2 * R * C,
  localparam int unsigned FIW  = (FL > 1) ? $clog2(FL) : 1,
  localparam int unsigned RIW  = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned CIW  = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned FCW  = $clog2(FL + 1),
  localparam int unsigned RCW  = $clog2(R + 1),
  localparam int unsigned CCW  = $clog2(C + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,          // start of a new test
  // BIST side
  input  logic             bist_valid,     // BIST_DUTAddrValid
  input  logic [ROW_W-1:0] bist_row,       // BIST_R_DUTAddr
  input  logic [COL_W-1:0] bist_col,       // BIST_C_DUTAddr
  output logic             r_mustrepair,
  output logic             c_mustrepair,
  output logic             fail,           // unrepairable found during test
  output logic             overflow,       // fault-list was full (sticky)
  // solver side
  input  logic             analyse,        // final analysis in progress
  input  logic             restart,
  input  logic             r_insert,
  input  logic             c_insert,
  output logic             ent_valid,
  output logic             ent_last,
  output logic             r_covered,
  output logic             c_covered,
  output logic             r_full,         // R_RedundancyFull
  output logic             c_full,         // C_RedundancyFull
  output logic [RCW-1:0]   used_must_rows,
  output logic [CCW-1:0]   used_must_cols,
  // solution record
  output logic [R-1:0]     sol_row_valid,
  output logic [ROW_W-1:0] sol_row [R],
  output logic [C-1:0]     sol_col_valid,
  output logic [COL_W-1:0] sol_col [C]
);

  // ---------------- fault-list ----------------
  logic [FL-1:0]  fl_rmatch, fl_cmatch, fl_rhit_unused, fl_chit_unused;
  logic [FL-1:0]  fl_valid, fl_cvalid_unused;
  logic [ROW_W-1:0] fl_rows_unused [FL];
  logic [COL_W-1:0] fl_cols_unused [FL];
  logic           fl_we, fl_vld_load;
  logic [FL-1:0]  fl_vld_in;
  logic [FIW-1:0] fl_widx, addr;
  logic [ROW_W-1:0] ent_row;
  logic [COL_W-1:0] ent_col;
  logic [FCW-1:0] rcount, ccount;

  pb_cam #(.ENTRIES(FL), .DW(ROW_W)) u_cam0_r (
    .clk, .rst_n, .we(fl_we), .widx(fl_widx), .wdata(bist_row),
    .vld_load(fl_vld_load), .vld_in(fl_vld_in), .key(bist_row),
    .match(fl_rmatch), .param_hit(fl_rhit_unused), .valid(fl_valid),
    .rd_idx(addr), .rd_data(ent_row), .entries(fl_rows_unused));

  pb_cam #(.ENTRIES(FL), .DW(COL_W)) u_cam0_c (
    .clk, .rst_n, .we(fl_we), .widx(fl_widx), .wdata(bist_col),
    .vld_load(fl_vld_load), .vld_in(fl_vld_in), .key(bist_col),
    .match(fl_cmatch), .param_hit(fl_chit_unused), .valid(fl_cvalid_unused),
    .rd_idx(addr), .rd_data(ent_col), .entries(fl_cols_unused));

  parallel_counter #(.N(FL)) u_rcnt (.in(fl_rmatch), .count(rcount));
  parallel_counter #(.N(FL)) u_ccnt (.in(fl_cmatch), .count(ccount));

  // ---------------- solution record ----------------
  logic [R-1:0]   sr_rmatch, sr_rhit_unused, l_row, lsave_row, sr_r_vld_in;
  logic [C-1:0]   sr_cmatch, sr_chit_unused, l_col, lsave_col, sr_c_vld_in;
  logic           sr_r_we, sr_c_we, sr_r_vld_load, sr_c_vld_load;
  logic [RIW-1:0] sr_r_widx;
  logic [CIW-1:0] sr_c_widx;
  logic [ROW_W-1:0] sr_r_key, sr_r_wdata, sr_r_rd_unused;
  logic [COL_W-1:0] sr_c_key, sr_c_wdata, sr_c_rd_unused;

  pb_cam #(.ENTRIES(R), .DW(ROW_W)) u_cam1_r (
    .clk, .rst_n, .we(sr_r_we), .widx(sr_r_widx), .wdata(sr_r_wdata),
    .vld_load(sr_r_vld_load), .vld_in(sr_r_vld_in), .key(sr_r_key),
    .match(sr_rmatch), .param_hit(sr_rhit_unused), .valid(l_row),
    .rd_idx('0), .rd_data(sr_r_rd_unused), .entries(sol_row));

  pb_cam #(.ENTRIES(C), .DW(COL_W)) u_cam1_c (
    .clk, .rst_n, .we(sr_c_we), .widx(sr_c_widx), .wdata(sr_c_wdata),
    .vld_load(sr_c_vld_load), .vld_in(sr_c_vld_in), .key(sr_c_key),
    .match(sr_cmatch), .param_hit(sr_chit_unused), .valid(l_col),
    .rd_idx('0), .rd_data(sr_c_rd_unused), .entries(sol_col));

  assign sol_row_valid = l_row;
  assign sol_col_valid = l_col;

  // Entries are filled from index 0 upward, so L is a thermometer code and
  // the next free slot is its population count.
  function automatic int unsigned ones(input logic [31:0] v);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < 32; i++) n += v[i];
    return n;
  endfunction

  assign r_full = &l_row;
  assign c_full = &l_col;
  assign used_must_rows = RCW'(ones(32'(lsave_row)));
  assign used_must_cols = CCW'(ones(32'(lsave_col)));

  // ---------------- test-phase decisions ----------------
  logic          t_rcov, t_ccov, t_dup, t_store, fl_full;

  always_comb begin
    fl_full = &fl_valid;
    fl_widx = '0;
    for (int i = FL - 1; i >= 0; i--) if (!fl_valid[i]) fl_widx = FIW'(i);
  end

  assign sr_r_key = analyse ? ent_row : bist_row;
  assign sr_c_key = analyse ? ent_col : bist_col;

  always_comb begin
    t_rcov = |sr_rmatch;
    t_ccov = |sr_cmatch;
    t_dup  = |(fl_rmatch & fl_cmatch);
    r_mustrepair = 1'b0;
    c_mustrepair = 1'b0;
    t_store      = 1'b0;
    if (bist_valid && !analyse && !fail && !t_rcov && !t_ccov && !t_dup) begin
      if (rcount == FCW'(C))      r_mustrepair = 1'b1;
      else if (ccount == FCW'(R)) c_mustrepair = 1'b1;
      else                        t_store      = 1'b1;
    end
  end

  // ---------------- analysis-phase status ----------------
  assign ent_valid = fl_valid[addr];
  assign ent_last  = (addr == FIW'(FL - 1));
  assign r_covered = analyse & (|sr_rmatch);
  assign c_covered = analyse & (|sr_cmatch);

  // ---------------- write controls ----------------
  always_comb begin
    fl_we       = t_store && !fl_full;
    fl_vld_load = clear || (r_mustrepair && !r_full) || (c_mustrepair && !c_full);
    fl_vld_in   = clear ? '0 :
                  r_mustrepair ? (fl_valid & ~fl_rmatch) : (fl_valid & ~fl_cmatch);

    sr_r_we       = (r_mustrepair && !r_full) || (analyse && r_insert && !restart && !r_full);
    sr_r_widx     = RIW'(ones(32'(l_row)));
    sr_r_wdata    = analyse ? ent_row : bist_row;
    sr_r_vld_load = clear || (analyse && restart);
    sr_r_vld_in   = clear ? '0 : lsave_row;

    sr_c_we       = (c_mustrepair && !c_full) || (analyse && c_insert && !restart && !c_full);
    sr_c_widx     = CIW'(ones(32'(l_col)));
    sr_c_wdata    = analyse ? ent_col : bist_col;
    sr_c_vld_load = clear || (analyse && restart);
    sr_c_vld_in   = clear ? '0 : lsave_col;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsave_row <= '0;
      lsave_col <= '0;
      fail      <= 1'b0;
      overflow  <= 1'b0;
      addr      <= '0;
    end else if (clear) begin
      lsave_row <= '0;
      lsave_col <= '0;
      fail      <= 1'b0;
      overflow  <= 1'b0;
      addr      <= '0;
    end else begin
      if (r_mustrepair) begin
        if (r_full) fail <= 1'b1;
        else lsave_row[sr_r_widx] <= 1'b1;
      end
      if (c_mustrepair) begin
        if (c_full) fail <= 1'b1;
        else lsave_col[sr_c_widx] <= 1'b1;
      end
      if (t_store && fl_full) begin
        fail     <= 1'b1;
        overflow <= 1'b1;
      end
      if (analyse) begin
        if (restart || ent_last) addr <= '0;
        else                     addr <= addr + FIW'(1);
      end
    end
  end

  // Only one insertion per cycle, and never into a full set of spares.
  a_one_insert: assert property (@(posedge clk) disable iff (!rst_n)
    !(r_insert && c_insert));
  a_no_insert_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    analyse && !restart |-> !(r_insert && r_full) && !(c_insert && c_full));

endmodule
