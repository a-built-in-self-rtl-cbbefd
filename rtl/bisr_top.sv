// bisr_top: built-in self-repair for a word-oriented memory with spare rows
// and spare columns.
//
// On 'start' the BIST engine (mem_bist, with its bit-swapping LFSR) takes the
// memory over through the input multiplexer, writes a pseudo-random word to
// every address and reads it back. Each failing word address goes, in the
// same cycle, to the must-repair analyzer (mra), which keeps the faults that
// are not yet covered in its fault-list CAMs and puts rows and columns that
// have no other choice straight into its solution record, and to the fault
// log. After the read pass the solver searches all repair strategies for the
// one that needs the fewest spares, leaving the optimal solution in the
// analyzer's solution record. The engine then loads that solution into the
// memory's repair registers and runs the pattern once more to verify the
// repaired memory. bisr_done, unrepairable and test_pass report the outcome;
// after the test the memory serves the normal port, with the repair applied.
//
// Interface: normal port norm_we/norm_re/norm_addr/norm_wdata -> rdata (read
// data one clock after the request; usable when the test is idle or done).
// The inj_* ports model physical defects of the memory array (stuck-at bits)
// for simulation. fl_rd_idx/fl_rd_addr stream out the logged fault addresses.
//
// The structure (pattern generator, input multiplexer, memory, comparator,
// must-repair analyzer with CAM fault-list and solution record, solver with
// k-subset enumerator, fault address registers, signature compactor with
// golden signature) follows the document; how
// the blocks hand over to each other in time is this design's own.
module bisr_top #(
  parameter int unsigned ROW_W  = bisr_pkg::ROW_W,
  parameter int unsigned COL_W  = bisr_pkg::COL_W,
  parameter int unsigned DATA_W = bisr_pkg::DATA_W,
  parameter int unsigned R      = bisr_pkg::R_SPARE,
  parameter int unsigned C      = bisr_pkg::C_SPARE,
  parameter int unsigned NF     = 16,
  parameter int unsigned LOG_N  = 16,
  localparam int unsigned AW    = ROW_W + COL_W,
  localparam int unsigned BW    = (DATA_W > 1) ? $clog2(DATA_W) : 1,
  localparam int unsigned LIW   = (LOG_N > 1) ? $clog2(LOG_N) : 1,
  localparam int unsigned N     = R + C,
  localparam int unsigned PW    = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // normal memory port
  input  logic              norm_we,
  input  logic              norm_re,
  input  logic [AW-1:0]     norm_addr,
  input  logic [DATA_W-1:0] norm_wdata,
  output logic [DATA_W-1:0] rdata,
  // array defects (simulation model)
  input  logic [NF-1:0]     inj_en,
  input  logic [ROW_W-1:0]  inj_row [NF],
  input  logic [COL_W-1:0]  inj_col [NF],
  input  logic [BW-1:0]     inj_bit [NF],
  input  logic [NF-1:0]     inj_val,
  // status
  output logic              test_mode,
  output bisr_pkg::bist_phase_e phase,
  output logic              bisr_done,
  output logic              unrepairable,
  output logic              test_done,
  output logic              test_pass,
  output logic              sig_ok_test,    // read1 signature equals the golden one
  output logic              sig_ok_verify,  // read2 signature equals the golden one
  output logic [DATA_W-1:0] signature,      // running read-pass signature
  output logic [15:0]       n_verify_errors,
  output logic [N-1:0]      strategy_opt,
  output logic [PW-1:0]     cost_opt,
  output logic [15:0]       n_strategies,
  output logic              mra_overflow,
  output logic              r_mustrepair,   // a row must-repair this clock
  output logic              c_mustrepair,   // a column must-repair this clock
  output logic [N-1:0]      strategy,       // strategy under evaluation
  output logic [$clog2(R+1)-1:0] used_must_rows,
  output logic [$clog2(C+1)-1:0] used_must_cols,
  // repair solution in use
  output logic [R-1:0]      rep_row_valid,
  output logic [ROW_W-1:0]  rep_row [R],
  output logic [C-1:0]      rep_col_valid,
  output logic [COL_W-1:0]  rep_col [C],
  // fault address log
  input  logic [LIW-1:0]    fl_rd_idx,
  output logic [AW-1:0]     fl_rd_addr,
  output logic [15:0]       fl_count,
  output logic              fl_overflow
);

  // A plain struct for the memory request, sized by this top's parameters.
  typedef struct packed {
    logic              we;
    logic              re;
    logic [AW-1:0]     addr;
    logic [DATA_W-1:0] wdata;
  } req_t;

  req_t norm_req, test_req, mem_req;

  // ---------------- BIST engine ----------------
  logic             flt_valid, flt_verify, analysis_clear, bist_done, repair_load;
  logic             rd_valid, rd_last, rd_verify;
  logic [ROW_W-1:0] flt_row;
  logic [COL_W-1:0] flt_col;
  logic             mra_fail;

  mem_bist #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) u_bist (
    .clk, .rst_n, .start,
    .test_mode, .m_we(test_req.we), .m_re(test_req.re), .m_addr(test_req.addr),
    .m_wdata(test_req.wdata), .m_rdata(rdata),
    .flt_valid, .flt_verify, .rd_valid, .rd_last, .rd_verify, .flt_row, .flt_col,
    .analysis_clear, .mra_abort(mra_fail), .bist_done, .bisr_done, .unrepairable,
    .repair_load, .phase, .done(test_done), .pass(test_pass), .n_verify_errors);

  // ---------------- output response compactor, golden ROM, comparator ----
  signature_analyzer #(.N(DATA_W), .AW(AW)) u_sig (
    .clk, .rst_n, .clear(analysis_clear), .en(rd_valid), .last(rd_last),
    .verify(rd_verify), .data(rdata), .signature, .ok_test(sig_ok_test),
    .ok_verify(sig_ok_verify));

  // ---------------- input multiplexer and memory ----------------
  assign norm_req = '{we: norm_we, re: norm_re, addr: norm_addr, wdata: norm_wdata};

  input_mux #(.REQ_T(req_t)) u_mux (
    .test_mode, .norm_req, .test_req, .mem_req);

  logic [R-1:0]     sol_row_valid;
  logic [ROW_W-1:0] sol_row [R];
  logic [C-1:0]     sol_col_valid;
  logic [COL_W-1:0] sol_col [C];

  repairable_mem #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W), .R(R), .C(C), .NF(NF)) u_mem (
    .clk, .rst_n, .we(mem_req.we), .re(mem_req.re),
    .row(mem_req.addr[AW-1:COL_W]), .col(mem_req.addr[COL_W-1:0]),
    .wdata(mem_req.wdata), .rdata,
    .repair_clear(analysis_clear), .repair_load,
    .sol_row_valid, .sol_row, .sol_col_valid, .sol_col,
    .rep_row_valid, .rep_row, .rep_col_valid, .rep_col,
    .inj_en, .inj_row, .inj_col, .inj_bit, .inj_val);

  // ---------------- repair analysis ----------------
  logic analyse, restart, r_insert, c_insert;
  logic ent_valid, ent_last, r_covered, c_covered, r_full, c_full;

  mra #(.ROW_W(ROW_W), .COL_W(COL_W), .R(R), .C(C)) u_mra (
    .clk, .rst_n, .clear(analysis_clear),
    .bist_valid(flt_valid && !flt_verify), .bist_row(flt_row), .bist_col(flt_col),
    .r_mustrepair, .c_mustrepair, .fail(mra_fail), .overflow(mra_overflow),
    .analyse, .restart, .r_insert, .c_insert,
    .ent_valid, .ent_last, .r_covered, .c_covered, .r_full, .c_full,
    .used_must_rows, .used_must_cols,
    .sol_row_valid, .sol_row, .sol_col_valid, .sol_col);

  solver #(.R(R), .C(C)) u_solver (
    .clk, .rst_n, .clear(analysis_clear), .bist_done, .mra_fail,
    .ent_valid, .ent_last, .r_covered, .c_covered, .r_full, .c_full,
    .used_must_rows, .used_must_cols,
    .analyse, .restart, .r_insert, .c_insert,
    .bisr_done, .unrepairable, .strategy, .strategy_opt, .cost_opt, .n_strategies);

  // ---------------- fault address registers ----------------
  fault_log #(.ENTRIES(LOG_N), .AW(AW)) u_log (
    .clk, .rst_n, .clear(analysis_clear),
    .we(flt_valid && !flt_verify), .waddr({flt_row, flt_col}),
    .rd_idx(fl_rd_idx), .rd_addr(fl_rd_addr), .count(fl_count), .overflow(fl_overflow));

endmodule
