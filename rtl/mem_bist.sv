// mem_bist: test controller and BIST engine for the word-oriented memory.
//
// The test runs in two passes of the same march-like sequence:
//   write1  every address from 0 upward receives the next word of the
//           bit-swapping LFSR pattern generator;
//   read1   the addresses are read back from the top down, while the
//           generator steps backward to regenerate the word each address was
//           given. A comparator checks each returned word against it; a
//           mismatch is reported at once (flt_valid with the row and column
//           of the address) to the must-repair analyzer and the fault log,
//           and the test goes on.
//   analyse bist_done is pulsed; the engine waits for the repair analysis.
//           If the analyzer reports the array unrepairable during read1
//           (mra_abort), read1 stops early and goes straight to analyse.
//   write2/read2  if a repair was found, repair_load puts it into the memory
//           (one clock before the first write) and the same pattern is written and read again through the
//           spare elements; any mismatch now counts as a verify error.
//   done    'pass' is 1 when the array was repairable and read2 found no
//           error.
// While the engine is not idle or done, test_mode switches the memory input
// multiplexer over to the engine.
//
// Interface and timing: start is a one-clock pulse. The memory returns read
// data one clock after the read request, so each comparison happens one clock
// after its request; rd_valid/rd_last/rd_verify mark the returned words for
// the signature analyzer. analysis_clear is 'start' itself, passed on to clear
// the analyzer, solver, fault log and repair registers. One word per clock: a pass over D = 2^(ROW_W+COL_W)
// words takes D clocks to write and D+1 to read.
//
// Follows the document: a test controller started by "Start BIST", the LFSR
// pattern generator, the comparison of read data with the expected data, the
// write1/read1 and write2/read2 passes, fault addresses sent on the fly while
// the test continues, early termination once the array is known to be
// unrepairable, and the descending read addresses of the worked example.
// This design's own choices: the exact sequence and the backward-stepping
// regeneration of the expected words.
module mem_bist #(
  parameter int unsigned ROW_W  = bisr_pkg::ROW_W,
  parameter int unsigned COL_W  = bisr_pkg::COL_W,
  parameter int unsigned DATA_W = bisr_pkg::DATA_W,
  localparam int unsigned AW    = ROW_W + COL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // memory side (through the input multiplexer)
  output logic              test_mode,
  output logic              m_we,
  output logic              m_re,
  output logic [AW-1:0]     m_addr,
  output logic [DATA_W-1:0] m_wdata,
  input  logic [DATA_W-1:0] m_rdata,
  // faults found
  output logic              flt_valid,
  output logic              flt_verify,   // fault seen in read2
  output logic              rd_valid,     // m_rdata carries a read word
  output logic              rd_last,      // ... and it is the last of the pass
  output logic              rd_verify,    // ... and it belongs to read2
  output logic [ROW_W-1:0]  flt_row,
  output logic [COL_W-1:0]  flt_col,
  // repair analysis
  output logic              analysis_clear,
  input  logic              mra_abort,
  output logic              bist_done,
  input  logic              bisr_done,
  input  logic              unrepairable,
  output logic              repair_load,
  // status
  output bisr_pkg::bist_phase_e phase,
  output logic              done,
  output logic              pass,
  output logic [15:0]       n_verify_errors
);
  import bisr_pkg::*;

  logic [AW-1:0]     a;
  logic              lfsr_load, lfsr_step, lfsr_down;
  logic [DATA_W-1:0] lfsr_state, pattern;
  logic              lfsr_zero;
  logic              draining;
  logic              rd_q;
  logic [DATA_W-1:0] exp_q;
  logic [AW-1:0]     addr_q;
  logic              mismatch;
  logic              repair_wait;

  bs_lfsr #(.N(DATA_W)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .step(lfsr_step), .dir_down(lfsr_down),
    .state(lfsr_state), .pattern(pattern));

  wire writing = (phase == PH_WRITE1) || (phase == PH_WRITE2);
  wire reading = ((phase == PH_READ1) || (phase == PH_READ2)) && !draining;

  always_comb begin
    test_mode = (phase != PH_IDLE) && (phase != PH_DONE);
    m_we      = writing;
    m_re      = reading && !(phase == PH_READ1 && mra_abort);
    m_addr    = a;
    m_wdata   = pattern;
    lfsr_load = start || (phase == PH_ANALYSE && bisr_done && !unrepairable);
    lfsr_step = (writing && a != '1) || (m_re && a != '0);
    lfsr_down = reading;
  end

  // The all-zero state would lock the generator; flag it for the assertion.
  assign lfsr_zero  = (lfsr_state == '0);
  assign mismatch   = rd_q && (m_rdata != exp_q);
  assign flt_valid  = mismatch;
  assign flt_verify = mismatch && (phase == PH_READ2);
  assign rd_valid   = rd_q;
  assign rd_last    = rd_q && draining;
  assign rd_verify  = (phase == PH_READ2);
  assign flt_row    = addr_q[AW-1:COL_W];
  assign flt_col    = addr_q[COL_W-1:0];
  assign analysis_clear = start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase           <= PH_IDLE;
      a               <= '0;
      draining        <= 1'b0;
      rd_q            <= 1'b0;
      exp_q           <= '0;
      addr_q          <= '0;
      bist_done       <= 1'b0;
      repair_load     <= 1'b0;
      repair_wait     <= 1'b0;
      done            <= 1'b0;
      pass            <= 1'b0;
      n_verify_errors <= '0;
    end else begin
      bist_done   <= 1'b0;
      repair_load <= 1'b0;
      rd_q        <= m_re;
      if (m_re) begin
        exp_q  <= pattern;
        addr_q <= a;
      end
      if (flt_verify && n_verify_errors != '1) n_verify_errors <= n_verify_errors + 16'd1;

      if (start) begin
        phase           <= PH_WRITE1;
        a               <= '0;
        draining        <= 1'b0;
        repair_wait     <= 1'b0;
        done            <= 1'b0;
        pass            <= 1'b0;
        n_verify_errors <= '0;
      end else begin
        unique case (phase)
          PH_WRITE1, PH_WRITE2: begin
            if (a == '1) phase <= (phase == PH_WRITE1) ? PH_READ1 : PH_READ2;
            else         a <= a + AW'(1);
          end
          PH_READ1, PH_READ2: begin
            if (phase == PH_READ1 && mra_abort) begin
              // Early termination: the array is already unrepairable.
              draining  <= 1'b0;
              bist_done <= 1'b1;
              phase     <= PH_ANALYSE;
            end else if (draining) begin
              draining <= 1'b0;
              if (phase == PH_READ1) begin
                bist_done <= 1'b1;
                phase     <= PH_ANALYSE;
              end else begin
                done  <= 1'b1;
                pass  <= (n_verify_errors == '0) && !flt_verify;
                phase <= PH_DONE;
              end
            end else if (a == '0) begin
              draining <= 1'b1;
            end else begin
              a <= a - AW'(1);
            end
          end
          PH_ANALYSE: if (bisr_done) begin
            if (unrepairable) begin
              done  <= 1'b1;
              pass  <= 1'b0;
              phase <= PH_DONE;
            end else if (!repair_wait) begin
              // Load the repair, then give the memory one clock to take it
              // before the first write of the verify pass.
              repair_load <= 1'b1;
              repair_wait <= 1'b1;
            end else begin
              repair_wait <= 1'b0;
              a           <= '0;
              phase       <= PH_WRITE2;
            end
          end
          PH_IDLE, PH_DONE: ;
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  a_lfsr_not_locked: assert property (@(posedge clk) disable iff (!rst_n) !lfsr_zero);
  a_fault_only_when_reading: assert property (@(posedge clk) disable iff (!rst_n)
    flt_valid |-> (phase == PH_READ1 || phase == PH_READ2));

endmodule
