// solver: final analysis of the built-in repair analyzer. After the memory
// test it searches, one repair strategy after another, for the assignment of
// spare rows and columns that covers every fault in the fault-list with the
// fewest spares.
//
// A repair strategy is a string of k = (r - must-repair rows) +
// (c - must-repair columns) bits, one per spare still free; it holds as many
// 1s as spare rows are free. The first strategy ("First Repair Strategy")
// puts all rows first (e.g. 1100 for RRCC); the k-subset enumerator gives the
// next one. A strategy is evaluated by walking the fault-list, one entry per
// clock: each valid entry that the solution record does not yet cover takes
// the next strategy bit and is covered by its row (R_Insert) or its column
// (C_Insert). The cost register (UsedRepairElements) starts at the number of
// must-repair spares and counts each insertion. The strategy fails, and the
// solver asserts RESTART and moves on in the very next cycle, when
//   - the strategy has no bit left or picks a spare type that is full, or
//   - the cost would no longer be below the best cost so far
//     (UsedRepairElOpt), i.e. the 'Better' signal drops.
// A strategy that reaches the end of the fault-list is the best so far: it
// and its cost are saved (RepairStrategyOpt, UsedRepairElOpt). After the last
// strategy the solver enters the recovery phase: the saved strategy is loaded
// and evaluated once more, without the cost test, so the solution record ends
// up holding the optimal solution. Only the strategy is stored, not the
// solution, which halves the storage.
//
// Interface: bist_done (pulse) starts the analysis; mra_fail tells that the
// must-repair analysis already found the array unrepairable. bisr_done and
// unrepairable are held until 'clear'. One fault-list entry per clock; a
// strategy that fails at entry j costs j+1 clocks.
//
// Follows the document: registers UsedMustRepairRows/Cols (read from the
// analyzer), First Repair Strategy, RepairStrategy, K-subset enumerator,
// RepairStrategyOpt, UsedRepairElements, UsedRepairElOpt, the Better
// comparison, RESTART, R_Insert, C_Insert, BIST_Done, Unrepairable,
// BISR_Done and the recovery phase. This design's own choices: the
// strategy bit order (most significant used bit first), the skipping of
// invalid fault-list entries, and the state encoding.
module solver #(
  parameter int unsigned R = bisr_pkg::R_SPARE,
  parameter int unsigned C = bisr_pkg::C_SPARE,
  localparam int unsigned N   = R + C,
  localparam int unsigned PW  = $clog2(N + 1),
  localparam int unsigned RCW = $clog2(R + 1),
  localparam int unsigned CCW = $clog2(C + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           bist_done,
  input  logic           mra_fail,
  // analyzer status for the current fault-list entry
  input  logic           ent_valid,
  input  logic           ent_last,
  input  logic           r_covered,
  input  logic           c_covered,
  input  logic           r_full,
  input  logic           c_full,
  input  logic [RCW-1:0] used_must_rows,
  input  logic [CCW-1:0] used_must_cols,
  // commands to the analyzer
  output logic           analyse,
  output logic           restart,
  output logic           r_insert,
  output logic           c_insert,
  // results
  output logic           bisr_done,
  output logic           unrepairable,
  output logic [N-1:0]   strategy,       // RepairStrategy
  output logic [N-1:0]   strategy_opt,   // RepairStrategyOpt
  output logic [PW-1:0]  cost_opt,       // UsedRepairElOpt
  output logic [15:0]    n_strategies    // strategies evaluated
);
  import bisr_pkg::*;

  solver_state_e state;
  logic [PW-1:0] ptr, cost, k, must_cost, free_rows, free_cols;
  logic [N-1:0]  first, nxt;
  int unsigned   bit_idx;
  logic          last, need, have_bit, sbit, fail, success, found;

  ksubset_enum #(.N(N)) u_enum (.cur(strategy), .nxt(nxt), .last(last));

  // First Repair Strategy: all free rows first.
  always_comb begin
    free_rows = PW'(R) - PW'(used_must_rows);
    free_cols = PW'(C) - PW'(used_must_cols);
    k         = free_rows + free_cols;
    must_cost = PW'(used_must_rows) + PW'(used_must_cols);
    first     = N'(((N+1)'(1) << free_rows) - (N+1)'(1)) << free_cols;
  end

  always_comb begin
    need     = ent_valid && !r_covered && !c_covered;
    have_bit = ptr < k;
    bit_idx  = int'(k) - int'(ptr) - 1;
    sbit     = have_bit ? strategy[bit_idx] : 1'b0;
    fail     = 1'b0;
    if (state == SV_EVAL || state == SV_RECOVER) begin
      if (need && (!have_bit || (sbit ? r_full : c_full))) fail = 1'b1;
      // Better: the new cost must stay below the best cost so far.
      if (state == SV_EVAL && need && !((cost + PW'(1)) < cost_opt)) fail = 1'b1;
    end
    success  = (state == SV_EVAL || state == SV_RECOVER) && !fail && ent_last;
    r_insert = (state == SV_EVAL || state == SV_RECOVER) && need && !fail && sbit;
    c_insert = (state == SV_EVAL || state == SV_RECOVER) && need && !fail && !sbit;
    restart  = (state == SV_INIT) || (state == SV_EVAL && (fail || success)) ||
               (state == SV_RECOVER && fail);
    analyse  = (state == SV_INIT) || (state == SV_EVAL) || (state == SV_RECOVER);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= SV_IDLE;
      strategy     <= '0;
      strategy_opt <= '0;
      cost_opt     <= '0;
      cost         <= '0;
      ptr          <= '0;
      found        <= 1'b0;
      bisr_done    <= 1'b0;
      unrepairable <= 1'b0;
      n_strategies <= '0;
    end else if (clear) begin
      state        <= SV_IDLE;
      found        <= 1'b0;
      bisr_done    <= 1'b0;
      unrepairable <= 1'b0;
      n_strategies <= '0;
    end else begin
      unique case (state)
        SV_IDLE: if (bist_done) begin
          if (mra_fail) begin
            unrepairable <= 1'b1;
            bisr_done    <= 1'b1;
            state        <= SV_DONE;
          end else begin
            state <= SV_INIT;
          end
        end
        SV_INIT: begin
          strategy     <= first;
          ptr          <= '0;
          cost         <= must_cost;
          cost_opt     <= PW'(N + 1);
          found        <= 1'b0;
          n_strategies <= 16'd1;
          state        <= SV_EVAL;
        end
        SV_EVAL: begin
          if (fail || success) begin
            ptr  <= '0;
            cost <= must_cost;
            if (success) begin
              strategy_opt <= strategy;
              cost_opt     <= cost + PW'(need);
              found        <= 1'b1;
            end
            if (last) begin
              if (found || success) begin
                strategy <= success ? strategy : strategy_opt;
                state    <= SV_RECOVER;
              end else begin
                unrepairable <= 1'b1;
                bisr_done    <= 1'b1;
                state        <= SV_DONE;
              end
            end else begin
              strategy     <= nxt;
              n_strategies <= n_strategies + 16'd1;
            end
          end else if (need) begin
            ptr  <= ptr + PW'(1);
            cost <= cost + PW'(1);
          end
        end
        SV_RECOVER: begin
          if (need && !fail) ptr <= ptr + PW'(1);
          if (success || fail) begin
            unrepairable <= fail;
            bisr_done    <= 1'b1;
            state        <= SV_DONE;
          end
        end
        SV_DONE: ;
        default: state <= SV_IDLE;
      endcase
    end
  end

  // The recovery pass re-runs a strategy that already succeeded.
  a_recover_ok: assert property (@(posedge clk) disable iff (!rst_n)
    state == SV_RECOVER |-> !fail);
  a_insert_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    !(r_insert && c_insert));

endmodule
