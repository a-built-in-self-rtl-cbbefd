// bs_lfsr: bit-swapping linear feedback shift register (BS-LFSR) used as the
// test pattern generator of the memory BIST.
//
// A conventional N-stage Fibonacci LFSR (stage 1 = bit 0 takes the feedback,
// the register shifts towards stage N = bit N-1) is followed by a 2x1
// multiplexer pair on two neighbouring stages m and m+1. The select line is
// taken from a later stage x: when it is 0 the two outputs are swapped, when
// it is 1 they pass unswapped. The swap lowers the number of transitions seen
// by the circuit under test. The pattern word is the LFSR state with this
// swap applied, so one word is produced per step.
//
// Besides stepping forward the register can step backward (dir_down = 1),
// which restores the previous state. The memory test writes ascending
// addresses and reads them back in descending order, and regenerates the
// expected words by stepping backward. Backward stepping needs the last
// stage to be a tap (TAPS[N-1] = 1).
//
// Interface: reset and load (which has priority over step) put SEED into the
// state; step advances one state per clock in the direction dir_down selects. 'pattern' is combinational from the
// current state.
//
// Follows the document: LFSR plus 2x1 swap multiplexers, select 0 = swap,
// 8 stages and the seed 0011_0010 of the worked example. This design's own
// choices: the feedback polynomial, the stage positions m = 1 and x = 4,
// and backward stepping.
module bs_lfsr #(
  parameter int unsigned N    = bisr_pkg::DATA_W,
  parameter logic [N-1:0] TAPS = bisr_pkg::LFSR_TAPS,
  parameter int unsigned M    = 1,   // swapped stages are m and m+1 (1-based)
  parameter int unsigned X    = 4,   // select stage (1-based), X > M+1
  parameter logic [N-1:0] SEED = bisr_pkg::LFSR_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic         dir_down,
  output logic [N-1:0] state,
  output logic [N-1:0] pattern
);

  logic         fb_fwd;
  logic         msb_back;
  logic [N-1:0] nxt_fwd;
  logic [N-1:0] nxt_back;

  // Forward: s' = {s[N-2:0], XOR of tapped stages}.
  always_comb begin
    fb_fwd = ^(state & TAPS);
    nxt_fwd = {state[N-2:0], fb_fwd};
  end

  // Backward: s[N-2:0] = s'[N-1:1]; the dropped stage N follows from the
  // feedback equation s'[0] = s[N-1] ^ (XOR of the other tapped stages).
  always_comb begin
    msb_back = state[0];
    for (int unsigned t = 0; t < N - 1; t++) begin
      if (TAPS[t]) msb_back = msb_back ^ state[t+1];
    end
    nxt_back = {msb_back, state[N-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= SEED;
    else if (load)     state <= SEED;
    else if (step)     state <= dir_down ? nxt_back : nxt_fwd;
  end

  // Swap multiplexers on stages M and M+1, selected by stage X.
  always_comb begin
    pattern = state;
    if (!state[X-1]) begin
      pattern[M-1] = state[M];
      pattern[M]   = state[M-1];
    end
  end

  initial begin
    assert (TAPS[N-1]) else $error("bs_lfsr: last stage must be a tap");
    assert (X > M + 1 && X <= N) else $error("bs_lfsr: select stage must follow the swapped pair");
  end

endmodule
