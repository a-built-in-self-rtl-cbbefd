// signature_analyzer: output response compactor, golden-signature ROM and
// signature comparator of the basic BIST structure, applied to the words the
// memory returns during each read pass.
//
// The compactor is a multiple-input signature register (MISR): every read
// word is XORed into an N-bit LFSR as it shifts, so a whole pass shrinks to
// one N-bit signature. The golden signature is the signature a defect-free
// memory gives; it is a constant of the design, computed at elaboration by
// replaying the test: the words the pattern generator writes to addresses
// 0 .. 2^AW-1, read back from the top address down, compacted with the same
// MISR. At the last word of a pass the comparator sets the pass's status bit
// to (signature == golden) and the register starts again from zero.
// Compaction is lossy: a signature match means "very probably defect-free",
// which the per-word comparison of the BIST engine complements.
//
// Interface: clear (start of a test) resets signature and status; en marks a
// read word on data; last marks the final word of a pass; verify says the
// pass is the verify pass. ok_test / ok_verify are the status bits of the
// first and the verify pass, valid from the clock after their last word.
//
// Follows the basic BIST structure: output response compactor, ROM holding
// the golden signature, comparator giving a status. This design's own
// choices: the MISR polynomial (the pattern generator's), computing the ROM
// content at elaboration, and applying it to the memory read pass.
module signature_analyzer #(
  parameter int unsigned  N          = bisr_pkg::DATA_W,
  parameter int unsigned  AW         = bisr_pkg::ADDR_W,
  parameter logic [N-1:0] MISR_TAPS  = bisr_pkg::LFSR_TAPS,
  // pattern generator settings, for the golden signature (see bs_lfsr)
  parameter logic [N-1:0] LFSR_TAPS  = bisr_pkg::LFSR_TAPS,
  parameter logic [N-1:0] LFSR_SEED  = bisr_pkg::LFSR_SEED,
  parameter int unsigned  SWAP_M     = 1,
  parameter int unsigned  SWAP_X     = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,      // start of a test: clears signature and status
  input  logic         en,         // data carries a read word
  input  logic         last,       // ... the last word of the pass
  input  logic         verify,     // ... of the verify pass
  input  logic [N-1:0] data,       // word read from the memory
  output logic [N-1:0] signature,  // running compacted signature
  output logic         ok_test,    // first pass signature equals the golden one
  output logic         ok_verify   // verify pass signature equals the golden one
);

  function automatic logic [N-1:0] misr_next(input logic [N-1:0] s, input logic [N-1:0] d);
    return {s[N-2:0], ^(s & MISR_TAPS)} ^ d;
  endfunction

  // Golden signature ("ROM"): replay of the defect-free read pass.
  function automatic logic [N-1:0] golden_signature();
    logic [N-1:0] st, w, sig;
    logic [N-1:0] words [2**AW];
    st = LFSR_SEED;
    for (int unsigned a = 0; a < 2**AW; a++) begin
      w = st;
      if (!st[SWAP_X-1]) begin
        w[SWAP_M-1] = st[SWAP_M];
        w[SWAP_M]   = st[SWAP_M-1];
      end
      words[a] = w;
      st = {st[N-2:0], ^(st & LFSR_TAPS)};
    end
    sig = '0;
    for (int a = 2**AW - 1; a >= 0; a--) sig = misr_next(sig, words[a]);
    return sig;
  endfunction

  localparam logic [N-1:0] GOLDEN = golden_signature();

  logic [N-1:0] sig_next;
  assign sig_next = misr_next(signature, data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= '0;
      ok_test   <= 1'b0;
      ok_verify <= 1'b0;
    end else if (clear) begin
      signature <= '0;
      ok_test   <= 1'b0;
      ok_verify <= 1'b0;
    end else if (en) begin
      if (last) begin
        signature <= '0;
        if (verify) ok_verify <= (sig_next == GOLDEN);
        else        ok_test   <= (sig_next == GOLDEN);
      end else begin
        signature <= sig_next;
      end
    end
  end

endmodule
