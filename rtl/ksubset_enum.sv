// ksubset_enum: combinational k-subset enumerator of the solver. Given the
// current repair strategy, it returns the next one in one cycle.
//
// A repair strategy is a bit string: reading from the most significant used
// bit downward, a 1 means "cover the next uncovered fault with a spare row"
// and a 0 "with a spare column". All strategies with the same number of rows
// are enumerated in decreasing binary order, e.g. for two rows and two
// columns: 1100, 1010, 1001, 0110, 0101, 0011. The next strategy is the next
// smaller number with the same count of ones:
//   - the pivot is the lowest 1 that has a 0 directly below it; it moves
//     down by one place;
//   - all 1s below the new pivot position are packed right under it.
// The pivot is found with a parallel-prefix OR (log2(N) levels) that marks
// every bit above the lowest candidate, so the circuit depth grows with
// log2(N). When no candidate exists (all 1s at the bottom) the current
// strategy is the last one and 'last' is set.
//
// Interface: cur[N-1:0] -> nxt[N-1:0], last. Unused upper bits must be 0 and
// stay 0.
//
// The order of the strategies follows the document's table of bit
// representations; the pivot-and-pack formulation is this design's own.
module ksubset_enum #(
  parameter int unsigned N = bisr_pkg::R_SPARE + bisr_pkg::C_SPARE,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0] cur,
  output logic [N-1:0] nxt,
  output logic         last
);

  logic [N-1:0]  cand;       // cur[i] & ~cur[i-1]
  logic [N-1:0]  above;      // prefix OR of cand over lower positions
  logic [N-1:0]  pivot;      // one-hot lowest candidate
  logic [N-1:0]  below_new;  // positions below the moved pivot
  logic [N-1:0]  low_ones;
  logic [CW-1:0] n_low;

  always_comb begin
    cand = '0;
    for (int unsigned i = 1; i < N; i++) cand[i] = cur[i] & ~cur[i-1];
  end

  // Parallel prefix: above[i] = OR of cand[0 .. i-1] (Kogge-Stone levels).
  always_comb begin
    logic [N-1:0] pre;
    pre = cand << 1;
    for (int unsigned d = 1; d < N; d = d << 1) pre = pre | (pre << d);
    above = pre;
  end

  always_comb begin
    pivot     = cand & ~above;
    last      = (cand == '0);
    below_new = (pivot >> 1) - N'(1);
    if (last) below_new = '0;
    low_ones  = cur & below_new;
    n_low     = '0;
    for (int unsigned i = 0; i < N; i++) n_low = n_low + CW'(low_ones[i]);
    nxt = (cur & ~(pivot | below_new)) | (pivot >> 1) | (below_new & ~(below_new >> n_low));
    if (last) nxt = cur;
  end

endmodule
