// parallel_counter: counts the ones in an N-bit vector in one combinational
// step. The must-repair analyzer uses it to count how many fault-list CAM
// entries matched the incoming fault address. It is written as a balanced
// adder tree: level 0 holds the single bits, each further level adds pairs of
// partial sums, so the depth grows with log2(N).
//
// Interface: in[N-1:0] -> count (clog2(N+1) bits), purely combinational.
//
// The document names a parallel counter and what it counts; the adder-tree
// structure is this design's own choice.
module parallel_counter #(
  parameter int unsigned N  = 8,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned P  = 1 << LV
) (
  input  logic [N-1:0]  in,
  output logic [CW-1:0] count
);

  // sums[l][j] is the partial count of leaves j*2^l .. (j+1)*2^l-1.
  logic [CW-1:0] sums [LV+1][P];

  always_comb begin
    for (int unsigned l = 0; l <= LV; l++)
      for (int unsigned j = 0; j < P; j++) sums[l][j] = '0;
    for (int unsigned j = 0; j < N; j++) sums[0][j] = CW'(in[j]);
    for (int unsigned l = 1; l <= LV; l++)
      for (int unsigned j = 0; j < (P >> l); j++)
        sums[l][j] = sums[l-1][2*j] + sums[l-1][2*j+1];
    count = sums[LV][0];
  end

endmodule
