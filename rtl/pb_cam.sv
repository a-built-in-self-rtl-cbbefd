// pb_cam: precomputation-based content addressable memory (PB-CAM).
//
// A search is split in two parts. A parameter extractor reduces the search
// key to a short k-bit parameter, which is compared in parallel with the
// parameters stored next to every entry (the parameter memory). Only the
// entries whose parameter matched take part in the second, full n-bit
// comparison against the data memory, so most wide comparisons are skipped.
// The match result is the same as that of a plain CAM; the saving is in
// comparison activity, which 'param_hit' exposes.
//
// The parameter extractor is the count of ones in the word, k = clog2(n+1)
// bits. Each entry has a valid bit; only valid entries can match.
//
// Interface: one write port (we, widx, wdata) that also sets the entry's
// valid bit, a valid-vector load (vld_load, vld_in) used to clear,
// invalidate or restore entries, and one combinational search port (key ->
// match, param_hit). rd_idx reads an entry out combinationally, and
// 'entries' shows the whole data memory. Writes and
// valid loads take effect at the next clock edge; a write in the same cycle
// as a valid load wins for its own entry.
//
// Follows the document: parameter extractor, parameter memory P0..P(m-1),
// data memory of m n-bit words, second-part comparison only where the first
// part matched. This design's own choices: the ones-count extractor, the
// valid bits and the port set.
module pb_cam #(
  parameter int unsigned ENTRIES = 4,   // m
  parameter int unsigned DW      = 4,   // n
  localparam int unsigned KW     = $clog2(DW + 1),
  localparam int unsigned IW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [IW-1:0]      widx,
  input  logic [DW-1:0]      wdata,
  input  logic               vld_load,
  input  logic [ENTRIES-1:0] vld_in,
  input  logic [DW-1:0]      key,
  output logic [ENTRIES-1:0] match,
  output logic [ENTRIES-1:0] param_hit,
  output logic [ENTRIES-1:0] valid,
  input  logic [IW-1:0]      rd_idx,
  output logic [DW-1:0]      rd_data,
  output logic [DW-1:0]      entries [ENTRIES]
);

  logic [DW-1:0] data_mem  [ENTRIES];
  logic [KW-1:0] param_mem [ENTRIES];
  logic [KW-1:0] key_param;

  function automatic logic [KW-1:0] extract(input logic [DW-1:0] w);
    logic [KW-1:0] n;
    n = '0;
    for (int unsigned i = 0; i < DW; i++) n = n + KW'(w[i]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        data_mem[i]  <= '0;
        param_mem[i] <= '0;
      end
    end else begin
      if (vld_load) valid <= vld_in;
      if (we) begin
        data_mem[widx]  <= wdata;
        param_mem[widx] <= extract(wdata);
        valid[widx]     <= 1'b1;
      end
    end
  end

  always_comb begin
    key_param = extract(key);
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      param_hit[i] = valid[i] && (param_mem[i] == key_param);
      // Second part: full comparison only for entries that passed the first.
      match[i] = param_hit[i] && (data_mem[i] == key);
    end
  end

  assign rd_data = data_mem[rd_idx];
  assign entries = data_mem;

  initial assert (ENTRIES >= 1 && DW >= 1) else $error("pb_cam: bad size");

endmodule
