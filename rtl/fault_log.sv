// fault_log: fault address registers. Every faulty word address that the
// memory test reports during the first test pass is written into the next of
// ENTRIES registers, so the list of failing addresses can be streamed out
// after the test through the read port. Further faults once the registers are
// full are counted but not stored, and 'overflow' is set.
//
// Interface: clear empties the log; we/waddr record one address per clock;
// rd_idx selects the register shown on rd_addr (combinational). 'count' is
// the number of faults seen since clear, saturating at its maximum.
//
// The document stores fault addresses in registers that can be streamed out
// after the test; the sixteen 8-bit registers match the worked example. The
// saturating count and the overflow flag are this design's own choice.
module fault_log #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned AW      = bisr_pkg::ADDR_W,
  localparam int unsigned IW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned CW     = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] rd_idx,
  output logic [AW-1:0] rd_addr,
  output logic [CW-1:0] count,
  output logic          overflow
);

  logic [AW-1:0] regs [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
      for (int unsigned i = 0; i < ENTRIES; i++) regs[i] <= '0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (we) begin
      if (count < CW'(ENTRIES)) regs[count[IW-1:0]] <= waddr;
      else                      overflow <= 1'b1;
      if (count != '1) count <= count + CW'(1);
    end
  end

  assign rd_addr = regs[rd_idx];

endmodule
