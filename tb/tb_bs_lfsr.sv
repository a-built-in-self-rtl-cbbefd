// tb_bs_lfsr: self-checking testbench of the bit-swapping LFSR.
// An independent model of the register (feedback x^8 + x^6 + x^5 + x^4 + 1,
// written out bit by bit) checks every forward step over a full period of
// 255 states, the swap of stages 1 and 2 under stage 4, backward stepping
// through the same states in reverse, and reload of the seed.
module tb_bs_lfsr;
  logic clk = 1'b0, rst_n = 1'b1;
  logic load = 1'b0, step = 1'b0, dir_down = 1'b0;
  logic [7:0] state, pattern;
  int checks = 0, failures = 0;
  logic [7:0] hist [256];
  logic [7:0] m, exp_pat;

  bs_lfsr dut (.clk, .rst_n, .load, .step, .dir_down, .state, .pattern);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state=%b pattern=%b", what, state, pattern);
    end
  endtask

  function automatic logic [7:0] ref_step(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] ref_pat(input logic [7:0] s);
    // Stage 4 (bit 3) = 0 swaps stages 1 and 2 (bits 0 and 1).
    return s[3] ? s : {s[7:2], s[0], s[1]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == 8'b0011_0010, "seed after reset");
    m = state;
    // Forward over one period.
    step = 1'b1;
    for (int i = 0; i < 255; i++) begin
      hist[i] = state;
      exp_pat = ref_pat(state);
      check(pattern == exp_pat, "swap pattern");
      @(negedge clk);
      m = ref_step(m);
      check(state == m, "forward step");
      if (i < 254) check(state != 8'b0011_0010, "period not shorter than 255");
    end
    check(state == 8'b0011_0010, "period 255");
    // Backward: visit the states in reverse order.
    dir_down = 1'b1;
    for (int i = 254; i >= 0; i--) begin
      @(negedge clk);
      check(state == hist[i], "backward step");
    end
    // Hold and reload.
    step = 1'b0;
    @(negedge clk);
    check(state == hist[0], "hold without step");
    step = 1'b1; dir_down = 1'b0;
    repeat (7) @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0; step = 1'b0;
    check(state == 8'b0011_0010, "reload seed over step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
