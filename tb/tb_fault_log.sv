// tb_fault_log: self-checking testbench of the fault address registers:
// records 20 addresses into 16 registers, reads them back, checks the count,
// the overflow flag and clearing.
module tb_fault_log;
  logic clk = 1'b0, rst_n = 1'b1;
  logic clear = 1'b0, we = 1'b0;
  logic [7:0] waddr, rd_addr;
  logic [3:0] rd_idx = '0;
  logic [15:0] count;
  logic overflow;
  logic [7:0] ref_a [20];
  int checks = 0, failures = 0;

  fault_log dut (.clk, .rst_n, .clear, .we, .waddr, .rd_idx, .rd_addr, .count, .overflow);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      ref_a[i] = 8'($urandom);
      we = 1'b1; waddr = ref_a[i];
      @(negedge clk);
      check(count == 16'(i + 1), "count");
      check(overflow == (i >= 16), "overflow");
    end
    we = 1'b0;
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i);
      #1;
      check(rd_addr == ref_a[i], "stored address");
    end
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(count == 0 && !overflow, "clear");
    we = 1'b1; waddr = 8'h5A;
    @(negedge clk);
    we = 1'b0; rd_idx = '0;
    #1;
    check(rd_addr == 8'h5A && count == 1, "first entry after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
