// tb_parallel_counter: exhaustive self-checking testbench of the parallel
// counter for N = 8 and N = 5 (a size that is not a power of two).
module tb_parallel_counter;
  logic [7:0] in8;
  logic [3:0] c8;
  logic [4:0] in5;
  logic [2:0] c5;
  int checks = 0, failures = 0;

  parallel_counter #(.N(8)) dut8 (.in(in8), .count(c8));
  parallel_counter #(.N(5)) dut5 (.in(in5), .count(c5));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int v = 0; v < 256; v++) begin
      in8 = 8'(v);
      in5 = 5'(v);
      #1;
      n = 0;
      for (int b = 0; b < 8; b++) n += (v >> b) & 1;
      checks++;
      if (int'(c8) != n) begin failures++; $display("FAIL N=8 in=%b count=%0d", in8, c8); end
      n = 0;
      for (int b = 0; b < 5; b++) n += (v >> b) & 1;
      checks++;
      if (int'(c5) != n) begin failures++; $display("FAIL N=5 in=%b count=%0d", in5, c5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
