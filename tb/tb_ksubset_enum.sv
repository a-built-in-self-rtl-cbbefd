// tb_ksubset_enum: self-checking testbench of the k-subset enumerator.
// For four bits with two ones it checks the exact sequence of repair
// strategies RRCC, RCRC, RCCR, CRRC, CRCR, CCRR (1100 ... 0011). For six bits
// it walks every count of ones and checks that each step keeps the count,
// goes to the next smaller such number (found by searching downward) and
// that the walk visits C(6,k) strategies before 'last'.
module tb_ksubset_enum;
  logic [3:0] cur4, nxt4;
  logic       last4;
  logic [5:0] cur6, nxt6;
  logic       last6;
  int checks = 0, failures = 0;
  logic [3:0] table1 [6] = '{4'b1100, 4'b1010, 4'b1001, 4'b0110, 4'b0101, 4'b0011};

  ksubset_enum #(.N(4)) dut4 (.cur(cur4), .nxt(nxt4), .last(last4));
  ksubset_enum #(.N(6)) dut6 (.cur(cur6), .nxt(nxt6), .last(last6));

  function automatic int ones(input int v);
    int n = 0;
    for (int b = 0; b < 16; b++) n += (v >> b) & 1;
    return n;
  endfunction

  function automatic int binom(input int n, input int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int visits, expect_next;
    for (int i = 0; i < 6; i++) begin
      cur4 = table1[i];
      #1;
      checks++;
      if (last4 != (i == 5)) begin failures++; $display("FAIL last at %b", cur4); end
      if (i < 5) begin
        checks++;
        if (nxt4 !== table1[i+1]) begin
          failures++;
          $display("FAIL after %b got %b, expected %b", cur4, nxt4, table1[i+1]);
        end
      end
    end
    for (int k = 0; k <= 6; k++) begin
      cur6 = 6'(((1 << k) - 1) << (6 - k));
      visits = 1;
      #1;
      while (!last6 && visits < 100) begin
        expect_next = int'(cur6) - 1;
        while (expect_next >= 0 && ones(expect_next) != k) expect_next--;
        checks++;
        if (int'(nxt6) != expect_next) begin
          failures++;
          $display("FAIL N=6 after %b got %b expected %0d", cur6, nxt6, expect_next);
        end
        cur6 = nxt6;
        visits++;
        #1;
      end
      checks++;
      if (visits != binom(6, k)) begin
        failures++;
        $display("FAIL k=%0d visited %0d strategies", k, visits);
      end
      checks++;
      if (int'(cur6) != (1 << k) - 1) begin failures++; $display("FAIL k=%0d last=%b", k, cur6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
