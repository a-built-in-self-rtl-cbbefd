// Self-checking testbench for signature_analyzer: a small address space, a
// reference pattern and compactor model in the testbench, clean passes,
// every single-word corruption, the verify flag and clear.
module tb_signature_analyzer;
  localparam int N = 8, AW = 4, WORDS = 2**AW;
  localparam logic [7:0] TAPS = 8'b1011_1000, SEED = 8'b0011_0010;

  logic clk = 1'b0, rst_n = 1'b1;
  logic clear = 1'b0, en = 1'b0, last = 1'b0, verify = 1'b0;
  logic [N-1:0] data = '0, signature;
  logic ok_test, ok_verify;
  logic [N-1:0] words [WORDS];
  int checks = 0, failures = 0;

  signature_analyzer #(.N(N), .AW(AW), .MISR_TAPS(TAPS), .LFSR_TAPS(TAPS),
                       .LFSR_SEED(SEED), .SWAP_M(1), .SWAP_X(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N-1:0] model_step(input logic [N-1:0] s, input logic [N-1:0] d);
    logic fb;
    fb = 1'b0;
    for (int i = 0; i < N; i++) if (TAPS[i]) fb ^= s[i];
    return ((s << 1) | N'(fb)) ^ d;
  endfunction

  // Written words: LFSR state with bits 0 and 1 exchanged when bit 3 is 0.
  task automatic make_words();
    logic [N-1:0] st, w;
    logic fb;
    st = SEED;
    for (int a = 0; a < WORDS; a++) begin
      w = st;
      if (st[3] == 1'b0) begin w[0] = st[1]; w[1] = st[0]; end
      words[a] = w;
      fb = 1'b0;
      for (int i = 0; i < N; i++) if (TAPS[i]) fb ^= st[i];
      st = (st << 1) | N'(fb);
    end
  endtask

  // One read pass from the top address down; word bad_a gets XOR err.
  task automatic pass(input bit ver, input int bad_a, input logic [N-1:0] err, input bit gaps);
    logic [N-1:0] m;
    m = '0;
    for (int a = WORDS - 1; a >= 0; a--) begin
      if (gaps && (a % 3 == 0)) begin en = 1'b0; @(negedge clk); end
      en = 1'b1; verify = ver; last = (a == 0);
      data = words[a] ^ ((a == bad_a) ? err : '0);
      @(negedge clk);
      m = model_step(m, data);
      if (a != 0) check(signature == m, $sformatf("running signature at word %0d", a));
      else        check(signature == '0, "register restarts after the last word");
    end
    en = 1'b0; last = 1'b0; verify = 1'b0;
  endtask

  initial begin
    #200000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_words();
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    @(negedge clk);
    check(!ok_test && !ok_verify && signature == '0, "reset state");

    pass(1'b0, -1, '0, 1'b0);
    check(ok_test && !ok_verify, "clean first pass matches the golden signature");
    pass(1'b1, -1, '0, 1'b1);
    check(ok_test && ok_verify, "clean verify pass, with idle gaps, matches");

    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(!ok_test && !ok_verify && signature == '0, "clear");

    for (int a = 0; a < WORDS; a++)
      for (int k = 0; k < 3; k++) begin
        logic [N-1:0] err;
        err = (k == 0) ? N'(1) << (a % N) : N'($urandom_range(1, 2**N - 1));
        pass(1'b0, a, err, 1'b0);
        check(!ok_test, $sformatf("wrong word %0d (xor %h) detected", a, err));
        pass(1'b1, a, err, 1'b0);
        check(!ok_verify, $sformatf("wrong word %0d detected in verify pass", a));
        pass(1'b0, -1, '0, 1'b0);
        check(ok_test && !ok_verify, "clean pass after a failing one");
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
