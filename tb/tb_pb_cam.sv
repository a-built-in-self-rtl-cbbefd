// tb_pb_cam: self-checking testbench of the precomputation-based CAM with
// 8 entries of 6 bits. A reference model (arrays of words and valid bits)
// follows random writes, valid-vector loads and searches. For every search
// it checks the match vector, the first-part parameter hits (valid entries
// with the same count of ones as the key) and the read port, and it counts
// how often the first part filtered out a valid entry.
module tb_pb_cam;
  localparam int E = 8, W = 6;
  logic clk = 1'b0, rst_n = 1'b1;
  logic we = 1'b0, vld_load = 1'b0;
  logic [2:0] widx = '0, rd_idx = '0;
  logic [W-1:0] wdata = '0, key = '0, rd_data;
  logic [E-1:0] vld_in = '0, match, param_hit, valid;
  logic [W-1:0] entries [E];
  logic [W-1:0] ref_d [E];
  logic [E-1:0] ref_v;
  int checks = 0, failures = 0, filtered = 0, matched = 0;

  pb_cam #(.ENTRIES(E), .DW(W)) dut (
    .clk, .rst_n, .we, .widx, .wdata, .vld_load, .vld_in, .key,
    .match, .param_hit, .valid, .rd_idx, .rd_data, .entries);

  always #5 clk = ~clk;

  function automatic int ones(input logic [W-1:0] v);
    int n = 0;
    for (int b = 0; b < W; b++) n += v[b];
    return n;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [E-1:0] exp_m, exp_p;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_v = '0;
    for (int i = 0; i < E; i++) ref_d[i] = '0;
    for (int it = 0; it < 2000; it++) begin
      // random operation
      we = 1'b0; vld_load = 1'b0;
      case ($urandom_range(0, 9))
        0, 1, 2, 3: begin
          we = 1'b1; widx = 3'($urandom); wdata = W'($urandom_range(0, 15));
        end
        4: begin
          vld_load = 1'b1; vld_in = E'($urandom);
        end
        default: ;
      endcase
      // search with a key that often equals a stored word
      key = ($urandom_range(0, 1) == 1) ? ref_d[$urandom_range(0, E-1)] : W'($urandom_range(0, 15));
      rd_idx = 3'($urandom);
      #1;
      for (int i = 0; i < E; i++) begin
        exp_p[i] = ref_v[i] && (ones(ref_d[i]) == ones(key));
        exp_m[i] = ref_v[i] && (ref_d[i] == key);
        if (ref_v[i] && !exp_p[i]) filtered++;
      end
      if (exp_m != 0) matched++;
      checks++;
      if (match != exp_m) begin failures++; $display("FAIL match %b expected %b", match, exp_m); end
      checks++;
      if (param_hit != exp_p) begin failures++; $display("FAIL param_hit %b expected %b", param_hit, exp_p); end
      checks++;
      if (rd_data != ref_d[rd_idx] || entries[rd_idx] != ref_d[rd_idx] || valid != ref_v) begin
        failures++; $display("FAIL read port / valid");
      end
      @(negedge clk);
      if (vld_load) ref_v = vld_in;
      if (we) begin ref_d[widx] = wdata; ref_v[widx] = 1'b1; end
    end
    checks++;
    if (filtered == 0 || matched == 0) begin
      failures++; $display("FAIL coverage filtered=%0d matched=%0d", filtered, matched);
    end
    $display("first part filtered %0d valid entries; %0d searches matched", filtered, matched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
