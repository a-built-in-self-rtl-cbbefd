// tb_repairable_mem: self-checking testbench of the memory with spare rows
// and columns. It fills the array, injects stuck-at bits, checks that reads
// show them, then loads a repair (one row, one column) and checks that the
// repaired row and column read back what was written through the spares,
// while untouched words still come from the main array.
module tb_repairable_mem;
  localparam int RW = 4, CW = 4, DW = 8, R = 2, C = 2, NF = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  logic we = 1'b0, re = 1'b0;
  logic [RW-1:0] row = '0;
  logic [CW-1:0] col = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic repair_clear = 1'b0, repair_load = 1'b0;
  logic [R-1:0] sol_row_valid = '0, rep_row_valid;
  logic [C-1:0] sol_col_valid = '0, rep_col_valid;
  logic [RW-1:0] sol_row [R], rep_row [R];
  logic [CW-1:0] sol_col [C], rep_col [C];
  logic [NF-1:0] inj_en = '0, inj_val = '0;
  logic [RW-1:0] inj_row [NF];
  logic [CW-1:0] inj_col [NF];
  logic [2:0]    inj_bit [NF];
  logic [DW-1:0] ref_m [256];
  int checks = 0, failures = 0;

  repairable_mem #(.NF(NF)) dut (.*);

  always #5 clk = ~clk;

  task automatic wr(input int r, input int c, input logic [DW-1:0] d);
    we = 1'b1; re = 1'b0; row = RW'(r); col = CW'(c); wdata = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd_check(input int r, input int c, input logic [DW-1:0] exp, input string what);
    re = 1'b1; row = RW'(r); col = CW'(c);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata != exp) begin
      failures++;
      $display("FAIL %s at row %0d col %0d: %h expected %h", what, r, c, rdata, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin inj_row[f] = '0; inj_col[f] = '0; inj_bit[f] = '0; end
    sol_row[0] = 4'd3; sol_row[1] = '0; sol_col[0] = 4'd9; sol_col[1] = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 256; a++) begin
      ref_m[a] = 8'($urandom);
      wr(a >> 4, a & 15, ref_m[a]);
    end
    for (int a = 0; a < 256; a += 7) rd_check(a >> 4, a & 15, ref_m[a], "plain read");
    // Stuck-at bits: row 3 col 2 bit 0 at !data, row 5 col 9 bit 7 at !data.
    inj_en = 4'b0011;
    inj_row[0] = 4'd3; inj_col[0] = 4'd2; inj_bit[0] = 3'd0; inj_val[0] = ~ref_m[8'h32][0];
    inj_row[1] = 4'd5; inj_col[1] = 4'd9; inj_bit[1] = 3'd7; inj_val[1] = ~ref_m[8'h59][7];
    rd_check(3, 2, ref_m[8'h32] ^ 8'h01, "stuck bit visible");
    rd_check(5, 9, ref_m[8'h59] ^ 8'h80, "stuck bit visible");
    // Repair row 3 and column 9.
    sol_row_valid = 2'b01; sol_col_valid = 2'b01;
    repair_load = 1'b1;
    @(negedge clk);
    repair_load = 1'b0;
    checks++;
    if (rep_row_valid != 2'b01 || rep_row[0] != 4'd3 || rep_col_valid != 2'b01 || rep_col[0] != 4'd9) begin
      failures++; $display("FAIL repair registers");
    end
    // Rewrite the whole array through the remapping and read it back.
    for (int a = 0; a < 256; a++) begin
      ref_m[a] = 8'($urandom);
      wr(a >> 4, a & 15, ref_m[a]);
    end
    for (int f = 0; f < 2; f++) inj_val[f] = ~inj_val[f];  // keep them harmful
    for (int a = 0; a < 256; a++) rd_check(a >> 4, a & 15, ref_m[a], "read after repair");
    // A stuck bit outside the repair is still seen.
    inj_en = 4'b0100;
    inj_row[2] = 4'd7; inj_col[2] = 4'd1; inj_bit[2] = 3'd3; inj_val[2] = ~ref_m[8'h71][3];
    rd_check(7, 1, ref_m[8'h71] ^ 8'h08, "unrepaired stuck bit");
    repair_clear = 1'b1;
    @(negedge clk);
    repair_clear = 1'b0;
    checks++;
    if (rep_row_valid != 0 || rep_col_valid != 0) begin failures++; $display("FAIL repair clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
