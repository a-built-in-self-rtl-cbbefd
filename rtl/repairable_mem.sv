// repairable_mem: the word-oriented memory under test, with its spare rows
// and spare columns and the address remapping that puts them to use.
//
// The main array holds 2^ROW_W rows of 2^COL_W words of DATA_W bits; a word
// address is {row, column}. R spare rows each replace a whole row (all its
// words); C spare columns each replace one word column in every row, so a
// word with several bad bits is repaired by one spare. After the analysis,
// repair_load copies the solution (repair row and column addresses with
// their valid bits) into the repair registers. From then on every access
// whose row is repaired goes to that spare row, else every access whose
// column is repaired goes to that spare column, else to the main array.
//
// Defects are modelled by NF stuck-at entries (row, column, bit, value) that
// force a bit of a main-array word when it is read. They stand for the
// physical defects of a real array and are meant for simulation; spare cells
// are taken to be defect-free.
//
// Interface and timing: one request per clock. A write (req.we) stores
// req.wdata at the rising edge; a read (req.re) returns the word on rdata
// one clock later. repair_clear clears the repair registers.
//
// Follows the document: word-oriented memory of 8-bit words with 8-bit
// addresses, faults replaced by spare elements after the analysis. This
// design's own choices: the row/column split, whole-word spare columns,
// row priority where a spare row and a spare column overlap, and the
// stuck-at defect model.
module repairable_mem #(
  parameter int unsigned ROW_W  = bisr_pkg::ROW_W,
  parameter int unsigned COL_W  = bisr_pkg::COL_W,
  parameter int unsigned DATA_W = bisr_pkg::DATA_W,
  parameter int unsigned R      = bisr_pkg::R_SPARE,
  parameter int unsigned C      = bisr_pkg::C_SPARE,
  parameter int unsigned NF     = 4,
  localparam int unsigned ROWS  = 1 << ROW_W,
  localparam int unsigned COLS  = 1 << COL_W,
  localparam int unsigned BW    = (DATA_W > 1) ? $clog2(DATA_W) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              re,
  input  logic [ROW_W-1:0]  row,
  input  logic [COL_W-1:0]  col,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  // repair registers
  input  logic              repair_clear,
  input  logic              repair_load,
  input  logic [R-1:0]      sol_row_valid,
  input  logic [ROW_W-1:0]  sol_row [R],
  input  logic [C-1:0]      sol_col_valid,
  input  logic [COL_W-1:0]  sol_col [C],
  output logic [R-1:0]      rep_row_valid,
  output logic [ROW_W-1:0]  rep_row [R],
  output logic [C-1:0]      rep_col_valid,
  output logic [COL_W-1:0]  rep_col [C],
  // stuck-at defects of the main array
  input  logic [NF-1:0]     inj_en,
  input  logic [ROW_W-1:0]  inj_row [NF],
  input  logic [COL_W-1:0]  inj_col [NF],
  input  logic [BW-1:0]     inj_bit [NF],
  input  logic [NF-1:0]     inj_val
);

  logic [DATA_W-1:0] main_arr [ROWS*COLS];
  logic [DATA_W-1:0] spare_r  [R*COLS];
  logic [DATA_W-1:0] spare_c  [C*ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_row_valid <= '0;
      rep_col_valid <= '0;
      for (int unsigned i = 0; i < R; i++) rep_row[i] <= '0;
      for (int unsigned i = 0; i < C; i++) rep_col[i] <= '0;
    end else if (repair_clear) begin
      rep_row_valid <= '0;
      rep_col_valid <= '0;
    end else if (repair_load) begin
      rep_row_valid <= sol_row_valid;
      rep_col_valid <= sol_col_valid;
      rep_row       <= sol_row;
      rep_col       <= sol_col;
    end
  end

  // Address remapping.
  logic        hit_r, hit_c;
  int unsigned sel_r, sel_c;

  always_comb begin
    hit_r = 1'b0;
    hit_c = 1'b0;
    sel_r = 0;
    sel_c = 0;
    for (int unsigned i = 0; i < R; i++)
      if (!hit_r && rep_row_valid[i] && rep_row[i] == row) begin
        hit_r = 1'b1;
        sel_r = i;
      end
    for (int unsigned i = 0; i < C; i++)
      if (!hit_c && rep_col_valid[i] && rep_col[i] == col) begin
        hit_c = 1'b1;
        sel_c = i;
      end
  end

  // Main-array word as read, with the stuck-at defects applied.
  logic [DATA_W-1:0] main_word;
  always_comb begin
    main_word = main_arr[{row, col}];
    for (int unsigned f = 0; f < NF; f++)
      if (inj_en[f] && inj_row[f] == row && inj_col[f] == col)
        main_word[inj_bit[f]] = inj_val[f];
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (hit_r)      spare_r[sel_r*COLS + int'(col)] <= wdata;
      else if (hit_c) spare_c[sel_c*ROWS + int'(row)] <= wdata;
      else            main_arr[{row, col}] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) begin
      if (hit_r)      rdata <= spare_r[sel_r*COLS + int'(col)];
      else if (hit_c) rdata <= spare_c[sel_c*ROWS + int'(row)];
      else            rdata <= main_word;
    end
  end

endmodule
