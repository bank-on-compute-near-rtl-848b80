// dram_bank_model: behavioural model of one DRAM bank for simulation only
// (kind: behavioural model; a real bank is a memory array outside the
// design). It keeps MODEL_ROWS rows of 2**COL_W columns, each one bank-IO
// word wide; the row address is taken modulo MODEL_ROWS. ACT opens a row,
// PRE closes it; RD returns the column of the open row on rdata in the
// next cycle; WR writes it. A column access with no open row, or an ACT
// to an open bank, increments `errors`.
module dram_bank_model #(
  parameter int unsigned ROW_W      = 15,
  parameter int unsigned COL_W      = 5,
  parameter int unsigned IO_BITS    = 256,
  parameter int unsigned MODEL_ROWS = 4
) (
  input  logic               clk,
  input  logic               act,
  input  logic               pre,
  input  logic               rd,
  input  logic               wr,
  input  logic [ROW_W-1:0]   row,
  input  logic [COL_W-1:0]   col,
  input  logic [IO_BITS-1:0] wdata,
  output logic [IO_BITS-1:0] rdata
);
  logic [IO_BITS-1:0] mem [MODEL_ROWS][2**COL_W];
  logic  is_open = 1'b0;
  int    open_row = 0;
  int    errors = 0;

  initial begin
    for (int r = 0; r < int'(MODEL_ROWS); r++)
      for (int c = 0; c < 2**COL_W; c++) mem[r][c] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (act) begin
      if (is_open) errors++;
      is_open  <= 1'b1;
      open_row <= int'(row) % int'(MODEL_ROWS);
    end
    if (pre) is_open <= 1'b0;
    if (rd || wr) begin
      if (!is_open) errors++;
    end
    if (rd) rdata <= mem[open_row][col];
    if (wr) mem[open_row][col] <= wdata;
  end
endmodule
