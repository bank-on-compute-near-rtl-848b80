// cnm_grf: general (vector) register file of the PU. Two instances form
// GRF_A and GRF_B, interfaced to banks A and B respectively.
//
// Holds R vectors of S FP16 words (R = 8, S = 16: 256-bit entries matching
// the bank IO). One synchronous write port, shared by host writes and
// pipeline writebacks, and NRD asynchronous read ports (operands and the
// MAC accumulator). An out-of-range read index returns zero. The array is
// not reset.
module cnm_grf #(
  parameter int unsigned R     = 8,
  parameter int unsigned S     = 16,
  parameter int unsigned IDX_W = 5,
  parameter int unsigned NRD   = 4,
  localparam int unsigned RW   = (R > 1) ? $clog2(R) : 1
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic [IDX_W-1:0]           wr_idx,
  input  logic [S*16-1:0]            wr_data,
  input  logic [NRD-1:0][IDX_W-1:0]  rd_idx,
  output logic [NRD-1:0][S*16-1:0]   rd_data
);
  logic [S*16-1:0] mem [R];

  always_ff @(posedge clk) begin
    if (wr_en && (int'(wr_idx) < int'(R))) mem[wr_idx[RW-1:0]] <= wr_data;
  end

  always_comb begin
    for (int i = 0; i < int'(NRD); i++)
      rd_data[i] = (int'(rd_idx[i]) < int'(R)) ? mem[rd_idx[i][RW-1:0]] : '0;
  end
endmodule
