// cnm_srf: scalar register file (SRF) of the PU.
//
// Holds R scalar FP16 values for multiplication (SRF_M) and R for addition
// (SRF_A), R = 8 in the main configuration. The arithmetic unit broadcasts
// a scalar to all SIMD lanes. One write port serves both host writes and
// pipeline writebacks: a write carries an S-lane vector and stores lane k
// into scalar wr_grp*S + k of the selected half (wr_sel = 0: SRF_M,
// 1: SRF_A) for every such index below R. This grouping is this
// implementation's choice. NRD asynchronous read ports return
// half rd_sel[i], entry rd_idx[i]; an out-of-range index reads zero.
// The array is not reset.
module cnm_srf #(
  parameter int unsigned R     = 8,
  parameter int unsigned S     = 16,
  parameter int unsigned IDX_W = 5,
  parameter int unsigned NRD   = 3,
  localparam int unsigned RW   = (R > 1) ? $clog2(R) : 1
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic                  wr_sel,
  input  logic [IDX_W-1:0]      wr_grp,
  input  logic [S*16-1:0]       wr_data,
  input  logic [NRD-1:0]        rd_sel,
  input  logic [NRD-1:0][IDX_W-1:0] rd_idx,
  output logic [NRD-1:0][15:0]  rd_data
);
  logic [15:0] srf_m [R];
  logic [15:0] srf_a [R];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int k = 0; k < int'(S); k++) begin
        if (int'(wr_grp) * int'(S) + k < int'(R)) begin
          if (wr_sel) srf_a[int'(wr_grp) * int'(S) + k] <= wr_data[16*k +: 16];
          else        srf_m[int'(wr_grp) * int'(S) + k] <= wr_data[16*k +: 16];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NRD); i++) begin
      if (int'(rd_idx[i]) >= int'(R))
        rd_data[i] = '0;
      else if (rd_sel[i])
        rd_data[i] = srf_a[rd_idx[i][RW-1:0]];
      else
        rd_data[i] = srf_m[rd_idx[i][RW-1:0]];
    end
  end
endmodule
