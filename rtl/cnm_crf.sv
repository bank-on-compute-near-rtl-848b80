// cnm_crf: control register file (CRF), the PU's local instruction memory.
//
// Holds C 32-bit instruction words (C = 32 in the main configuration).
// The host fills it through the PU register space: one write of a bank-IO
// wide word (IO_BITS = 256) stores IO_BITS/32 = 8 consecutive instructions,
// starting at entry wr_idx*8; entries past C are dropped. Writing whole IO
// words and the 8-per-write packing are this implementation's choices.
// The control unit reads one entry asynchronously (rd_addr -> rd_data in
// the same cycle); a write becomes visible the cycle after it is made.
// The array is not reset: the host writes the program before running it.
module cnm_crf #(
  parameter int unsigned C       = 32,
  parameter int unsigned IO_BITS = 256,
  parameter int unsigned IDX_W   = 5,
  localparam int unsigned AW     = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned PER_WR = IO_BITS / 32
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  logic [IO_BITS-1:0] wr_data,
  input  logic [AW-1:0]      rd_addr,
  output logic [31:0]        rd_data
);
  logic [31:0] mem [C];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int k = 0; k < int'(PER_WR); k++) begin
        if (int'(wr_idx) * int'(PER_WR) + k < int'(C))
          mem[int'(wr_idx) * int'(PER_WR) + k] <= wr_data[32*k +: 32];
      end
    end
  end

  assign rd_data = mem[rd_addr];
endmodule
