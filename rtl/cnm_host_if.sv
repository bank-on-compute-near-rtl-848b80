// cnm_host_if: channel-side interface between the host's DRAM command bus
// and the banks and PUs of one channel.
//
// The host keeps using standard DRAM commands (ACT, PRE, RD, WR). The
// address carries one extra most significant bit, cmd_ext, which selects
// between bank space (0) and the PU register space (1), as the design
// prescribes. A memory-mapped mode register switches the channel between
//   memory mode: commands go to the addressed bank only; PUs are idle and
//                RD data returns to the host one cycle later;
//   CnM mode   : ACT/PRE go to all banks at once; RD/WR in bank space
//                become an execute trigger for every PU (trig, trig_col);
//                WR in register space writes the same register-file entry
//                in every PU (reg_wr_*).
// Register space decode (this implementation's choice): cmd_row[2:0]
// selects the register file (reg_space_e), cmd_col the entry. A WR to
// RS_MODE sets the mode from wdata[0] in either mode; entering CnM mode
// pulses pu_start for one cycle. Register-space writes other than the mode
// register are ignored in memory mode; register-space reads return nothing.
// Outputs are combinational from the command inputs (same cycle), except
// mode, pu_start and the read-return path, which are registered.
module cnm_host_if
  import cnm_pkg::*;
#(
  parameter int unsigned N_BANKS = 16,
  parameter int unsigned IO_BITS = 256,
  parameter int unsigned ROW_W   = 15,
  parameter int unsigned COL_W   = 5,
  localparam int unsigned BA_W   = (N_BANKS > 1) ? $clog2(N_BANKS) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // host command bus
  input  dram_cmd_e                       cmd,
  input  logic                            cmd_ext,
  input  logic [BA_W-1:0]                 cmd_bank,
  input  logic [ROW_W-1:0]                cmd_row,
  input  logic [COL_W-1:0]                cmd_col,
  input  logic [IO_BITS-1:0]              cmd_wdata,
  output logic                            host_rvalid,
  output logic [IO_BITS-1:0]              host_rdata,
  // mode
  output logic                            cnm_mode,
  output logic                            pu_start,
  // PU side
  output logic                            reg_wr_en,
  output reg_space_e                      reg_wr_space,
  output logic [4:0]                      reg_wr_idx,
  output logic [IO_BITS-1:0]              reg_wr_data,
  output logic                            trig,
  output logic [COL_W-1:0]                trig_col,
  // bank side (host-originated part)
  output logic [N_BANKS-1:0]              bank_act,
  output logic [N_BANKS-1:0]              bank_pre,
  output logic [N_BANKS-1:0]              bank_rd,
  output logic [N_BANKS-1:0]              bank_wr,
  output logic [ROW_W-1:0]                bank_row,
  output logic [COL_W-1:0]                bank_col,
  output logic [IO_BITS-1:0]              bank_wdata,
  input  logic [N_BANKS-1:0][IO_BITS-1:0] bank_rdata
);
  logic            mode_wr;
  logic            rd_pending;
  logic [BA_W-1:0] rd_bank;
  logic [N_BANKS-1:0] sel;

  assign mode_wr = (cmd == CMD_WR) && cmd_ext && (cmd_row[2:0] == 3'(RS_MODE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnm_mode   <= 1'b0;
      pu_start   <= 1'b0;
      rd_pending <= 1'b0;
      rd_bank    <= '0;
    end else begin
      pu_start   <= mode_wr && cmd_wdata[0] && !cnm_mode;
      if (mode_wr) cnm_mode <= cmd_wdata[0];
      rd_pending <= !cnm_mode && !cmd_ext && (cmd == CMD_RD);
      rd_bank    <= cmd_bank;
    end
  end

  assign host_rvalid = rd_pending;
  assign host_rdata  = bank_rdata[rd_bank];

  always_comb begin
    sel = cnm_mode ? '1 : (N_BANKS'(1) << cmd_bank);
    bank_row   = cmd_row;
    bank_col   = cmd_col;
    bank_wdata = cmd_wdata;
    bank_act   = (!cmd_ext && cmd == CMD_ACT) ? sel : '0;
    bank_pre   = (!cmd_ext && cmd == CMD_PRE) ? sel : '0;
    bank_rd    = (!cnm_mode && !cmd_ext && cmd == CMD_RD) ? sel : '0;
    bank_wr    = (!cnm_mode && !cmd_ext && cmd == CMD_WR) ? sel : '0;

    trig       = cnm_mode && !cmd_ext && (cmd == CMD_RD || cmd == CMD_WR);
    trig_col   = cmd_col;

    reg_wr_en    = cnm_mode && cmd_ext && (cmd == CMD_WR) && (cmd_row[2:0] != 3'(RS_MODE));
    reg_wr_space = reg_space_e'(cmd_row[2:0]);
    reg_wr_idx   = 5'(cmd_col);
    reg_wr_data  = cmd_wdata;
  end
endmodule
