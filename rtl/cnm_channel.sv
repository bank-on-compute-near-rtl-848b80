// cnm_channel: one DRAM channel with compute-near-bank processing units.
//
// N_PU processing units, one per pair of banks (PU p serves bank 2p as its
// bank A and bank 2p+1 as its bank B), behind the channel's host command
// bus. Main configuration (HBM2): 16 banks, 8 PUs, 256-bit bank IO,
// S = 16 FP16 lanes, C = 32 instructions, R = 8 data registers.
//
// The DRAM banks themselves are outside this module: each bank's column
// port (act/pre/rd/wr, row, column, write data, read data one cycle after
// a read) is brought out as ports. In memory mode the host drives the
// addressed bank; in CnM mode ACT/PRE still come from the host (to all
// banks at once) while the column reads and writes of each bank pair come
// from its PU, at the column of the host's execute command.
//
// Host bus: cmd/cmd_ext/cmd_bank/cmd_row/cmd_col/cmd_wdata, one command per
// cycle (CMD_NOP when idle); host_rvalid/host_rdata return memory-mode
// reads. pu_done shows which PUs have reached EXIT; cnm_mode the mode.
// pu_ev_* strobe once per issued instruction, taken JUMP, NOP
// command, EXIT and ReLU, so a host can count what each PU did.
module cnm_channel
  import cnm_pkg::*;
#(
  parameter int unsigned N_PU   = 8,
  parameter int unsigned C      = 32,
  parameter int unsigned R      = 8,
  parameter int unsigned S      = 16,
  parameter int unsigned ROW_W  = 15,
  parameter int unsigned COL_W  = 5,
  localparam int unsigned N_BANKS = 2 * N_PU,
  localparam int unsigned IO_BITS = S * 16,
  localparam int unsigned BA_W    = (N_BANKS > 1) ? $clog2(N_BANKS) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  dram_cmd_e                       cmd,
  input  logic                            cmd_ext,
  input  logic [BA_W-1:0]                 cmd_bank,
  input  logic [ROW_W-1:0]                cmd_row,
  input  logic [COL_W-1:0]                cmd_col,
  input  logic [IO_BITS-1:0]              cmd_wdata,
  output logic                            host_rvalid,
  output logic [IO_BITS-1:0]              host_rdata,
  output logic                            cnm_mode,
  output logic [N_PU-1:0]                 pu_done,
  // Per-PU event strobes, one cycle each, for performance counting
  output logic [N_PU-1:0]                 pu_ev_issue,
  output logic [N_PU-1:0]                 pu_ev_jump,
  output logic [N_PU-1:0]                 pu_ev_nop,
  output logic [N_PU-1:0]                 pu_ev_exit,
  output logic [N_PU-1:0]                 pu_ev_relu,
  // DRAM bank ports
  output logic [N_BANKS-1:0]              bank_act,
  output logic [N_BANKS-1:0]              bank_pre,
  output logic [N_BANKS-1:0]              bank_rd,
  output logic [N_BANKS-1:0]              bank_wr,
  output logic [ROW_W-1:0]                bank_row,
  output logic [N_BANKS-1:0][COL_W-1:0]   bank_col,
  output logic [N_BANKS-1:0][IO_BITS-1:0] bank_wdata,
  input  logic [N_BANKS-1:0][IO_BITS-1:0] bank_rdata
);
  logic                pu_start, reg_wr_en, trig;
  reg_space_e          reg_wr_space;
  logic [4:0]          reg_wr_idx;
  logic [IO_BITS-1:0]  reg_wr_data;
  logic [COL_W-1:0]    trig_col;
  logic [N_BANKS-1:0]  h_rd, h_wr;
  logic [COL_W-1:0]    h_col;
  logic [IO_BITS-1:0]  h_wdata;

  cnm_host_if #(.N_BANKS(N_BANKS), .IO_BITS(IO_BITS), .ROW_W(ROW_W), .COL_W(COL_W)) u_host_if (
    .clk, .rst_n, .cmd, .cmd_ext, .cmd_bank, .cmd_row, .cmd_col, .cmd_wdata,
    .host_rvalid, .host_rdata, .cnm_mode, .pu_start,
    .reg_wr_en, .reg_wr_space, .reg_wr_idx, .reg_wr_data, .trig, .trig_col,
    .bank_act, .bank_pre, .bank_rd(h_rd), .bank_wr(h_wr), .bank_row,
    .bank_col(h_col), .bank_wdata(h_wdata), .bank_rdata);

  for (genvar p = 0; p < int'(N_PU); p++) begin : g_pu
    logic               a_rd, a_wr, b_rd, b_wr;
    logic [COL_W-1:0]   a_col, b_col;
    logic [IO_BITS-1:0] a_wdata, b_wdata;

    cnm_pu #(.C(C), .R(R), .S(S), .COL_W(COL_W)) u_pu (
      .clk, .rst_n, .start(pu_start),
      .reg_wr_en, .reg_wr_space, .reg_wr_idx, .reg_wr_data,
      .trig, .trig_col, .done(pu_done[p]),
      .bank_a_rd(a_rd), .bank_a_wr(a_wr), .bank_a_col(a_col), .bank_a_wdata(a_wdata),
      .bank_a_rdata(bank_rdata[2*p]),
      .bank_b_rd(b_rd), .bank_b_wr(b_wr), .bank_b_col(b_col), .bank_b_wdata(b_wdata),
      .bank_b_rdata(bank_rdata[2*p+1]),
      .ev_issue(pu_ev_issue[p]), .ev_jump(pu_ev_jump[p]), .ev_nop(pu_ev_nop[p]),
      .ev_exit(pu_ev_exit[p]), .ev_relu(pu_ev_relu[p]));

    // Bank port multiplexing between host (memory mode) and PU (CnM mode).
    always_comb begin
      if (cnm_mode) begin
        bank_rd[2*p]      = a_rd;
        bank_wr[2*p]      = a_wr;
        bank_col[2*p]     = a_col;
        bank_wdata[2*p]   = a_wdata;
        bank_rd[2*p+1]    = b_rd;
        bank_wr[2*p+1]    = b_wr;
        bank_col[2*p+1]   = b_col;
        bank_wdata[2*p+1] = b_wdata;
      end else begin
        bank_rd[2*p]      = h_rd[2*p];
        bank_wr[2*p]      = h_wr[2*p];
        bank_col[2*p]     = h_col;
        bank_wdata[2*p]   = h_wdata;
        bank_rd[2*p+1]    = h_rd[2*p+1];
        bank_wr[2*p+1]    = h_wr[2*p+1];
        bank_col[2*p+1]   = h_col;
        bank_wdata[2*p+1] = h_wdata;
      end
    end
  end

  // A PU column access must not coincide with a host ACT/PRE to its bank.
  a_no_row_cmd_clash: assert property (@(posedge clk) disable iff (!rst_n)
    ((bank_act | bank_pre) & (bank_rd | bank_wr)) == '0);
endmodule
