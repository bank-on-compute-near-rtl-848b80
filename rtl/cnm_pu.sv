// cnm_pu: compute-near-bank processing unit (PU), attached to two DRAM
// banks (A and B).
//
// Holds the four register files of the design (CRF with C instructions,
// SRF with R+R scalars, GRF_A and GRF_B with R vectors of S FP16 words),
// the S-lane arithmetic unit and the control unit. Main configuration:
// C = 32, R = 8, S = 16 (256-bit bank IO, HBM2).
//
// Host side: reg_wr_* writes one register-file entry (the host's PU
// register space, routed here by the channel interface); `start` restarts
// the program; `trig` with trig_col is an execute command that arrived at
// column trig_col of the open rows.
//
// Each issued instruction runs through five stages, one cycle each:
//   D  decode (trigger cycle): CU decodes; a bank source issues bank_*_rd
//      at trig_col
//   L  load: bank read data (bank_*_rdata, valid one cycle after the read)
//      and register operands are gathered and handed to the AU
//   M  multiply   A  add (the MAC accumulator is read from the GRF here)
//   W  writeback to a GRF, the SRF or a bank (bank_*_wr at trig_col)
// Stages an instruction does not need are passed through rather than
// skipped, so every instruction takes the same time; this keeps writes in
// order and is this implementation's choice. There is no hazard
// detection: a program separates dependent instructions with NOPs (a
// result is visible to the Load stage of an instruction triggered at least
// four cycles after the producer's trigger; MAC chains need only the
// two-cycle trigger spacing). Operand index fields address R entries;
// MAD's third source uses the second source's index. Banks are read and
// written at the column of the triggering command, in its open row.
module cnm_pu
  import cnm_pkg::*;
#(
  parameter int unsigned C       = 32,
  parameter int unsigned R       = 8,
  parameter int unsigned S       = 16,
  parameter int unsigned COL_W   = 5,
  localparam int unsigned IO_BITS = S * 16,
  localparam int unsigned IDX_W  = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  // host register writes and execution control
  input  logic               start,
  input  logic               reg_wr_en,
  input  reg_space_e         reg_wr_space,
  input  logic [IDX_W-1:0]   reg_wr_idx,
  input  logic [IO_BITS-1:0] reg_wr_data,
  input  logic               trig,
  input  logic [COL_W-1:0]   trig_col,
  output logic               done,
  // bank A
  output logic               bank_a_rd,
  output logic               bank_a_wr,
  output logic [COL_W-1:0]   bank_a_col,
  output logic [IO_BITS-1:0] bank_a_wdata,
  input  logic [IO_BITS-1:0] bank_a_rdata,
  // bank B
  output logic               bank_b_rd,
  output logic               bank_b_wr,
  output logic [COL_W-1:0]   bank_b_col,
  output logic [IO_BITS-1:0] bank_b_wdata,
  input  logic [IO_BITS-1:0] bank_b_rdata,
  // event pulses (for observation)
  output logic               ev_issue,
  output logic               ev_jump,
  output logic               ev_nop,
  output logic               ev_exit,
  output logic               ev_relu
);
  localparam int unsigned AW = (C > 1) ? $clog2(C) : 1;

  // ---------------- control unit and CRF ----------------
  logic [AW-1:0] pc;
  logic [31:0]   crf_data;
  logic          issue_valid;
  instr_t        issue_instr;

  cnm_crf #(.C(C), .IO_BITS(IO_BITS), .IDX_W(IDX_W)) u_crf (
    .clk, .wr_en(reg_wr_en && reg_wr_space == RS_CRF), .wr_idx(reg_wr_idx),
    .wr_data(reg_wr_data), .rd_addr(pc), .rd_data(crf_data));

  cnm_cu #(.C(C)) u_cu (
    .clk, .rst_n, .start, .trig, .pc, .crf_data, .issue_valid, .issue_instr,
    .done, .ev_jump, .ev_nop, .ev_exit);

  assign ev_issue = issue_valid;

  // ---------------- pipeline metadata ----------------
  typedef struct packed {
    logic             valid;
    instr_t           ins;
    logic [COL_W-1:0] col;
  } stage_t;

  stage_t st_l, st_m, st_a, st_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_l <= '0;
      st_m <= '0;
      st_a <= '0;
      st_w <= '0;
    end else begin
      st_l <= '{valid: issue_valid, ins: issue_instr, col: trig_col};
      st_m <= st_l;
      st_a <= st_m;
      st_w <= st_a;
    end
  end

  // Decode stage: bank reads at the trigger column.
  always_comb begin
    bank_a_rd = issue_valid && ((issue_instr.src0 == OPD_BANK_A) ||
                (issue_instr.src1 == OPD_BANK_A) ||
                (issue_instr.op == OP_MAD && issue_instr.src2 == OPD_BANK_A));
    bank_b_rd = issue_valid && ((issue_instr.src0 == OPD_BANK_B) ||
                (issue_instr.src1 == OPD_BANK_B) ||
                (issue_instr.op == OP_MAD && issue_instr.src2 == OPD_BANK_B));
  end

  // ---------------- register files ----------------
  logic [2:0][IDX_W-1:0]   grf_rd_idx_a, grf_rd_idx_b;
  logic [2:0][IO_BITS-1:0] grf_rd_a, grf_rd_b;
  logic                    grf_a_we, grf_b_we, srf_we, srf_wsel;
  logic [IDX_W-1:0]        grf_a_widx, grf_b_widx, srf_wgrp;
  logic [IO_BITS-1:0]      grf_a_wdata, grf_b_wdata, srf_wdata;
  logic [2:0]              srf_rd_sel;
  logic [2:0][IDX_W-1:0]   srf_rd_idx;
  logic [2:0][15:0]        srf_rd;

  cnm_grf #(.R(R), .S(S), .IDX_W(IDX_W), .NRD(3)) u_grf_a (
    .clk, .wr_en(grf_a_we), .wr_idx(grf_a_widx), .wr_data(grf_a_wdata),
    .rd_idx(grf_rd_idx_a), .rd_data(grf_rd_a));
  cnm_grf #(.R(R), .S(S), .IDX_W(IDX_W), .NRD(3)) u_grf_b (
    .clk, .wr_en(grf_b_we), .wr_idx(grf_b_widx), .wr_data(grf_b_wdata),
    .rd_idx(grf_rd_idx_b), .rd_data(grf_rd_b));
  cnm_srf #(.R(R), .S(S), .IDX_W(IDX_W), .NRD(3)) u_srf (
    .clk, .wr_en(srf_we), .wr_sel(srf_wsel), .wr_grp(srf_wgrp), .wr_data(srf_wdata),
    .rd_sel(srf_rd_sel), .rd_idx(srf_rd_idx), .rd_data(srf_rd));

  // Read ports: 0 = src0, 1 = src1 (and MAD's src2), 2 = MAC accumulator.
  always_comb begin
    grf_rd_idx_a = {st_a.ins.dst_idx, st_l.ins.src1_idx, st_l.ins.src0_idx};
    grf_rd_idx_b = grf_rd_idx_a;
    srf_rd_idx   = {st_l.ins.src1_idx, st_l.ins.src1_idx, st_l.ins.src0_idx};
    srf_rd_sel   = {st_l.ins.src2 == OPD_SRF_A, st_l.ins.src1 == OPD_SRF_A,
                    st_l.ins.src0 == OPD_SRF_A};
  end

  // ---------------- load stage: operand selection ----------------
  function automatic logic [IO_BITS-1:0] pick(opnd_e sel, logic [IO_BITS-1:0] ga,
                                              logic [IO_BITS-1:0] gb, logic [15:0] sc,
                                              logic [IO_BITS-1:0] ba, logic [IO_BITS-1:0] bb);
    unique case (sel)
      OPD_GRF_A:             return ga;
      OPD_GRF_B:             return gb;
      OPD_SRF_M, OPD_SRF_A:  return {S{sc}};
      OPD_BANK_A:            return ba;
      OPD_BANK_B:            return bb;
      default:               return '0;
    endcase
  endfunction

  logic [IO_BITS-1:0] opa, opb, opc, acc;
  logic               relu_l;

  always_comb begin
    opa = pick(st_l.ins.src0, grf_rd_a[0], grf_rd_b[0], srf_rd[0], bank_a_rdata, bank_b_rdata);
    opb = pick(st_l.ins.src1, grf_rd_a[1], grf_rd_b[1], srf_rd[1], bank_a_rdata, bank_b_rdata);
    opc = pick(st_l.ins.src2, grf_rd_a[1], grf_rd_b[1], srf_rd[2], bank_a_rdata, bank_b_rdata);
    relu_l = st_l.ins.relu && (st_l.ins.op == OP_MOV) && is_grf(st_l.ins.dst);
    unique case (st_a.ins.dst)
      OPD_GRF_A: acc = grf_rd_a[2];
      OPD_GRF_B: acc = grf_rd_b[2];
      default:   acc = '0;
    endcase
  end

  logic               au_valid;
  logic [IO_BITS-1:0] au_data;

  cnm_au #(.S(S)) u_au (
    .clk, .rst_n, .in_valid(st_l.valid), .in_op(st_l.ins.op), .in_relu(relu_l),
    .in_a(opa), .in_b(opb), .in_c(opc), .acc_in(acc),
    .out_valid(au_valid), .out_data(au_data));

  assign ev_relu = st_l.valid && relu_l;

  // ---------------- writeback stage ----------------
  logic wb_grf_a, wb_grf_b, wb_srf;
  always_comb begin
    wb_grf_a = au_valid && st_w.ins.dst == OPD_GRF_A;
    wb_grf_b = au_valid && st_w.ins.dst == OPD_GRF_B;
    wb_srf   = au_valid && is_srf(st_w.ins.dst);

    grf_a_we    = wb_grf_a || (reg_wr_en && reg_wr_space == RS_GRF_A);
    grf_a_widx  = wb_grf_a ? st_w.ins.dst_idx : reg_wr_idx;
    grf_a_wdata = wb_grf_a ? au_data : reg_wr_data;
    grf_b_we    = wb_grf_b || (reg_wr_en && reg_wr_space == RS_GRF_B);
    grf_b_widx  = wb_grf_b ? st_w.ins.dst_idx : reg_wr_idx;
    grf_b_wdata = wb_grf_b ? au_data : reg_wr_data;
    srf_we      = wb_srf || (reg_wr_en && (reg_wr_space inside {RS_SRF_M, RS_SRF_A}));
    srf_wsel    = wb_srf ? (st_w.ins.dst == OPD_SRF_A) : (reg_wr_space == RS_SRF_A);
    srf_wgrp    = wb_srf ? st_w.ins.dst_idx : reg_wr_idx;
    srf_wdata   = wb_srf ? au_data : reg_wr_data;

    bank_a_wr    = au_valid && st_w.ins.dst == OPD_BANK_A;
    bank_b_wr    = au_valid && st_w.ins.dst == OPD_BANK_B;
    bank_a_wdata = au_data;
    bank_b_wdata = au_data;
    bank_a_col   = bank_a_wr ? st_w.col : trig_col;
    bank_b_col   = bank_b_wr ? st_w.col : trig_col;
  end

  // A bank has one column port: a writeback and a new read must not meet.
  a_bank_a_port: assert property (@(posedge clk) disable iff (!rst_n) !(bank_a_rd && bank_a_wr));
  a_bank_b_port: assert property (@(posedge clk) disable iff (!rst_n) !(bank_b_rd && bank_b_wr));
  // Host register writes must not coincide with a pipeline writeback.
  a_reg_port: assert property (@(posedge clk) disable iff (!rst_n)
    !(reg_wr_en && (wb_grf_a || wb_grf_b || wb_srf)));
  // The pipeline must be drained before the host restarts the program.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !(st_l.valid || st_m.valid || st_a.valid || st_w.valid));
endmodule
