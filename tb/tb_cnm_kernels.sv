// tb_cnm_kernels: runs two of the evaluated kernels on a full channel at
// the default configuration (8 PUs, 16 lanes, C = 32, R = 8), at sizes
// that fit one open DRAM row per bank.
//   Vector addition: 32 columns x 16 lanes per PU (4096 elements per
//     channel). Each tile of 8 columns is moved from bank A into GRF_A,
//     added to bank B into GRF_B and moved back to bank A; a JUMP repeats
//     the tile four times.
//   Matrix-vector multiplication (n = 8, p = 128): the vector sits in
//     SRF_M, matrix rows in bank A; eight MACs accumulate in GRF_B[0] and
//     a MOV stores the 16 outputs of each PU in bank B.
// Results are read back in memory mode and compared with the FP16
// reference; the number of cycles each kernel takes is printed.
module tb_cnm_kernels;
  import cnm_pkg::*;
  import fp16_ref_pkg::*;
  localparam int N_PU = 8, NB = 16, S = 16, IOB = 256, C = 32;
  typedef logic [IOB-1:0] vec_t;

  logic clk = 0, rst_n = 1;
  dram_cmd_e cmd = CMD_NOP;
  logic cmd_ext = 0;
  logic [3:0] cmd_bank = 0;
  logic [14:0] cmd_row = 0;
  logic [4:0] cmd_col = 0;
  vec_t cmd_wdata = 0;
  logic host_rvalid, cnm_mode;
  vec_t host_rdata;
  logic [N_PU-1:0] pu_done;
  logic [N_PU-1:0] pu_ev_issue, pu_ev_jump, pu_ev_nop, pu_ev_exit, pu_ev_relu;
  logic [NB-1:0] bank_act, bank_pre, bank_rd, bank_wr;
  logic [14:0] bank_row;
  logic [NB-1:0][4:0] bank_col;
  logic [NB-1:0][IOB-1:0] bank_wdata, bank_rdata;

  cnm_channel dut (.*);
  for (genvar b = 0; b < NB; b++) begin : g_bank
    dram_bank_model #(.IO_BITS(IOB)) u_bank (
      .clk, .act(bank_act[b]), .pre(bank_pre[b]), .rd(bank_rd[b]), .wr(bank_wr[b]),
      .row(bank_row), .col(bank_col[b]), .wdata(bank_wdata[b]), .rdata(bank_rdata[b]));
  end
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before the first clock

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t va_a [NB][32], va_b [NB][32], mv_m [NB][8];
  logic [15:0] x [8];

  function automatic vec_t rnd_vec();
    vec_t v;
    for (int l = 0; l < S; l++) begin
      v[16*l +: 16] = 16'($urandom);
      v[16*l + 10 +: 5] = 5'($urandom_range(12, 17));
    end
    return v;
  endfunction

  function automatic logic [31:0] enc(opcode_e op, opnd_e dst, int di, opnd_e s0, int i0,
                                      opnd_e s1, int i1);
    instr_t i;
    i = '{op: op, dst: dst, src0: s0, src1: s1, src2: OPD_SRF_A, relu: 1'b0,
          dst_idx: 5'(di), src0_idx: 5'(i0), src1_idx: 5'(i1)};
    return i;
  endfunction

  task automatic issue(dram_cmd_e c, logic ext, int bank, int row, int col, vec_t d);
    @(negedge clk);
    cmd = c; cmd_ext = ext; cmd_bank = 4'(bank); cmd_row = 15'(row); cmd_col = 5'(col); cmd_wdata = d;
    @(negedge clk);
    cmd = CMD_NOP; cmd_ext = 0;
  endtask

  task automatic host_read(int bank, int col, output vec_t d);
    @(negedge clk);
    cmd = CMD_RD; cmd_ext = 0; cmd_bank = 4'(bank); cmd_col = 5'(col);
    @(negedge clk);
    cmd = CMD_NOP;
    d = host_rdata;
  endtask

  task automatic load_prog(logic [31:0] prog [C]);
    vec_t w;
    for (int k = 0; k < C / 8; k++) begin
      for (int j = 0; j < 8; j++) w[32*j +: 32] = prog[8*k + j];
      issue(CMD_WR, 1, 0, RS_CRF, k, w);
    end
  endtask

  task automatic chk_vec(string what, vec_t got, vec_t exp);
    for (int l = 0; l < S; l++) begin
      checks++;
      if (!same(got[16*l +: 16], exp[16*l +: 16])) begin
        failures++;
        if (failures < 8) $display("%s lane %0d got %h exp %h", what, l, got[16*l +: 16], exp[16*l +: 16]);
      end
    end
  endtask

  logic [31:0] prog [C];
  vec_t w, rd, e;
  int t0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // preload: row 0 holds the vector-addition operands, row 1 the matrix
    for (int b = 0; b < NB; b++) begin
      issue(CMD_ACT, 0, b, 0, 0, '0);
      for (int c = 0; c < 32; c++) begin
        va_a[b][c] = rnd_vec(); va_b[b][c] = rnd_vec();
        issue(CMD_WR, 0, b, 0, c, (b % 2 == 0) ? va_a[b][c] : va_b[b][c]);
      end
      issue(CMD_PRE, 0, b, 0, 0, '0);
      issue(CMD_ACT, 0, b, 1, 0, '0);
      for (int c = 0; c < 8; c++) begin
        mv_m[b][c] = rnd_vec();
        issue(CMD_WR, 0, b, 0, c, mv_m[b][c]);
      end
      issue(CMD_PRE, 0, b, 0, 0, '0);
    end

    // ---------------- vector addition ----------------
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd1);
    for (int i = 0; i < C; i++) prog[i] = {OP_EXIT, 28'd0};
    for (int i = 0; i < 8; i++) begin
      prog[i]      = enc(OP_MOV, OPD_GRF_A, i, OPD_BANK_A, 0, OPD_GRF_A, 0);
      prog[9 + i]  = enc(OP_ADD, OPD_GRF_B, i, OPD_GRF_A, i, OPD_BANK_B, 0);
      prog[18 + i] = enc(OP_MOV, OPD_BANK_A, 0, OPD_GRF_B, i, OPD_GRF_A, 0);
    end
    prog[8]  = {OP_NOP, 12'd0, 16'd2};
    prog[17] = {OP_NOP, 12'd0, 16'd2};
    prog[26] = {OP_NOP, 12'd0, 16'd2};
    prog[27] = {OP_JUMP, 8'd0, 4'd0, 16'd3};
    load_prog(prog);
    issue(CMD_ACT, 0, 0, 0, 0, '0);
    t0 = cyc;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 8; i++) issue(CMD_RD, 0, 0, 0, 8 * t + i, '0);
      issue(CMD_RD, 0, 0, 0, 0, '0); issue(CMD_RD, 0, 0, 0, 0, '0);
      for (int i = 0; i < 8; i++) issue(CMD_RD, 0, 0, 0, 8 * t + i, '0);
      issue(CMD_RD, 0, 0, 0, 0, '0); issue(CMD_RD, 0, 0, 0, 0, '0);
      for (int i = 0; i < 8; i++) issue(CMD_WR, 0, 0, 0, 8 * t + i, '0);
      issue(CMD_RD, 0, 0, 0, 0, '0); issue(CMD_RD, 0, 0, 0, 0, '0);
    end
    repeat (2) @(negedge clk);   // JUMP falls through, then EXIT resolves
    checks++;
    if (pu_done != '1) begin failures++; $display("vector addition: pu_done %b", pu_done); end
    $display("vector addition: %0d FP16 additions in %0d cycles", N_PU * S * 32, cyc - t0);
    issue(CMD_PRE, 0, 0, 0, 0, '0);
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd0);

    // ---------------- matrix-vector multiplication ----------------
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd1);
    for (int i = 0; i < C; i++) prog[i] = {OP_EXIT, 28'd0};
    for (int i = 0; i < 8; i++) prog[i] = enc(OP_MAC, OPD_GRF_B, 0, OPD_BANK_A, 0, OPD_SRF_M, i);
    prog[8]  = {OP_NOP, 12'd0, 16'd2};
    prog[9]  = enc(OP_MOV, OPD_BANK_B, 0, OPD_GRF_B, 0, OPD_GRF_A, 0);
    prog[10] = {OP_NOP, 12'd0, 16'd2};
    load_prog(prog);
    for (int i = 0; i < 8; i++) begin x[i] = rnd_vec()[15:0]; w[16*i +: 16] = x[i]; end
    issue(CMD_WR, 1, 0, RS_SRF_M, 0, w);
    issue(CMD_WR, 1, 0, RS_GRF_B, 0, '0);
    issue(CMD_ACT, 0, 0, 1, 0, '0);
    t0 = cyc;
    for (int i = 0; i < 8; i++) issue(CMD_RD, 0, 0, 0, i, '0);
    issue(CMD_RD, 0, 0, 0, 0, '0); issue(CMD_RD, 0, 0, 0, 0, '0);
    issue(CMD_WR, 0, 0, 0, 20, '0);
    issue(CMD_RD, 0, 0, 0, 0, '0); issue(CMD_RD, 0, 0, 0, 0, '0);
    @(negedge clk);
    checks++;
    if (pu_done != '1) begin failures++; $display("MVM: pu_done %b", pu_done); end
    $display("matrix-vector multiplication: %0d MACs in %0d cycles", N_PU * S * 8, cyc - t0);
    issue(CMD_PRE, 0, 0, 0, 0, '0);
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd0);

    // ---------------- readback ----------------
    for (int p = 0; p < N_PU; p++) begin
      issue(CMD_ACT, 0, 2*p, 0, 0, '0);
      for (int c = 0; c < 32; c++) begin
        for (int l = 0; l < S; l++) e[16*l +: 16] = ref_add(va_a[2*p][c][16*l +: 16], va_b[2*p+1][c][16*l +: 16]);
        host_read(2*p, c, rd);
        chk_vec($sformatf("VA PU %0d col %0d", p, c), rd, e);
      end
      issue(CMD_PRE, 0, 2*p, 0, 0, '0);
      issue(CMD_ACT, 0, 2*p+1, 1, 0, '0);
      for (int l = 0; l < S; l++) begin
        logic [15:0] acc;
        acc = 16'h0000;
        for (int i = 0; i < 8; i++) acc = ref_add(ref_mul(mv_m[2*p][i][16*l +: 16], x[i]), acc);
        e[16*l +: 16] = acc;
      end
      host_read(2*p+1, 20, rd);
      chk_vec($sformatf("MVM PU %0d", p), rd, e);
      issue(CMD_PRE, 0, 2*p+1, 0, 0, '0);
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (bank_errors[b] != 0) begin failures++; $display("bank %0d protocol errors", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bank_errors [NB];
  for (genvar b = 0; b < NB; b++) begin : g_err
    assign bank_errors[b] = g_bank[b].u_bank.errors;
  end
endmodule
