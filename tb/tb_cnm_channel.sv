// tb_cnm_channel: end-to-end test of a full channel at the default
// configuration (8 PUs, 16 banks, 16 FP16 lanes, C = 32, R = 8), with a
// behavioural model for every bank.
//   1. Memory mode: the host opens a row in every bank, writes random
//      vectors to nine columns, reads some back and closes the rows.
//   2. The host writes the mode register (CnM mode), loads a program into
//      all CRFs and clears GRF_B[0] in all PUs with broadcast writes.
//   3. With one ACT to all banks, execute commands run the program:
//        0 MOV GRF_A0 <- bankA, ReLU      1 NOP 2
//        2 MAC GRF_B0 += GRF_A0 * bankB   3 JUMP 2 x3   (4 MACs)
//        4 NOP 2    5 ADD bankA <- GRF_B0 + bankB   6 NOP 3   7 EXIT
//      so every PU computes relu(a) . (b1..b4) + b8 lane-wise on its own
//      banks, in parallel.
//   4. Back in memory mode the host reads each PU's result from bank A.
// Each mechanism (mode switches, memory-mode reads, broadcast register
// writes, all-bank ACT, execute triggers, NOP, JUMP, ReLU, PU bank
// writeback, EXIT) is counted and must occur. The writeback must follow its
// execute command by the pipeline depth.
module tb_cnm_channel;
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

  int bank_errors [NB];
  for (genvar b = 0; b < NB; b++) begin : g_bank
    assign bank_errors[b] = u_bank.errors;
    dram_bank_model #(.IO_BITS(IOB)) u_bank (
      .clk, .act(bank_act[b]), .pre(bank_pre[b]), .rd(bank_rd[b]), .wr(bank_wr[b]),
      .row(bank_row), .col(bank_col[b]), .wdata(bank_wdata[b]), .rdata(bank_rdata[b]));
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before the first clock

  int checks = 0, failures = 0, cyc = 0;
  int n_mode = 0, n_memrd = 0, n_regwr = 0, n_allact = 0, n_trig = 0;
  int n_nop = 0, n_jump = 0, n_relu = 0, n_pu_wr = 0, n_exit = 0;
  int last_trig_cyc = 0, wb_delay = -1;
  logic mode_q = 0;   // mode before the edge (mode resets to memory mode)
  vec_t data [NB][9];

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    mode_q <= cnm_mode;
    if (cnm_mode != mode_q) n_mode++;
    if (dut.reg_wr_en) n_regwr++;
    if (cnm_mode && bank_act == '1) n_allact++;
    if (dut.trig) begin n_trig++; if (dut.trig_col == 5'd8) last_trig_cyc = cyc; end
    if (cnm_mode && bank_wr[0]) begin n_pu_wr++; wb_delay = cyc - last_trig_cyc; end
    if (pu_ev_nop[0]) n_nop++;
    if (pu_ev_jump[0]) n_jump++;
    if (pu_ev_relu[0]) n_relu++;
    if (pu_ev_exit[0]) n_exit++;
  end

  function automatic vec_t rnd_vec();
    vec_t v;
    for (int l = 0; l < S; l++) begin
      v[16*l +: 16] = 16'($urandom);
      v[16*l + 10 +: 5] = 5'($urandom_range(12, 17));
    end
    return v;
  endfunction

  function automatic logic [31:0] enc(opcode_e op, opnd_e dst, int di, opnd_e s0, int i0,
                                      opnd_e s1, int i1, logic rl);
    instr_t i;
    i = '{op: op, dst: dst, src0: s0, src1: s1, src2: OPD_SRF_A, relu: rl,
          dst_idx: 5'(di), src0_idx: 5'(i0), src1_idx: 5'(i1)};
    return i;
  endfunction

  // one command, then one idle cycle (commands at least two cycles apart)
  task automatic issue(dram_cmd_e c, logic ext, int bank, int row, int col, vec_t d);
    @(negedge clk);
    cmd = c; cmd_ext = ext; cmd_bank = 4'(bank); cmd_row = 15'(row); cmd_col = 5'(col); cmd_wdata = d;
    @(negedge clk);
    cmd = CMD_NOP; cmd_ext = 0;
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

  task automatic host_read(int bank, int col, output vec_t d);
    @(negedge clk);
    cmd = CMD_RD; cmd_ext = 0; cmd_bank = 4'(bank); cmd_col = 5'(col);
    @(negedge clk);
    cmd = CMD_NOP;
    checks++;
    if (!host_rvalid) failures++;
    else n_memrd++;
    d = host_rdata;
  endtask

  logic [31:0] prog [C];
  vec_t w, rd;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. memory mode
    for (int b = 0; b < NB; b++) begin
      issue(CMD_ACT, 0, b, 2, 0, '0);
      for (int c = 0; c < 9; c++) begin
        data[b][c] = rnd_vec();
        issue(CMD_WR, 0, b, 0, c, data[b][c]);
      end
      host_read(b, 0, rd);
      chk_vec($sformatf("memory-mode read bank %0d", b), rd, data[b][0]);
      issue(CMD_PRE, 0, b, 0, 0, '0);
    end

    // 2. enter CnM mode, load program and registers
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd1);
    checks++;
    if (!cnm_mode) failures++;
    for (int i = 0; i < C; i++) prog[i] = {OP_EXIT, 28'd0};
    prog[0] = enc(OP_MOV, OPD_GRF_A, 0, OPD_BANK_A, 0, OPD_GRF_A, 0, 1'b1);
    prog[1] = {OP_NOP, 12'd0, 16'd2};
    prog[2] = enc(OP_MAC, OPD_GRF_B, 0, OPD_GRF_A, 0, OPD_BANK_B, 0, 1'b0);
    prog[3] = {OP_JUMP, 8'd2, 4'd0, 16'd3};
    prog[4] = {OP_NOP, 12'd0, 16'd2};
    prog[5] = enc(OP_ADD, OPD_BANK_A, 0, OPD_GRF_B, 0, OPD_BANK_B, 0, 1'b0);
    prog[6] = {OP_NOP, 12'd0, 16'd3};
    prog[7] = {OP_EXIT, 28'd0};
    for (int k = 0; k < C / 8; k++) begin
      for (int j = 0; j < 8; j++) w[32*j +: 32] = prog[8*k + j];
      issue(CMD_WR, 1, 0, RS_CRF, k, w);
    end
    issue(CMD_WR, 1, 0, RS_GRF_B, 0, '0);

    // 3. run: execute commands, each naming the bank column to use
    issue(CMD_ACT, 0, 0, 2, 0, '0);
    issue(CMD_RD, 0, 0, 0, 0, '0);                       // MOV relu
    issue(CMD_RD, 0, 0, 0, 20, '0); issue(CMD_RD, 0, 0, 0, 21, '0);  // NOP 2
    for (int k = 1; k <= 4; k++) issue(CMD_RD, 0, 0, 0, k, '0);     // MAC x4
    issue(CMD_RD, 0, 0, 0, 22, '0); issue(CMD_RD, 0, 0, 0, 23, '0);  // NOP 2
    issue(CMD_WR, 0, 0, 0, 8, '0);                       // ADD -> bank A
    for (int k = 0; k < 3; k++) issue(CMD_RD, 0, 0, 0, 24 + k, '0); // NOP 3
    repeat (2) @(negedge clk);
    checks++;
    if (pu_done != '1) begin failures++; $display("pu_done %b", pu_done); end
    issue(CMD_PRE, 0, 0, 0, 0, '0);
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd0);
    checks++;
    if (cnm_mode) failures++;

    // 4. read results in memory mode
    for (int p = 0; p < N_PU; p++) begin
      vec_t e;
      for (int l = 0; l < S; l++) begin
        logic [15:0] a, acc;
        a = relu(data[2*p][0][16*l +: 16]);
        acc = 16'h0000;
        for (int k = 1; k <= 4; k++) acc = ref_add(ref_mul(a, data[2*p+1][k][16*l +: 16]), acc);
        e[16*l +: 16] = ref_add(acc, data[2*p+1][8][16*l +: 16]);
      end
      issue(CMD_ACT, 0, 2*p, 2, 0, '0);
      host_read(2*p, 8, rd);
      chk_vec($sformatf("PU %0d result", p), rd, e);
      host_read(2*p, 1, rd);
      chk_vec($sformatf("PU %0d bank A col 1 untouched", p), rd, data[2*p][1]);
      issue(CMD_PRE, 0, 2*p, 0, 0, '0);
    end

    for (int b = 0; b < NB; b++) begin
      checks++;
      if (bank_errors[b] != 0) begin failures++; $display("bank %0d protocol errors", b); end
    end
    checks++;
    if (wb_delay != 4) begin failures++; $display("writeback %0d cycles after trigger, expected 4", wb_delay); end
    $display("events: mode switches %0d, memory reads %0d, register writes %0d, all-bank ACT %0d, triggers %0d, NOP %0d, JUMP %0d, ReLU %0d, PU bank writes %0d, EXIT %0d",
             n_mode, n_memrd, n_regwr, n_allact, n_trig, n_nop, n_jump, n_relu, n_pu_wr, n_exit);
    checks++;
    if (n_mode != 2 || n_memrd == 0 || n_regwr == 0 || n_allact == 0 || n_trig != 13 ||
        n_nop != 7 || n_jump != 3 || n_relu != 1 || n_pu_wr != 1 || n_exit != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
