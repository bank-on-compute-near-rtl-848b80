// tb_cnm_pu: end-to-end check of one processing unit with two modelled
// banks (one open row of 32 columns each). The host writes the SRF, GRFs
// and a program into the CRF, starts the PU and sends one execute trigger
// every two cycles, each naming a bank column. The program exercises
// every instruction and operand kind: MOV from a bank (with ReLU), NOP,
// ADD, MUL with an SRF scalar, MAD with a bank operand, a MAC chain inside
// a JUMP loop, MOV to a bank, MOV into the SRF and MUL writing a bank.
// Results in the GRFs and banks are compared with a half-precision
// reference. A bank writeback must be sampled exactly four clock edges
// after the edge that sampled its trigger (Decode -> Load -> Multiply ->
// Add -> Writeback); the testbench counts from the cycle before the
// trigger edge, so it expects 5.
module tb_cnm_pu;
  import cnm_pkg::*;
  import fp16_ref_pkg::*;
  localparam int C = 32, R = 8, S = 16, IOB = S * 16;
  typedef logic [IOB-1:0] vec_t;

  logic clk = 0, rst_n = 1, start = 0, reg_wr_en = 0, trig = 0;
  reg_space_e reg_wr_space = RS_CRF;
  logic [4:0] reg_wr_idx = 0, trig_col = 0;
  vec_t reg_wr_data = 0;
  logic done;
  logic bank_a_rd, bank_a_wr, bank_b_rd, bank_b_wr;
  logic [4:0] bank_a_col, bank_b_col;
  vec_t bank_a_wdata, bank_b_wdata, bank_a_rdata = 0, bank_b_rdata = 0;
  logic ev_issue, ev_jump, ev_nop, ev_exit, ev_relu;

  vec_t bank_a [32], bank_b [32];
  vec_t ga [R], gb [R];       // reference GRFs
  logic [15:0] sm [R], sa [R];
  int checks = 0, failures = 0, cyc = 0;
  int trig_cyc [int];         // column -> trigger cycle
  int wr_a_cyc = -1, wr_b_cyc = -1;
  int n_jump = 0, n_nop = 0, n_relu = 0;

  cnm_pu #(.C(C), .R(R), .S(S)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before the first clock

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank models: read data one cycle after the read
  always @(posedge clk) begin
    cyc++;
    if (bank_a_rd) bank_a_rdata <= bank_a[bank_a_col];
    if (bank_b_rd) bank_b_rdata <= bank_b[bank_b_col];
    if (bank_a_wr) begin bank_a[bank_a_col] <= bank_a_wdata; wr_a_cyc <= cyc - trig_cyc[int'(bank_a_col)]; end
    if (bank_b_wr) begin bank_b[bank_b_col] <= bank_b_wdata; wr_b_cyc <= cyc - trig_cyc[int'(bank_b_col)]; end
    if (ev_jump) n_jump++;
    if (ev_nop) n_nop++;
    if (ev_relu) n_relu++;
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
                                      opnd_e s1 = OPD_GRF_A, int i1 = 0,
                                      opnd_e s2 = OPD_GRF_A, logic rl = 0);
    instr_t i;
    i = '{op: op, dst: dst, src0: s0, src1: s1, src2: s2, relu: rl,
          dst_idx: 5'(di), src0_idx: 5'(i0), src1_idx: 5'(i1)};
    return i;
  endfunction

  task automatic host_wr(reg_space_e sp, int idx, vec_t d);
    @(negedge clk);
    reg_wr_en = 1; reg_wr_space = sp; reg_wr_idx = 5'(idx); reg_wr_data = d;
    @(negedge clk);
    reg_wr_en = 0;
  endtask

  task automatic fire(int col);
    @(negedge clk);
    trig = 1; trig_col = 5'(col);
    trig_cyc[col] = cyc;
    @(negedge clk);
    trig = 0;
  endtask

  function automatic vec_t vop(int kind, vec_t a, vec_t b, vec_t c);
    vec_t r;
    for (int l = 0; l < S; l++) begin
      logic [15:0] x, y, z;
      x = a[16*l +: 16]; y = b[16*l +: 16]; z = c[16*l +: 16];
      case (kind)
        0: r[16*l +: 16] = ref_add(x, y);
        1: r[16*l +: 16] = ref_mul(x, y);
        2: r[16*l +: 16] = ref_add(ref_mul(x, y), z);
        default: r[16*l +: 16] = relu(x);
      endcase
    end
    return r;
  endfunction

  task automatic cmp(string what, vec_t got, vec_t exp);
    for (int l = 0; l < S; l++) begin
      checks++;
      if (!same(got[16*l +: 16], exp[16*l +: 16])) begin
        failures++;
        if (failures < 8) $display("%s lane %0d got %h exp %h", what, l, got[16*l +: 16], exp[16*l +: 16]);
      end
    end
  endtask

  logic [31:0] prog [C];
  vec_t w, t;

  initial begin
    for (int c = 0; c < 32; c++) begin bank_a[c] = rnd_vec(); bank_b[c] = rnd_vec(); end
    for (int c = 0; c < C; c++) prog[c] = enc(OP_EXIT, OPD_GRF_A, 0, OPD_GRF_A, 0);
    prog[0]  = enc(OP_MOV, OPD_GRF_A, 0, OPD_BANK_A, 0);
    prog[1]  = enc(OP_MOV, OPD_GRF_B, 1, OPD_BANK_B, 0, OPD_GRF_A, 0, OPD_GRF_A, 1);
    prog[2]  = {OP_NOP, 12'd0, 16'd2};
    prog[3]  = enc(OP_ADD, OPD_GRF_A, 2, OPD_GRF_A, 0, OPD_GRF_B, 1);
    prog[4]  = enc(OP_MUL, OPD_GRF_B, 3, OPD_GRF_A, 0, OPD_SRF_M, 2);
    prog[5]  = enc(OP_MAD, OPD_GRF_A, 4, OPD_BANK_A, 0, OPD_SRF_M, 1, OPD_SRF_A);
    prog[6]  = enc(OP_MAC, OPD_GRF_B, 5, OPD_GRF_A, 0, OPD_BANK_B, 0);
    prog[7]  = {OP_JUMP, 8'd6, 4'd0, 16'd2};
    prog[8]  = {OP_NOP, 12'd0, 16'd2};
    prog[9]  = enc(OP_MOV, OPD_BANK_A, 0, OPD_GRF_A, 2);
    prog[10] = enc(OP_MOV, OPD_SRF_M, 0, OPD_GRF_B, 3);
    prog[11] = {OP_NOP, 12'd0, 16'd1};
    prog[12] = enc(OP_MUL, OPD_BANK_B, 0, OPD_GRF_A, 4, OPD_SRF_M, 5);
    prog[13] = {OP_NOP, 12'd0, 16'd3};
    prog[14] = enc(OP_EXIT, OPD_GRF_A, 0, OPD_GRF_A, 0);

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < C / 8; k++) begin
      for (int j = 0; j < 8; j++) w[32*j +: 32] = prog[8*k + j];
      host_wr(RS_CRF, k, w);
    end
    w = rnd_vec(); host_wr(RS_SRF_M, 0, w); for (int i = 0; i < R; i++) sm[i] = w[16*i +: 16];
    w = rnd_vec(); host_wr(RS_SRF_A, 0, w); for (int i = 0; i < R; i++) sa[i] = w[16*i +: 16];
    for (int i = 0; i < R; i++) begin
      ga[i] = rnd_vec(); host_wr(RS_GRF_A, i, ga[i]);
      gb[i] = rnd_vec(); host_wr(RS_GRF_B, i, gb[i]);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;

    // reference execution
    ga[0] = bank_a[0];
    gb[1] = vop(3, bank_b[1], '0, '0);
    ga[2] = vop(0, ga[0], gb[1], '0);
    gb[3] = vop(1, ga[0], {S{sm[2]}}, '0);
    ga[4] = vop(2, bank_a[2], {S{sm[1]}}, {S{sa[1]}});
    for (int k = 0; k < 3; k++) gb[5] = vop(2, ga[0], bank_b[3 + k], gb[5]);
    t = ga[2];                           // -> bank A col 9
    for (int i = 0; i < R; i++) sm[i] = gb[3][16*i +: 16];
    w = vop(1, ga[4], {S{sm[5]}}, '0);   // -> bank B col 12

    // triggers: one per instruction-consuming CRF visit, column per step
    fire(0); fire(1); fire(20); fire(21); fire(22); fire(23); fire(2);
    fire(3); fire(4); fire(5);
    fire(24); fire(25); fire(9); fire(10); fire(26); fire(12);
    fire(27); fire(28); fire(29);
    repeat (4) @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("PU not done"); end
    fire(30);   // ignored after EXIT
    repeat (6) @(negedge clk);

    for (int i = 0; i < R; i++) begin
      cmp($sformatf("GRF_A[%0d]", i), dut.u_grf_a.mem[i], ga[i]);
      cmp($sformatf("GRF_B[%0d]", i), dut.u_grf_b.mem[i], gb[i]);
    end
    cmp("bank A col 9", bank_a[9], t);
    cmp("bank B col 12", bank_b[12], w);
    cmp("bank A col 30 untouched", bank_a[30], bank_a[30]);
    checks++;
    if (wr_a_cyc != 5 || wr_b_cyc != 5) begin
      failures++;
      $display("bank write latency A %0d B %0d, expected 5", wr_a_cyc, wr_b_cyc);
    end
    checks++;
    if (n_jump != 2 || n_nop != 8 || n_relu != 1) begin
      failures++;
      $display("jumps %0d nops %0d relu %0d", n_jump, n_nop, n_relu);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
