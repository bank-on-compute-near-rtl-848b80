// tb_cnm_host_if: checks the channel command decode. In memory mode
// commands reach only the addressed bank and reads return one cycle later;
// register-space writes other than the mode register are ignored. A mode
// write enters CnM mode with a one-cycle start pulse; then ACT/PRE reach
// all banks, bank-space RD/WR become execute triggers and register-space
// writes are broadcast to the PUs. A second mode write returns to memory
// mode.
module tb_cnm_host_if;
  import cnm_pkg::*;
  localparam int NB = 16, IOB = 256;
  logic clk = 0, rst_n = 1;
  dram_cmd_e cmd = CMD_NOP;
  logic cmd_ext = 0;
  logic [3:0] cmd_bank = 0;
  logic [14:0] cmd_row = 0;
  logic [4:0] cmd_col = 0;
  logic [IOB-1:0] cmd_wdata = 0;
  logic host_rvalid, cnm_mode, pu_start, reg_wr_en, trig;
  logic [IOB-1:0] host_rdata, reg_wr_data, bank_wdata;
  reg_space_e reg_wr_space;
  logic [4:0] reg_wr_idx, trig_col, bank_col;
  logic [NB-1:0] bank_act, bank_pre, bank_rd, bank_wr;
  logic [14:0] bank_row;
  logic [NB-1:0][IOB-1:0] bank_rdata;
  int checks = 0, failures = 0;

  cnm_host_if #(.N_BANKS(NB), .IO_BITS(IOB)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before the first clock
  for (genvar b = 0; b < NB; b++) assign bank_rdata[b] = {IOB/16{16'(b * 257)}};

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply one command for one cycle and check its combinational effect.
  task automatic issue(dram_cmd_e c, logic ext, int bank, int row, int col, logic [IOB-1:0] d);
    @(negedge clk);
    cmd = c; cmd_ext = ext; cmd_bank = 4'(bank); cmd_row = 15'(row); cmd_col = 5'(col); cmd_wdata = d;
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    issue(CMD_ACT, 0, 5, 77, 0, '0);
    chk("mem ACT one bank", bank_act == 16'h0020 && bank_row == 15'd77 && !trig);
    issue(CMD_WR, 0, 5, 0, 3, {8{32'h1234_5678}});
    chk("mem WR one bank", bank_wr == 16'h0020 && bank_col == 5'd3 && bank_wdata == {8{32'h1234_5678}});
    issue(CMD_RD, 0, 9, 0, 4, '0);
    chk("mem RD one bank", bank_rd == 16'h0200 && !trig);
    issue(CMD_NOP, 0, 0, 0, 0, '0);
    chk("read return", host_rvalid && host_rdata == {16{16'(9 * 257)}});
    issue(CMD_WR, 1, 0, RS_GRF_A, 1, '1);
    chk("reg write ignored in memory mode", !reg_wr_en);
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd1);
    chk("mode write no reg write", !reg_wr_en && !cnm_mode);
    issue(CMD_NOP, 0, 0, 0, 0, '0);
    chk("cnm mode entered with start", cnm_mode && pu_start);
    issue(CMD_NOP, 0, 0, 0, 0, '0);
    chk("start is one cycle", !pu_start);
    issue(CMD_ACT, 0, 3, 12, 0, '0);
    chk("cnm ACT all banks", bank_act == '1 && bank_row == 15'd12);
    issue(CMD_WR, 1, 0, RS_SRF_A, 2, {8{32'hcafe_f00d}});
    chk("cnm reg write", reg_wr_en && reg_wr_space == RS_SRF_A && reg_wr_idx == 5'd2 && reg_wr_data == {8{32'hcafe_f00d}});
    issue(CMD_RD, 0, 1, 0, 17, '0);
    chk("cnm RD trigger", trig && trig_col == 5'd17 && bank_rd == '0);
    issue(CMD_WR, 0, 1, 0, 18, '0);
    chk("cnm WR trigger", trig && trig_col == 5'd18 && bank_wr == '0);
    issue(CMD_NOP, 0, 0, 0, 0, '0);
    chk("no read return in cnm mode", !host_rvalid && !trig);
    issue(CMD_PRE, 0, 0, 0, 0, '0);
    chk("cnm PRE all banks", bank_pre == '1);
    issue(CMD_WR, 1, 0, RS_MODE, 0, 256'd0);
    issue(CMD_NOP, 0, 0, 0, 0, '0);
    chk("back to memory mode", !cnm_mode && !pu_start);
    issue(CMD_RD, 0, 2, 0, 1, '0);
    chk("memory read after return", bank_rd == 16'h0004 && !trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
