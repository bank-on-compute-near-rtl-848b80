// tb_cnm_cu: checks the control unit's flow control. The CRF is modelled
// by an array. Program:
//   0 MOV  1 NOP 3  2 ADD  3 MUL  4 JUMP 2 x2  5 MAC  6 EXIT
// Triggers arrive every two cycles. Expected issue order: MOV, (3 NOP
// triggers), ADD MUL ADD MUL ADD MUL, MAC, then done with no further
// issue. Each issue must happen in its trigger cycle. Afterwards `start`
// must rerun the program from the beginning.
module tb_cnm_cu;
  import cnm_pkg::*;
  localparam int C = 32;
  logic clk = 0, rst_n = 1, start = 0, trig = 0;
  logic [4:0] pc;
  logic [31:0] crf_data;
  logic issue_valid, done, ev_jump, ev_nop, ev_exit;
  instr_t issue_instr;
  logic [31:0] crf [C];
  int checks = 0, failures = 0;
  int n_issue = 0, n_jump = 0, n_nop = 0, n_exit = 0;
  opcode_e seen [$];
  opcode_e expect_ops [$];

  cnm_cu #(.C(C)) dut (.*);
  assign crf_data = crf[pc];
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before the first clock

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ins(opcode_e op, int tag);
    instr_t i;
    i = '0;
    i.op = op;
    i.dst_idx = 5'(tag);
    return i;
  endfunction

  always @(posedge clk) begin
    if (issue_valid) begin
      seen.push_back(issue_instr.op);
      checks++;
      if (!trig) failures++;
      n_issue++;
    end
    if (ev_jump) n_jump++;
    if (ev_nop) n_nop++;
    if (ev_exit) n_exit++;
  end

  task automatic run_program(int n_trig);
    for (int t = 0; t < n_trig; t++) begin
      @(negedge clk);
      trig = 1;
      @(negedge clk);
      trig = 0;
    end
  endtask

  initial begin
    for (int i = 0; i < C; i++) crf[i] = ins(OP_EXIT, 0);
    crf[0] = ins(OP_MOV, 0);
    crf[1] = {OP_NOP, 12'd0, 16'd3};
    crf[2] = ins(OP_ADD, 2);
    crf[3] = ins(OP_MUL, 3);
    crf[4] = {OP_JUMP, 8'd2, 4'd0, 16'd2};
    crf[5] = ins(OP_MAC, 5);
    crf[6] = ins(OP_EXIT, 6);
    expect_ops = '{OP_MOV, OP_ADD, OP_MUL, OP_ADD, OP_MUL, OP_ADD, OP_MUL, OP_MAC};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      seen.delete();
      run_program(11);
      @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("not done"); end
      run_program(2);   // ignored after EXIT
      checks++;
      if (seen.size() != expect_ops.size()) begin
        failures++;
        $display("issued %0d instructions, expected %0d", seen.size(), expect_ops.size());
      end
      for (int k = 0; k < expect_ops.size() && k < seen.size(); k++) begin
        checks++;
        if (seen[k] != expect_ops[k]) begin
          failures++;
          $display("issue %0d: %s expected %s", k, seen[k].name(), expect_ops[k].name());
        end
      end
    end
    checks++;
    if (n_jump != 4 || n_nop != 6 || n_exit != 2) begin
      failures++;
      $display("jumps %0d nops %0d exits %0d", n_jump, n_nop, n_exit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
