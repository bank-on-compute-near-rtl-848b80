// cnm_cu: control unit (CU) of the PU: instruction fetch and flow control.
//
// In CnM mode every execute command from the host (a RD or WR with the
// extended-address MSB clear) reaches the PU as a one-cycle `trig`. Each
// trigger makes the CU decode the CRF entry at the program counter (pc):
//   MOV/ADD/MUL/MAD/MAC : issued to the pipeline in the same cycle
//                         (issue_valid, issue_instr), pc advances;
//   NOP n               : occupies n triggers (at least one) and issues
//                         nothing, which spaces dependent instructions;
//   JUMP addr iter      : resolved without a trigger, in the cycle after
//                         the preceding instruction: jumps back to addr
//                         `iter` times, then falls through (one loop level);
//   EXIT                : resolved the same way; sets `done` and ignores
//                         further triggers until the next `start`.
// `start` (one cycle, on entry into CnM mode) clears pc, the loop and NOP
// counters and `done`. Flow control resolved without a trigger is this
// implementation's reading of the design's command-driven execution, as
// are the trigger-counting NOP and the single loop counter.
// Timing rule: triggers are at least two cycles apart (JEDEC column-to-
// column spacing), which leaves the cycle needed to resolve JUMP/EXIT; a
// program must not start with JUMP.
module cnm_cu
  import cnm_pkg::*;
#(
  parameter int unsigned C  = 32,
  localparam int unsigned AW = (C > 1) ? $clog2(C) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          trig,
  output logic [AW-1:0] pc,
  input  logic [31:0]   crf_data,
  output logic          issue_valid,
  output instr_t        issue_instr,
  output logic          done,
  output logic          ev_jump,
  output logic          ev_nop,
  output logic          ev_exit
);
  instr_t      cur;
  logic        running;
  logic        loop_active;
  logic [15:0] loop_cnt;
  logic        nop_active;
  logic [15:0] nop_left;
  logic        flow;
  logic [15:0] jump_iter, nop_clks;
  logic [AW-1:0] jump_tgt;

  assign cur       = instr_t'(crf_data);
  assign jump_tgt  = AW'(crf_data[27:20]);
  assign jump_iter = crf_data[15:0];
  assign nop_clks  = crf_data[15:0];
  assign flow      = running && !done && !trig &&
                     ((cur.op == OP_JUMP) || (cur.op == OP_EXIT));

  assign issue_valid = trig && !done && (cur.op inside {OP_MOV, OP_ADD, OP_MUL, OP_MAD, OP_MAC});
  assign issue_instr = cur;
  assign ev_jump = flow && (cur.op == OP_JUMP) &&
                   (loop_active ? (loop_cnt != 0) : (jump_iter != 0));
  assign ev_nop  = trig && !done && (cur.op == OP_NOP);
  assign ev_exit = (flow || (trig && !done)) && (cur.op == OP_EXIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= '0;
      running     <= 1'b0;
      done        <= 1'b0;
      loop_active <= 1'b0;
      loop_cnt    <= '0;
      nop_active  <= 1'b0;
      nop_left    <= '0;
    end else if (start) begin
      pc          <= '0;
      running     <= 1'b0;
      done        <= 1'b0;
      loop_active <= 1'b0;
      loop_cnt    <= '0;
      nop_active  <= 1'b0;
      nop_left    <= '0;
    end else if (!done) begin
      if (trig) begin
        running <= 1'b1;
        unique case (cur.op)
          OP_NOP: begin
            if (nop_active) begin
              if (nop_left <= 16'd1) begin
                nop_active <= 1'b0;
                pc         <= pc + 1'b1;
              end
              nop_left <= nop_left - 16'd1;
            end else if (nop_clks <= 16'd1) begin
              pc <= pc + 1'b1;
            end else begin
              nop_active <= 1'b1;
              nop_left   <= nop_clks - 16'd1;
            end
          end
          OP_EXIT: done <= 1'b1;
          OP_JUMP: ;  // not reachable by a trigger (see timing rule)
          default: pc <= pc + 1'b1;
        endcase
      end else if (flow) begin
        if (cur.op == OP_EXIT) begin
          done    <= 1'b1;
          running <= 1'b0;
        end else if (loop_active) begin
          if (loop_cnt == 16'd0) begin
            loop_active <= 1'b0;
            pc          <= pc + 1'b1;
          end else begin
            loop_cnt <= loop_cnt - 16'd1;
            pc       <= jump_tgt;
          end
        end else if (jump_iter == 16'd0) begin
          pc <= pc + 1'b1;
        end else begin
          loop_active <= 1'b1;
          loop_cnt    <= jump_iter - 16'd1;
          pc          <= jump_tgt;
        end
      end
    end
  end

  // A trigger must never meet an unresolved JUMP.
  a_no_trig_on_jump: assert property (@(posedge clk) disable iff (!rst_n)
    (trig && !done && !start) |-> (cur.op != OP_JUMP));
  // Execute triggers are at least two cycles apart.
  a_trig_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    trig |=> !trig);
endmodule
