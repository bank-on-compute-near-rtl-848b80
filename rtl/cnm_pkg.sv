// cnm_pkg: types and constants shared by the compute-near-bank processing
// unit (PU), its control unit and the channel-level host interface.
//
// Instruction word (32 bits, one CRF entry). The instruction set (NOP, JUMP,
// EXIT, MOV, ADD, MUL, MAD, MAC) and the 32-bit word size follow the design;
// the bit layout below is this implementation's own choice:
//   [31:28] opcode        [27:25] dst type   [24:22] src0 type
//   [21:19] src1 type     [18:16] src2 type  [15]    ReLU (MOV to a GRF)
//   [14:10] dst index     [9:5]   src0 index [4:0]   src1 index
//   src2 (MAD only) uses the src1 index, so a weight in SRF_M[i] pairs
//   with a bias in SRF_A[i].
//   JUMP: [27:20] target CRF address, [15:0] number of jumps back (ITER).
//   NOP : [15:0]  number of DRAM triggers the NOP occupies (0 counts as 1).
//
// Host register space (extended-address MSB = 1): the row address selects
// the register file (reg_space_e), the column address the entry.
package cnm_pkg;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_JUMP = 4'd1,
    OP_EXIT = 4'd2,
    OP_MOV  = 4'd3,
    OP_ADD  = 4'd4,
    OP_MUL  = 4'd5,
    OP_MAD  = 4'd6,
    OP_MAC  = 4'd7
  } opcode_e;

  typedef enum logic [2:0] {
    OPD_GRF_A  = 3'd0,
    OPD_GRF_B  = 3'd1,
    OPD_SRF_M  = 3'd2,
    OPD_SRF_A  = 3'd3,
    OPD_BANK_A = 3'd4,
    OPD_BANK_B = 3'd5
  } opnd_e;

  typedef struct packed {
    opcode_e    op;
    opnd_e      dst;
    opnd_e      src0;
    opnd_e      src1;
    opnd_e      src2;
    logic       relu;
    logic [4:0] dst_idx;
    logic [4:0] src0_idx;
    logic [4:0] src1_idx;
  } instr_t;

  // DRAM commands seen on the channel command bus.
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_PRE = 3'd2,
    CMD_RD  = 3'd3,
    CMD_WR  = 3'd4
  } dram_cmd_e;

  // Register spaces reachable through the extended address (MSB = 1).
  typedef enum logic [2:0] {
    RS_CRF   = 3'd0,
    RS_SRF_M = 3'd1,
    RS_SRF_A = 3'd2,
    RS_GRF_A = 3'd3,
    RS_GRF_B = 3'd4,
    RS_MODE  = 3'd5
  } reg_space_e;

  function automatic logic is_bank(opnd_e o);
    return (o == OPD_BANK_A) || (o == OPD_BANK_B);
  endfunction

  function automatic logic is_grf(opnd_e o);
    return (o == OPD_GRF_A) || (o == OPD_GRF_B);
  endfunction

  function automatic logic is_srf(opnd_e o);
    return (o == OPD_SRF_M) || (o == OPD_SRF_A);
  endfunction

endpackage
