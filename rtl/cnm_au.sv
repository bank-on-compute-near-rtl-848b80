// cnm_au: SIMD arithmetic unit (AU) of the PU.
//
// S lanes, each with one FP16 multiplier and one FP16 adder, working in
// lock-step (S = 16 for a 256-bit bank IO). The multiplier output can feed
// the adder, which gives multiply-and-add (MAD) and multiply-accumulate
// (MAC). The unit spans three pipeline stages of the PU:
//   cycle 0 (Load)     : operands in_a/in_b/in_c presented, registered
//   cycle 1 (Multiply) : product a*b (MUL/MAD/MAC), else a passes through
//   cycle 2 (Add)      : ADD a+b, MAD a*b+c, MAC a*b+acc_in, else pass;
//                        ReLU (negative -> +0) on MOV when in_relu is set
//   cycle 3 (Writeback): out_valid/out_data hold the result
// acc_in is sampled combinationally in the Add cycle; the PU drives it from
// the accumulating GRF entry. Lane structure and operations follow the
// design; the exact register placement is this implementation's choice.
module cnm_au
  import cnm_pkg::*;
#(
  parameter int unsigned S = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  opcode_e         in_op,
  input  logic            in_relu,
  input  logic [S*16-1:0] in_a,
  input  logic [S*16-1:0] in_b,
  input  logic [S*16-1:0] in_c,
  input  logic [S*16-1:0] acc_in,
  output logic            out_valid,
  output logic [S*16-1:0] out_data
);
  // Multiply stage registers.
  logic            m_valid, m_relu;
  opcode_e         m_op;
  logic [S*16-1:0] m_a, m_b, m_c;
  // Add stage registers.
  logic            ad_valid, ad_relu;
  opcode_e         ad_op;
  logic [S*16-1:0] ad_x, ad_y;

  logic [S*16-1:0] prod, sum, addend, res;
  logic            m_uses_mul;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid   <= 1'b0;
      ad_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      m_valid   <= in_valid;
      ad_valid  <= m_valid;
      out_valid <= ad_valid;
    end
  end

  always_ff @(posedge clk) begin
    m_op    <= in_op;
    m_relu  <= in_relu;
    m_a     <= in_a;
    m_b     <= in_b;
    m_c     <= in_c;
    ad_op   <= m_op;
    ad_relu <= m_relu;
    ad_x    <= m_uses_mul ? prod : m_a;
    ad_y    <= (m_op == OP_ADD) ? m_b : m_c;
    out_data <= res;
  end

  assign m_uses_mul = (m_op == OP_MUL) || (m_op == OP_MAD) || (m_op == OP_MAC);
  assign addend     = (ad_op == OP_MAC) ? acc_in : ad_y;

  for (genvar l = 0; l < int'(S); l++) begin : g_lane
    fp16_mul u_mul (.a(m_a[16*l +: 16]), .b(m_b[16*l +: 16]), .y(prod[16*l +: 16]));
    fp16_add u_add (.a(ad_x[16*l +: 16]), .b(addend[16*l +: 16]), .y(sum[16*l +: 16]));

    always_comb begin
      unique case (ad_op)
        OP_ADD, OP_MAD, OP_MAC: res[16*l +: 16] = sum[16*l +: 16];
        default: res[16*l +: 16] = (ad_relu && ad_x[16*l + 15]) ? 16'h0000 : ad_x[16*l +: 16];
      endcase
    end
  end
endmodule
