// tb_cnm_au: checks the SIMD arithmetic unit. A random stream of ADD,
// MUL, MAD, MAC and MOV (with and without ReLU) operations enters one per
// cycle; the accumulator input is driven in each operation's Add cycle,
// two cycles after entry. Every result must appear exactly three cycles
// after its operands, lane by lane equal to the half-precision reference.
module tb_cnm_au;
  import cnm_pkg::*;
  import fp16_ref_pkg::*;
  localparam int S = 16;
  localparam int N = 400;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_relu = 0;
  opcode_e in_op = OP_MOV;
  logic [S*16-1:0] in_a = 0, in_b = 0, in_c = 0, acc_in = 0;
  logic out_valid;
  logic [S*16-1:0] out_data;
  logic [S*16-1:0] exp_q [N];
  logic [S*16-1:0] acc_q [N];
  int checks = 0, failures = 0, n_out = 0, cyc = 0;
  int issue_cyc [N];
  int mac_seen = 0, mad_seen = 0, relu_seen = 0;

  cnm_au #(.S(S)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before the first clock
  always @(posedge clk) cyc++;

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rnd_h();
    logic [15:0] h;
    h = 16'($urandom);
    h[14:10] = 5'($urandom_range(10, 20));
    return h;
  endfunction


  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      logic [15:0] a, b, c, ac, r;
      @(negedge clk);
      in_valid = 1;
      in_op = opcode_e'($urandom_range(3, 7));
      in_relu = (in_op == OP_MOV) ? 1'($urandom) : 1'b0;
      if (in_op == OP_MAC) mac_seen++;
      if (in_op == OP_MAD) mad_seen++;
      if (in_relu) relu_seen++;
      for (int l = 0; l < S; l++) begin
        a = rnd_h(); b = rnd_h(); c = rnd_h(); ac = rnd_h();
        in_a[16*l +: 16] = a;
        in_b[16*l +: 16] = b;
        in_c[16*l +: 16] = c;
        acc_q[i][16*l +: 16] = ac;
        unique case (in_op)
          OP_ADD: r = ref_add(a, b);
          OP_MUL: r = ref_mul(a, b);
          OP_MAD: r = ref_add(ref_mul(a, b), c);
          OP_MAC: r = ref_add(ref_mul(a, b), ac);
          default: r = in_relu ? relu(a) : a;
        endcase
        exp_q[i][16*l +: 16] = r;
      end
      issue_cyc[i] = cyc;
      // the op that entered two cycles ago is now in its Add cycle
      if (i >= 2) acc_in = acc_q[i - 2];
    end
    @(negedge clk);
    in_valid = 0;
    acc_in = acc_q[N - 2];
    @(negedge clk);
    acc_in = acc_q[N - 1];
    repeat (6) @(negedge clk);
    checks++;
    if (n_out != N) failures++;
    checks++;
    if (mac_seen == 0 || mad_seen == 0 || relu_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (cyc - issue_cyc[n_out] != 4) begin
        failures++;
        $display("latency %0d for op %0d", cyc - issue_cyc[n_out], n_out);
      end
      for (int l = 0; l < S; l++) begin
        checks++;
        if (!same(out_data[16*l +: 16], exp_q[n_out][16*l +: 16])) begin
          failures++;
          if (failures < 6) $display("op %0d lane %0d got %h exp %h", n_out, l, out_data[16*l +: 16], exp_q[n_out][16*l +: 16]);
        end
      end
      n_out++;
    end
  end
endmodule
