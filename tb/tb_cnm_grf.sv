// tb_cnm_grf: checks the vector register file: random writes and four
// read ports against a model, including out-of-range indices.
module tb_cnm_grf;
  localparam int R = 8, S = 16;
  logic clk = 0;
  logic wr_en = 0;
  logic [4:0] wr_idx = 0;
  logic [S*16-1:0] wr_data = 0;
  logic [3:0][4:0] rd_idx = 0;
  logic [3:0][S*16-1:0] rd_data;
  logic [S*16-1:0] model [R];
  int checks = 0, failures = 0;

  cnm_grf #(.R(R), .S(S), .NRD(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < R; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(i);
      for (int k = 0; k < S; k++) wr_data[16*k +: 16] = 16'($urandom);
      model[i] = wr_data;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      wr_idx = 5'($urandom_range(0, 9));
      for (int k = 0; k < S; k++) wr_data[16*k +: 16] = 16'($urandom);
      for (int p = 0; p < 4; p++) rd_idx[p] = 5'($urandom_range(0, 9));
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd_data[p] !== ((rd_idx[p] >= R) ? '0 : model[rd_idx[p]])) failures++;
      end
      @(posedge clk);
      if (wr_en && wr_idx < R) model[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
