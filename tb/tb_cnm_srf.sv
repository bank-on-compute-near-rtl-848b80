// tb_cnm_srf: checks the scalar register file: group writes into the
// multiply and add halves, three independent read ports, and zero for an
// out-of-range index.
module tb_cnm_srf;
  localparam int R = 8, S = 16;
  logic clk = 0;
  logic wr_en = 0, wr_sel = 0;
  logic [4:0] wr_grp = 0;
  logic [S*16-1:0] wr_data = 0;
  logic [2:0] rd_sel = 0;
  logic [2:0][4:0] rd_idx = 0;
  logic [2:0][15:0] rd_data;
  logic [15:0] mm [R], ma [R];
  int checks = 0, failures = 0;

  cnm_srf #(.R(R), .S(S), .NRD(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_half(logic sel);
    @(negedge clk);
    wr_en = 1; wr_sel = sel; wr_grp = 0;
    for (int k = 0; k < S; k++) begin
      wr_data[16*k +: 16] = 16'($urandom);
      if (k < R) begin
        if (sel) ma[k] = wr_data[16*k +: 16];
        else     mm[k] = wr_data[16*k +: 16];
      end
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    write_half(0);
    write_half(1);
    // a write to group 1 lies beyond R = 8 and must change nothing
    @(negedge clk);
    wr_en = 1; wr_sel = 0; wr_grp = 1; wr_data = '1;
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < 3; p++) begin
        rd_sel[p] = 1'($urandom);
        rd_idx[p] = 5'($urandom_range(0, 9));
      end
      #1;
      for (int p = 0; p < 3; p++) begin
        logic [15:0] e;
        e = (rd_idx[p] >= R) ? 16'h0 : (rd_sel[p] ? ma[rd_idx[p]] : mm[rd_idx[p]]);
        checks++;
        if (rd_data[p] !== e) begin
          failures++;
          if (failures < 5) $display("port %0d sel %0d idx %0d got %h exp %h", p, rd_sel[p], rd_idx[p], rd_data[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
