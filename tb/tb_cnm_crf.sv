// tb_cnm_crf: checks the control register file: packed writes of eight
// instructions per bank-IO word, asynchronous reads of every entry, and
// that writes past the last entry are dropped.
module tb_cnm_crf;
  localparam int C = 32;
  logic clk = 0;
  logic wr_en = 0;
  logic [4:0] wr_idx = 0;
  logic [255:0] wr_data = 0;
  logic [4:0] rd_addr = 0;
  logic [31:0] rd_data;
  logic [31:0] model [C];
  int checks = 0, failures = 0;

  cnm_crf #(.C(C)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w <= C / 8; w++) begin   // last write is out of range
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(w);
      for (int k = 0; k < 8; k++) begin
        wr_data[32*k +: 32] = $urandom;
        if (w * 8 + k < C) model[w * 8 + k] = wr_data[32*k +: 32];
      end
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < C; i++) begin
      rd_addr = 5'(i);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("CRF[%0d] got %h expected %h", i, rd_data, model[i]);
      end
    end
    // overwrite one word and check the new value is visible next cycle
    @(negedge clk);
    wr_en = 1; wr_idx = 5'd1; wr_data = {8{32'hdeadbeef}};
    rd_addr = 5'd9;
    #1;
    checks++;
    if (rd_data !== model[9]) failures++;
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (rd_data !== 32'hdeadbeef) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
