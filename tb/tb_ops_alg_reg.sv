// tb_ops_alg_reg: reset values, then random writes and reads of the 16-entry algorithm /
// feedback register file against a model.
module tb_ops_alg_reg;
  logic clk = 0, rst, alg_wr;
  logic [3:0] alg_ch, alg_reg_ch;
  logic [4:0] alg_data, alg_row;
  logic [2:0] fb_data, fb;
  ops_alg_reg dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0] ma [16];
  logic [2:0] mf [16];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; alg_wr = 0; alg_ch = 0; alg_data = 0; fb_data = 0; alg_reg_ch = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 16; i++) begin
      alg_reg_ch = 4'(i); #1; checks++;
      if (alg_row !== 0 || fb !== 0) begin failures++; $display("FAIL reset %0d", i); end
      ma[i] = 0; mf[i] = 0;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      alg_wr = $urandom_range(1); alg_ch = 4'($urandom); alg_data = 5'($urandom); fb_data = 3'($urandom);
      alg_reg_ch = 4'($urandom);
      #1; checks++;
      if (alg_row !== ma[alg_reg_ch] || fb !== mf[alg_reg_ch]) begin
        failures++; if (failures < 10) $display("FAIL read ch %0d", alg_reg_ch);
      end
      @(posedge clk);
      if (alg_wr) begin ma[alg_ch] = alg_data; mf[alg_ch] = fb_data; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
