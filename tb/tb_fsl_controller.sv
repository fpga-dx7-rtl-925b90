// tb_fsl_controller: sends random control words of every kind (EGS rate and parameter,
// operator and global scope, OPS algorithm, volume, pan, ignored component 00) with
// random gaps, and checks that each word is read in the clock it exists, produces exactly
// one strobe to the right destination on the next clock, and that the decoded fields
// match the protocol's bit positions.
module tb_fsl_controller;
  import dx7_pkg::*;
  logic clk = 0, rst;
  logic [31:0] FSL_S_Data;
  logic FSL_S_Exists, FSL_S_Control, FSL_S_Read;
  egs_msg_t egs_msg;
  ops_msg_t ops_msg;
  logic egs_wr, ops_wr, vol_wr, pan_wr;
  logic [7:0] vol_data, pan_data;
  fsl_controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int kinds [5];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] w;
    int kind;
    rst = 1; FSL_S_Data = 0; FSL_S_Exists = 0; FSL_S_Control = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      w = $urandom;
      kind = $urandom_range(4);       // 0 EGS, 1 OPS, 2 volume, 3 pan, 4 ignored
      if (kind == 0 && w[27:25] == 3'b111) w[27:25] = 3'($urandom_range(6));
      if (kind != 0) begin w[27:25] = 3'b111; w[24:23] = (kind == 4) ? 2'b00 : 2'(kind); end
      kinds[kind]++;
      @(negedge clk);
      FSL_S_Data = w; FSL_S_Exists = 1;
      #1 check(FSL_S_Read, "read while data exists");
      @(negedge clk);
      FSL_S_Exists = 0; FSL_S_Data = $urandom;
      #1 check(!FSL_S_Read, "no read without data");
      check(egs_wr == (kind == 0) && ops_wr == (kind == 1) && vol_wr == (kind == 2) && pan_wr == (kind == 3),
            $sformatf("strobe for kind %0d", kind));
      if (kind == 0) begin
        check(egs_msg.channel == w[31:28] && egs_msg.scope == w[27:25] && egs_msg.is_rate == w[24], "egs header");
        if (w[24]) check(egs_msg.stage == w[23:22] && egs_msg.rate_exp == w[21:18] && egs_msg.rate_mant == w[17:0], "rate fields");
        else       check(egs_msg.param_id == w[23:21] && egs_msg.value == w[20:0], "parameter fields");
      end
      if (kind == 1) check(ops_msg.channel == w[31:28] && ops_msg.algorithm == w[7:3] && ops_msg.feedback == w[2:0], "ops fields");
      if (kind == 2) check(vol_data == w[7:0], "volume");
      if (kind == 3) check(pan_data == w[7:0], "pan");
      repeat ($urandom_range(2)) @(negedge clk);
    end
    for (int k = 0; k < 5; k++) check(kinds[k] > 0, "every message kind sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
