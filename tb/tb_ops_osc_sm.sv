// tb_ops_osc_sm: checks that op_en rises two clocks after sync and stays high for 96
// clocks, with operators 6..1 and channels 0..15 in order, slot = op*16 + channel, and
// first/last on the first and last slot.
module tb_ops_osc_sm;
  logic clk = 0, rst, sync, op_en, first, last;
  logic [2:0] op;
  logic [3:0] reg_ch;
  logic [6:0] slot;
  ops_osc_sm dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; sync = 0;
    repeat (2) @(negedge clk); rst = 0;
    repeat (3) begin
      repeat (7) @(negedge clk);
      check(!op_en, "idle before sync");
      sync = 1; @(negedge clk); sync = 0;
      check(!op_en, "not yet one clock after sync");
      @(negedge clk);
      for (int o = 5; o >= 0; o--)
        for (int c = 0; c < 16; c++) begin
          check(op_en && op == 3'(o) && reg_ch == 4'(c) && slot == 7'(o * 16 + c) &&
                first == (o == 5 && c == 0) && last == (o == 0 && c == 15),
                $sformatf("slot op %0d ch %0d", o + 1, c));
          @(negedge clk);
        end
      check(!op_en, "stops after 96");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
