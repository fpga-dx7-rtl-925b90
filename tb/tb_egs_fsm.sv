// tb_egs_fsm: checks the EGS sequencer: 128 clear cycles after reset, then per tick
// exactly 16 global issues (channels 0..15) followed by 96 operator issues in OPS order,
// first_op on the first operator issue, return to Wait, and that a tick while busy is
// ignored. The 112-cycle update length is checked.
module tb_egs_fsm;
  logic clk = 0, rst, tick;
  logic issue, is_global, first_op, clear, busy;
  logic [2:0] scope;
  logic [3:0] ch;
  logic [6:0] clear_addr;
  egs_fsm dut (.*);
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
    int n;
    rst = 1; tick = 0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 128; i++) begin
      check(clear && clear_addr == 7'(i) && !issue, $sformatf("clear %0d", i));
      @(negedge clk);
    end
    check(!clear && !busy && !issue, "wait after reset");
    repeat (3) begin
      repeat (5) @(negedge clk);
      tick = 1; @(negedge clk); tick = 0;
      n = 0;
      for (int i = 0; i < 16; i++) begin
        check(issue && is_global && scope == 3'd6 && ch == 4'(i) && !first_op, $sformatf("global %0d", i));
        if (i == 3) tick = 1;   // ignored while busy
        @(negedge clk); tick = 0; n++;
      end
      for (int o = 5; o >= 0; o--)
        for (int c = 0; c < 16; c++) begin
          check(issue && !is_global && scope == 3'(o) && ch == 4'(c) && first_op == (o == 5 && c == 0),
                $sformatf("operator %0d channel %0d", o + 1, c));
          @(negedge clk); n++;
        end
      check(n == 112, "update length");
      check(!issue && !busy, "back to wait");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
