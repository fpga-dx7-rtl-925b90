// tb_ops_phase_acc: streams random slots, increments, key syncs and offsets through the
// multiplexed phase accumulator and compares phase_out, two clocks later, with a model
// holding one phase per oscillator; checks that the offset does not accumulate.
module tb_ops_phase_acc;
  import dx7_pkg::*;
  logic clk = 0, rst, op_en, key_sync, out_en;
  logic [6:0] ch;
  logic [FREQ_W-1:0] phase_inc;
  logic [PHASE_W-1:0] phase_offset, phase_out;
  ops_phase_acc dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [PHASE_W-1:0] model [96];
  logic [PHASE_W-1:0] exp_q [$];
  logic               en_q [$];
  initial begin
    rst = 1; op_en = 0; ch = 0; phase_inc = 0; key_sync = 0; phase_offset = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // start every oscillator from zero
    for (int i = 0; i < 96; i++) begin
      op_en = 1; ch = 7'(i); key_sync = 1; phase_inc = 0; @(negedge clk);
      model[i] = 0;
    end
    key_sync = 0; op_en = 0; repeat (3) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      op_en = ($urandom_range(4) != 0); ch = 7'($urandom_range(95));
      phase_inc = FREQ_W'($urandom); key_sync = ($urandom_range(20) == 0);
      phase_offset = PHASE_W'($urandom);
      if (op_en) begin
        model[ch] = (key_sync ? '0 : model[ch]) + PHASE_W'(phase_inc);
        exp_q.push_back(model[ch] + phase_offset);
      end else exp_q.push_back('0);
      en_q.push_back(op_en);
      @(posedge clk); #1;
      if (en_q.size() > 1) begin
        logic [PHASE_W-1:0] e;
        logic en;
        e = exp_q.pop_front(); en = en_q.pop_front();
        checks++;
        if (out_en !== en || (en && phase_out !== e)) begin
          failures++;
          if (failures < 10) $display("FAIL n %0d: out_en %b phase %h expected %b %h", n, out_en, phase_out, en, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
