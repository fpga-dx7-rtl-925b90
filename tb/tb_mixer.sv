// tb_mixer: volume and pan writes and random samples through the mixer, with panning
// disabled (main configuration) and enabled, against the scaling formulas; checks the
// one-clock output register.
module tb_mixer;
  import dx7_pkg::*;
  logic clk = 0, rst;
  logic signed [SAMPLE_W-1:0] sample;
  logic sample_valid, vol_wr, pan_wr;
  logic [7:0] vol_data, pan_data;
  logic signed [AUDIO_W-1:0] l0, r0, l1, r1;
  logic v0, v1;
  mixer #(.PAN_EN(1'b0)) dut0 (.clk, .rst, .sample, .sample_valid, .vol_wr, .vol_data,
    .pan_wr, .pan_data, .left(l0), .right(r0), .out_valid(v0));
  mixer #(.PAN_EN(1'b1)) dut1 (.clk, .rst, .sample, .sample_valid, .vol_wr, .vol_data,
    .pan_wr, .pan_data, .left(l1), .right(r1), .out_valid(v1));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin
    int vol, pan;
    longint s;
    rst = 1; sample = 0; sample_valid = 0; vol_wr = 0; pan_wr = 0; vol_data = 0; pan_data = 0;
    repeat (2) @(negedge clk); rst = 0;
    vol = 255; pan = 128;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      vol_wr = ($urandom_range(9) == 0); vol_data = 8'($urandom);
      pan_wr = ($urandom_range(9) == 0); pan_data = 8'($urandom);
      @(negedge clk);
      if (vol_wr) vol = vol_data;
      if (pan_wr) pan = pan_data;
      vol_wr = 0; pan_wr = 0;
      sample = SAMPLE_W'($urandom); sample_valid = 1;
      s = longint'(sample);
      @(negedge clk); sample_valid = 0;
      check(v0 && v1, "out_valid one clock after sample_valid");
      check(l0 == AUDIO_W'((s * vol) >>> 4) && r0 == l0, $sformatf("no-pan %0d*%0d -> %0d", s, vol, l0));
      check(l1 == AUDIO_W'((s * vol * (255 - pan)) >>> 11), "pan left");
      check(r1 == AUDIO_W'((s * vol * pan) >>> 11), "pan right");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
