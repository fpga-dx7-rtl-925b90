// tb_i2s_ctrl: receives the I2S stream like a DAC (SDATA sampled on SCLK rising edges,
// left while LRCK is low, MSB one bit after the LRCK edge) and checks the received words
// equal the samples presented at each frame tick; checks 768 clocks per frame, 64 SCLK
// periods per frame and MCLK = clk/2.
module tb_i2s_ctrl;
  import dx7_pkg::*;
  logic clk = 0, rst, frame_tick, mclk, sclk, lrck, sdata;
  logic signed [AUDIO_W-1:0] left, right;
  i2s_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // DAC side
  logic [AUDIO_W-1:0] sent_l [$], sent_r [$];
  int bitpos = 0, sclk_count = 0;
  logic lr_prev = 0;
  logic [31:0] shreg;
  int frames = 0;
  always @(posedge sclk) begin
    sclk_count++;
    if (lrck != lr_prev) begin
      // the previous half-frame is complete: its word sits in the top bits after one delay bit
      if (bitpos >= 25 && sent_l.size() > 0) begin
        if (lr_prev == 0) begin
          logic [AUDIO_W-1:0] e; e = sent_l.pop_front();
          check(shreg[30 -: AUDIO_W] == e, $sformatf("left %h expected %h", shreg[30 -: AUDIO_W], e));
        end else begin
          logic [AUDIO_W-1:0] e; e = sent_r.pop_front();
          check(shreg[30 -: AUDIO_W] == e, $sformatf("right %h expected %h", shreg[30 -: AUDIO_W], e));
          frames++;
        end
      end
      bitpos = 0; shreg = 0;
    end
    shreg = {shreg[30:0], sdata};
    bitpos++;
    lr_prev = lrck;
  end

  int mclk_edges = 0;
  always @(posedge mclk) mclk_edges++;

  initial begin
    int last_tick, ticks, t, sc0;
    rst = 1; left = 0; right = 0;
    repeat (3) @(negedge clk); rst = 0;
    last_tick = -1; ticks = 0; t = 0;
    while (frames < 20) begin
      @(posedge clk); t++;
      if (frame_tick) begin
        if (last_tick >= 0) check(t - last_tick == 768, "frame length 768");
        last_tick = t; ticks++;
        // the controller takes these values at this tick
        sent_l.push_back(left); sent_r.push_back(right);
        sc0 = sclk_count;
        #1; left = AUDIO_W'($urandom); right = AUDIO_W'($urandom);
      end
    end
    check(mclk_edges * 2 >= t - 2 && mclk_edges * 2 <= t + 2, "mclk = clk/2");
    check(sclk_count >= 64 * (ticks - 1), "64 sclk per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
