// tb_dx7_poly: the 16-voice polyphony workload, end to end at default parameters.
//
// All 16 channels are given a patch over the FSL port, each with a different algorithm
// (1, 3, 5, ..., 31) and feedback level and six operators at different frequencies and
// amplitudes, and all 16 keys are pressed in the same sample, so all 96 oscillators sound
// at once. Every received I2S word is compared with an FM reference model of the 16 voices
// (algorithm graphs from tb_alg_pkg, instant envelopes, key sync, feedback, carrier
// compensation, mixer volume). Counted mechanisms: key syncs, envelope stages, LFO
// activity, feedback, M-Reg accumulation; each must happen at least once.
module tb_dx7_poly;
  import dx7_pkg::*;
  import tb_alg_pkg::*;
  logic clk = 0, rst;
  logic [31:0] FSL_S_Data;
  logic FSL_S_Exists, FSL_S_Control, FSL_S_Read;
  logic i2s_mclk, i2s_sclk, i2s_lrck, i2s_sdata;
  dx7_top dut (.*);
  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [15:0] cos_tbl [1024];
  logic [15:0] exp_tbl [256];
  // reference tables: cos_table.hex[i] = round(32767*cos(2*pi*i/1024)), exp2_table.hex[i] = round(32768*2^(i/256))
  initial begin
    $readmemh("tb/cos_table.hex", cos_tbl);
    $readmemh("tb/exp2_table.hex", exp_tbl);
  end

  // ------------------------------------------------------------ FSL driver
  task automatic fsl_send(input logic [31:0] w);
    @(negedge clk); FSL_S_Data = w; FSL_S_Exists = 1;
    @(negedge clk); FSL_S_Exists = 0;
  endtask
  function automatic logic [31:0] egs_param(int ch, int sc, int id, int v);
    return {4'(ch), 3'(sc), 1'b0, 3'(id), 21'(v)};
  endfunction
  function automatic logic [31:0] egs_rate(int ch, int sc, int st, int e, int m);
    return {4'(ch), 3'(sc), 1'b1, 2'(st), 4'(e), 18'(m)};
  endfunction
  function automatic logic [31:0] ops_alg(int ch, int alg, int fb);
    return {4'(ch), 3'b111, 2'b01, 15'd0, 5'(alg - 1), 3'(fb)};
  endfunction
  function automatic logic [31:0] mix_vol(int v);
    return {4'd0, 3'b111, 2'b10, 15'd0, 8'(v)};
  endfunction

  // ------------------------------------------------------------ voice model
  localparam int NV = 16;
  int v_ch [NV];
  int v_alg [NV], v_fb [NV], v_fstate [NV];
  int v_freq [NV][6], v_amp [NV][6];
  bit v_on [NV], v_start [NV];
  logic [21:0] v_ph [NV][6];
  int volume = 255;

  function automatic int model_sample();
    logic [5:0] mods [6];
    logic [5:0] car;
    int fb_src, fb_dst, outv [6], modv, ampc, lv, a, comp, total;
    logic [21:0] acc;
    total = 0;
    for (int v = 0; v < NV; v++) begin
      graph(v_alg[v], mods, car, fb_src, fb_dst);
      case ($countones(car)) 2: comp = 32768; 3: comp = 21845; 4: comp = 16384; 5: comp = 13107;
        6: comp = 10923; default: comp = 65535; endcase
      for (int k = 5; k >= 0; k--) begin
        if (k == fb_dst) modv = (v_fb[v] == 0) ? 0 : (v_fstate[v] >>> (7 - v_fb[v]));
        else begin
          modv = 0;
          for (int j = 0; j < 6; j++) if (mods[k][j]) modv += outv[j];
        end
        // envelope: instant, 4095 while the key is held, 0 after release
        lv = (v_on[v] ? 4095 : 0) + v_amp[v][k] - 4095;
        if (lv < 0) lv = 0;
        a = int'(exp_tbl[lv & 255]) >> (15 - (lv >> 8));
        acc = (v_start[v] ? 22'd0 : v_ph[v][k]) + 22'(v_freq[v][k]);
        v_ph[v][k] = acc;
        ampc = car[k] ? int'((longint'(a) * comp) >>> 16) : a;
        outv[k] = (int'(signed'(cos_tbl[22'(acc + 22'(modv * 64)) >> 12])) * ampc) >>> 16;
        if (car[k]) total += outv[k];
      end
      v_fstate[v] = outv[fb_src];
      v_start[v] = 0;
    end
    return total;
  endfunction

  // ------------------------------------------------------------ tick tracking and expected words
  int ticks = 0;
  bit playing = 0;
  logic [AUDIO_W-1:0] expect_q [$];      // words the I2S controller will send, in order
  int cur_sample = 0;                     // model sample of the previous tick
  always @(posedge clk) if (!rst && dut.tick) begin
    ticks <= ticks + 1;
  end

  // ------------------------------------------------------------ DAC receiver
  int bitpos = 0, frames_checked = 0;
  logic lr_prev = 0;
  logic [31:0] shreg;
  logic [AUDIO_W-1:0] exp_frame;
  bit have_frame = 0;
  always @(posedge i2s_sclk) begin
    if (i2s_lrck != lr_prev) begin
      if (bitpos >= 25 && have_frame) begin
        check(shreg[30 -: AUDIO_W] == exp_frame,
              $sformatf("%s word %h expected %h (frame %0d)", lr_prev ? "right" : "left", shreg[30 -: AUDIO_W], exp_frame, frames_checked));
        if (lr_prev) frames_checked++;
      end
      if (!i2s_lrck) begin   // a new frame starts: its words were latched at the last tick
        have_frame = expect_q.size() > 0;
        if (have_frame) exp_frame = expect_q.pop_front();
      end
      bitpos = 0; shreg = 0;
    end
    shreg = {shreg[30:0], i2s_sdata};
    bitpos++;
    lr_prev = i2s_lrck;
  end

  // ------------------------------------------------------------ mechanism counters (observation only)
  int n_keysync = 0, n_stage [4], n_lfo = 0, n_fb = 0, n_macc = 0, n_algchg = 0, n_vol = 0, n_release = 0;
  int peak = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_egs.key_sync) n_keysync++;
    // an instant attack enters and leaves R1 in one step: count that step as R1
    if (dut.u_egs.s1_valid && dut.u_egs.key_event && !dut.u_egs.s1_global) n_stage[0]++;
    if (dut.u_egs.st_we && dut.u_egs.st_wd.stage != EG_R1) n_stage[dut.u_egs.st_wd.stage]++;
    if (dut.u_egs.g_we && dut.u_egs.g_wd.lfo_val != 0) n_lfo++;
    if (dut.u_ops.op_en && dut.u_ops.ctrl.mod_sel == MOD_FB && dut.u_ops.fb != 0 && dut.u_ops.f_cur != 0) n_fb++;
    if (dut.u_ops.bus_tag.valid && dut.u_ops.bus_tag.mren == MREG_ACC) n_macc++;
  end

  task automatic wait_ticks(input int n);
    int t;
    t = ticks + n;
    while (ticks < t) @(negedge clk);
  endtask

  // At every tick from now on, queue the word the I2S controller takes at that tick: the
  // mixer result of the model sample computed after the previous tick.
  task automatic play(input int n);
    for (int i = 0; i < n; i++) begin
      wait_ticks(1);
      if (cur_sample > peak) peak = cur_sample;
      if (-cur_sample > peak) peak = -cur_sample;
      expect_q.push_back(AUDIO_W'((longint'(cur_sample) * volume) >>> 4));
      cur_sample = model_sample();
      repeat (400) @(negedge clk);      // messages sent after this land before the next tick
    end
  endtask

  initial begin
    rst = 1; FSL_S_Data = 0; FSL_S_Exists = 0; FSL_S_Control = 0;
    for (int v = 0; v < NV; v++) begin
      v_ch[v] = v; v_alg[v] = 2 * v + 1; v_fb[v] = v % 8;
      v_fstate[v] = 0; v_on[v] = 0; v_start[v] = 0;
      for (int k = 0; k < 6; k++) begin
        v_freq[v][k] = 9000 + 2500 * v + 7919 * k;
        v_amp[v][k]  = 3600 + (v * 37 + k * 53) % 496;
        v_ph[v][k]   = 0;
      end
    end
    repeat (5) @(negedge clk); rst = 0;
    wait_ticks(2);
    repeat (300) @(negedge clk);
    // patch: all operators off until the key is pressed, so the output is silent
    for (int v = 0; v < NV; v++) begin
      fsl_send(ops_alg(v_ch[v], v_alg[v], v_fb[v]));
      for (int k = 0; k < 6; k++) begin
        for (int i = 0; i < 4; i++) begin
          fsl_send(egs_param(v_ch[v], k, i, (i == 3) ? 0 : 4095));
          fsl_send(egs_rate(v_ch[v], k, i, 14, 18'h3FFFF));
        end
        fsl_send(egs_param(v_ch[v], k, 4, v_freq[v][k]));
        fsl_send(egs_param(v_ch[v], k, 5, 0));
        fsl_send(egs_param(v_ch[v], k, 6, (v_amp[v][k] << 5) | (1 << 4) | 0));
      end
      for (int i = 0; i < 4; i++) begin
        fsl_send(egs_param(v_ch[v], 6, i, 2048));
        fsl_send(egs_rate(v_ch[v], 6, i, 14, 18'h3FFFF));
      end
      fsl_send(egs_param(v_ch[v], 6, 4, 3));          // LFO delay
      fsl_send(egs_param(v_ch[v], 6, 5, 0));          // PMS
      fsl_send(egs_param(v_ch[v], 6, 7, (200 << 5) | (0 << 4) | (4 << 1) | 0));
    end
    fsl_send(mix_vol(200)); volume = 200; n_vol++;
    play(3);
    // key on: operators on, key pressed
    for (int v = 0; v < NV; v++) begin
      for (int k = 0; k < 6; k++) fsl_send(egs_param(v_ch[v], k, 6, (v_amp[v][k] << 5) | (1 << 4) | 1));
      fsl_send(egs_param(v_ch[v], 6, 7, (200 << 5) | (0 << 4) | (4 << 1) | 1));
      v_on[v] = 1; v_start[v] = 1;
    end
    play(25);
    wait_ticks(2);
    repeat (200) @(negedge clk);

    check(frames_checked >= 24, $sformatf("frames checked %0d", frames_checked));
    check(n_keysync > 0, "key sync happened");
    for (int i = 0; i < 4; i++) check(n_stage[i] > 0, $sformatf("envelope stage %0d happened", i));
    check(n_lfo > 0, "LFO ran");
    check(n_fb > 0, "feedback happened");
    check(n_macc > 0, "M-Reg accumulation happened");
    $display("frames %0d keysync %0d stages %0d/%0d/%0d/%0d lfo %0d fb %0d macc %0d alg %0d vol %0d release %0d",
             frames_checked, n_keysync, n_stage[0], n_stage[1], n_stage[2], n_stage[3], n_lfo, n_fb, n_macc,
             n_algchg, n_vol, n_release);
    $display("peak OPS sample %0d of 16 voices", peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
