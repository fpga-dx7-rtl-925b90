// tb_egs: programs random operator and channel-global parameters into the EGS through its
// message port, presses and releases keys, and compares the 96 frequency / amplitude /
// key-sync values streamed after every sync with an integer reference model of the
// design's arithmetic written here (envelope steps, LFO with delay and sync, pitch EG +
// LFO x PMS, amplitude from EG, base amplitude and LFO x AMS, frequency from base
// frequency and pitch offset). Checks the stream starts two clocks after sync and lasts
// 96 clocks, and counts key-on events, envelope stages and LFO activity.
module tb_egs;
  import dx7_pkg::*;
  logic clk = 0, rst, tick, msg_valid, sync, key_sync, out_valid, busy;
  egs_msg_t msg;
  logic [FREQ_W-1:0] freq;
  logic [AMP_W-1:0] amp;
  egs dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (300000) @(posedge clk);
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

  // model parameters [scope][ch], scope 6 = channel globals
  int lvl [7][16][4];
  longint rate [7][16][4];
  int p100 [7][16], p101 [7][16], p110 [7][16], p111 [7][16];
  // model state
  longint egv [7][16];
  int egs_st [7][16];
  int lfo_ph [16], lfo_dc [16], lfo_v [16], pmod [16];
  bit kprev [16], know [16], kev [16];
  int stage_seen [4], key_events = 0, lfo_active = 0;

  task automatic send(input egs_msg_t m);
    @(negedge clk); msg = m; msg_valid = 1;
    @(negedge clk); msg_valid = 0;
  endtask
  task automatic set_param(input int sc, input int c, input int id, input int v);
    egs_msg_t m;
    m = '0; m.channel = 4'(c); m.scope = 3'(sc); m.is_rate = 0; m.param_id = 3'(id); m.value = 21'(v);
    send(m);
    case (id) 0, 1, 2, 3: lvl[sc][c][id] = v & 12'hFFF; 4: p100[sc][c] = v & 20'hFFFFF;
      5: p101[sc][c] = v & 12'hFFF; 6: p110[sc][c] = v & 17'h1FFFF; default: p111[sc][c] = v & 17'h1FFFF; endcase
  endtask
  task automatic set_rate(input int sc, input int c, input int st, input int e, input int mant);
    egs_msg_t m;
    longint r;
    m = '0; m.channel = 4'(c); m.scope = 3'(sc); m.is_rate = 1; m.stage = 2'(st);
    m.rate_exp = 4'(e); m.rate_mant = 18'(mant);
    send(m);
    r = longint'(mant) << e;
    rate[sc][c][st] = (r > 64'hFFFFFFFF) ? 64'hFFFFFFFF : r;
  endtask

  function automatic void env(input int sc, input int c, input bit kon, input bit ke);
    longint t, r, v;
    int s;
    v = egv[sc][c];
    s = ke ? 0 : (!kon && egs_st[sc][c] != 3) ? 3 : egs_st[sc][c];
    t = longint'(lvl[sc][c][s]) << 20; r = rate[sc][c][s];
    if (v < t) v = (v + r > t) ? t : v + r;
    else if (v > t) v = (v - r < t) ? t : v - r;
    egv[sc][c] = v;
    egs_st[sc][c] = (v == t && s < 2) ? s + 1 : s;
    stage_seen[egs_st[sc][c]]++;
  endfunction

  function automatic int lfo_wave(input int w, input int ph);
    int u;
    u = ph >> 6;
    case (w)
      0: return (u < 32768) ? 2 * u - 32768 : 2 * (65535 - u) - 32768;
      1: return 32767 - u;
      2: return u - 32768;
      3: return (u >= 32768) ? -32767 : 32767;
      default: return int'(signed'(cos_tbl[((ph - (1 << 20)) & 22'h3FFFFF) >> 12]));
    endcase
  endfunction

  // expected stream of one sample
  int e_freq [96], e_amp [96];
  bit e_ks [96];
  task automatic model_sample();
    for (int c = 0; c < 16; c++) begin
      int lfo, speed;
      know[c] = p111[6][c][0];
      kev[c] = know[c] && !kprev[c];
      kprev[c] = know[c];
      if (kev[c]) key_events++;
      env(6, c, know[c], kev[c]);
      speed = (p111[6][c] >> 5) & 12'hFFF;
      lfo = (lfo_dc[c] >= p100[6][c] && !kev[c]) ? lfo_wave((p111[6][c] >> 1) & 7, lfo_ph[c]) : 0;
      if (lfo != 0) lfo_active++;
      lfo_ph[c] = (p111[6][c][4] && kev[c]) ? 0 : (lfo_ph[c] + speed) & 22'h3FFFFF;
      if (kev[c]) lfo_dc[c] = 0; else if (lfo_dc[c] < p100[6][c]) lfo_dc[c]++;
      lfo_v[c] = lfo;
      pmod[c] = int'(egv[6][c] >> 20) - 2048 + ((lfo * p101[6][c]) >>> 17);
    end
    for (int k = 5; k >= 0; k--)
      for (int c = 0; c < 16; c++) begin
        int lv, amod, oct, idx, i;
        longint f;
        env(k, c, know[c], kev[c]);
        amod = ((lfo_v[c] + 32768) * p101[k][c]) >> 16;
        lv = int'(egv[k][c] >> 20) + ((p110[k][c] >> 5) & 12'hFFF) - 4095 - amod;
        if (lv < 0) lv = 0;
        i = (5 - k) * 16 + c;
        e_amp[i] = p110[k][c][0] ? (int'(exp_tbl[lv & 255]) >> (15 - (lv >> 8))) : 0;
        oct = pmod[c] >>> 9; idx = (pmod[c] >> 1) & 255;
        f = (longint'(p100[k][c]) * exp_tbl[idx]) << 8;
        if (oct >= 0) f = f << oct; else f = f >> (-oct);
        f = f >> 23;
        e_freq[i] = (f > 20'hFFFFF) ? 20'hFFFFF : int'(f);
        e_ks[i] = p110[k][c][4] && kev[c];
      end
  endtask

  initial begin
    int got_f [96], got_a [96];
    bit got_k [96];
    int t0, ks_seen;
    rst = 1; tick = 0; msg_valid = 0; msg = '0;
    for (int s = 0; s < 7; s++) for (int c = 0; c < 16; c++) begin
      for (int i = 0; i < 4; i++) begin lvl[s][c][i] = 0; rate[s][c][i] = 0; end
      p100[s][c] = 0; p101[s][c] = 0; p110[s][c] = 0; p111[s][c] = 0; egv[s][c] = 0; egs_st[s][c] = 0;
    end
    for (int c = 0; c < 16; c++) begin lfo_ph[c] = 0; lfo_dc[c] = 0; kprev[c] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    repeat (140) @(negedge clk);
    check(!busy, "reset walk finished");
    ks_seen = 0;
    for (int s = 0; s < 45; s++) begin
      if (s == 2) begin
        for (int c = 0; c < 16; c++) begin
          for (int sc = 0; sc < 7; sc++) begin
            for (int i = 0; i < 4; i++) begin
              set_param(sc, c, i, (sc == 6) ? $urandom_range(1500, 2600) : $urandom_range(4095));
              set_rate(sc, c, i, $urandom_range(14), $urandom_range(262143));
            end
            set_param(sc, c, 4, (sc == 6) ? $urandom_range(6) : $urandom_range(1048575));
            set_param(sc, c, 5, $urandom_range(4095));
            if (sc < 6) set_param(sc, c, 6, ($urandom_range(4095) << 5) | ($urandom_range(1) << 4) | ($urandom_range(9) != 0));
          end
          set_param(6, c, 7, ($urandom_range(4095) << 5) | ($urandom_range(1) << 4) | ($urandom_range(4) << 1));
        end
      end
      if (s == 5 || s == 30) for (int c = 0; c < 16; c++) if (c % 3 != 0) set_param(6, c, 7, p111[6][c] | 1);
      if (s == 22) for (int c = 0; c < 16; c++) set_param(6, c, 7, p111[6][c] & ~1);
      model_sample();
      @(negedge clk); tick = 1; @(negedge clk); tick = 0;
      t0 = 0;
      while (!sync && t0 < 100) begin @(negedge clk); t0++; end
      check(sync, "sync pulse");
      @(negedge clk); @(negedge clk);   // values start two clocks after sync
      for (int i = 0; i < 96; i++) begin
        got_f[i] = freq; got_a[i] = amp; got_k[i] = key_sync;
        check(out_valid, "stream valid");
        @(negedge clk);
      end
      check(!out_valid, "stream ends after 96");
      for (int i = 0; i < 96; i++) begin
        check(got_f[i] == e_freq[i] && got_a[i] == e_amp[i] && got_k[i] == e_ks[i],
              $sformatf("sample %0d slot %0d: f %0d/%0d a %0d/%0d ks %0d/%0d", s, i, got_f[i], e_freq[i], got_a[i], e_amp[i], got_k[i], e_ks[i]));
        if (got_k[i]) ks_seen++;
      end
      repeat (20) @(negedge clk);
    end
    for (int i = 0; i < 4; i++) check(stage_seen[i] > 0, $sformatf("envelope stage %0d reached", i));
    check(key_events > 0 && ks_seen > 0, "key on / key sync");
    check(lfo_active > 0, "LFO active");
    $display("key events %0d, key syncs %0d, LFO active %0d", key_events, ks_seen, lfo_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
