// tb_ops: drives the OPS like the EGS does (sync, then one frequency / amplitude /
// key-sync value per clock in operator 6..1, channel 1..16 order) with random
// algorithms, feedback levels, frequencies, amplitudes and key syncs, and compares every
// sample with a reference FM model built from the DX7 algorithm graphs (tb_alg_pkg):
// per operator phase accumulation, modulation = sum of modulator outputs scaled to
// +-half a cycle, feedback = previous output >>> (7 - level), cosine table, amplitude
// (carriers divided by the carrier count), carrier sum over all channels. Checks the
// 114-clock latency from sync to sample, and that an algorithm change clears feedback.
module tb_ops;
  import dx7_pkg::*;
  import tb_alg_pkg::*;
  logic clk = 0, rst, sync, key_sync, alg_wr, sample_valid;
  logic [FREQ_W-1:0] freq;
  logic [AMP_W-1:0] amp;
  ops_msg_t alg_msg;
  logic signed [SAMPLE_W-1:0] sample_data;
  ops dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  logic [15:0] cos_tbl [1024];
  // reference table: cos_table.hex[i] = round(32767*cos(2*pi*i/1024))
  initial $readmemh("tb/cos_table.hex", cos_tbl);

  // reference state
  int ch_alg [16], ch_fb [16];
  logic [21:0] ph [6][16];
  int fstate [16];
  int fb_used = 0, keysyncs = 0, algchanges = 0;

  function automatic int comp_of(input int n);
    case (n) 2: return 32768; 3: return 21845; 4: return 16384; 5: return 13107; 6: return 10923;
      default: return 65535; endcase
  endfunction

  task automatic write_alg(input int c, input int a, input int f);
    @(negedge clk);
    alg_wr = 1; alg_msg.channel = 4'(c); alg_msg.algorithm = 5'(a - 1); alg_msg.feedback = 3'(f);
    @(negedge clk); alg_wr = 0;
    ch_alg[c] = a; ch_fb[c] = f; fstate[c] = 0; algchanges++;
  endtask

  initial begin
    int fr [6][16], am [6][16];
    bit ks [6][16];
    int expected, outv [6], modv, ampc, wave, ncar, lat;
    logic [5:0] mods [6];
    logic [5:0] car;
    int fb_src, fb_dst;
    logic [21:0] acc, off;

    rst = 1; sync = 0; freq = 0; amp = 0; key_sync = 0; alg_wr = 0; alg_msg = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int c = 0; c < 16; c++) begin ch_alg[c] = 1; ch_fb[c] = 0; fstate[c] = 0; end
    for (int c = 0; c < 16; c++) write_alg(c, $urandom_range(1, 32), $urandom_range(7));
    for (int k = 0; k < 6; k++) for (int c = 0; c < 16; c++) ph[k][c] = 0;

    for (int s = 0; s < 60; s++) begin
      if (s % 10 == 9) write_alg($urandom_range(15), $urandom_range(1, 32), $urandom_range(1, 7));
      for (int k = 0; k < 6; k++) for (int c = 0; c < 16; c++) begin
        fr[k][c] = $urandom_range(200000);
        am[k][c] = (s < 2) ? 0 : $urandom_range(65535);
        ks[k][c] = (s == 0) || ($urandom_range(50) == 0);
      end
      // reference sample
      expected = 0;
      for (int c = 0; c < 16; c++) begin
        graph(ch_alg[c], mods, car, fb_src, fb_dst);
        ncar = $countones(car);
        for (int k = 5; k >= 0; k--) begin
          if (k == fb_dst) begin
            modv = (ch_fb[c] == 0) ? 0 : (fstate[c] >>> (7 - ch_fb[c]));
            if (ch_fb[c] != 0 && fstate[c] != 0) fb_used++;
          end else begin
            modv = 0;
            for (int j = 0; j < 6; j++) if (mods[k][j]) modv += outv[j];
          end
          off = 22'(modv * 64);
          acc = (ks[k][c] ? 22'd0 : ph[k][c]) + 22'(fr[k][c]);
          ph[k][c] = acc;
          if (ks[k][c] && s > 0) keysyncs++;
          wave = int'(signed'(cos_tbl[22'(acc + off) >> 12]));
          ampc = car[k] ? int'((longint'(am[k][c]) * comp_of(ncar)) >>> 16) : am[k][c];
          outv[k] = (wave * ampc) >>> 16;
          if (car[k]) expected += outv[k];
        end
        fstate[c] = outv[fb_src];
      end
      // drive
      @(negedge clk); sync = 1;
      @(negedge clk); sync = 0;
      for (int k = 5; k >= 0; k--) for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        freq = FREQ_W'(fr[k][c]); amp = AMP_W'(am[k][c]); key_sync = ks[k][c];
      end
      @(negedge clk); freq = 0; amp = 0; key_sync = 0;
      lat = 98;
      while (!sample_valid && lat < 200) begin @(negedge clk); lat++; end
      check(lat == 114, $sformatf("sample %0d latency %0d", s, lat));
      check(sample_data == SAMPLE_W'(expected), $sformatf("sample %0d: got %0d expected %0d", s, sample_data, expected));
      repeat ($urandom_range(5, 40)) @(negedge clk);
    end
    check(fb_used > 0, "feedback exercised");
    check(keysyncs > 0, "key sync exercised");
    check(algchanges > 16, "algorithm change exercised");
    $display("feedback uses %0d, key syncs %0d, algorithm writes %0d", fb_used, keysyncs, algchanges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
