// tb_egs_mod_calc: checks the modulation calculation against real-number formulas:
// pitch offset = PEG level - 2048 + LFO*PMS/2^17, amplitude = 2^((level-4095)/256) *
// 65536 with level = EG + base amplitude - 4095 - (LFO+32768)*AMS/2^16 (clamped, 0 when
// the operator is off), frequency = base * 2^(pitch/512) (saturated). Tolerance 0.5 %.
module tb_egs_mod_calc;
  import dx7_pkg::*;
  logic [11:0] peg_level, pms, eg_level, base_amp, ams;
  logic signed [15:0] lfo;
  logic signed [13:0] pitch_mod_out, pitch_mod;
  logic op_on;
  logic [19:0] base_freq, freq;
  logic [15:0] amp;
  egs_mod_calc dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask
  function automatic bit close(input real a, input real b, input real abs_tol);
    real d;
    d = a - b; if (d < 0) d = -d;
    return d <= abs_tol + 0.005 * (b < 0 ? -b : b);
  endfunction

  initial begin
    real pm_e, lvl, amp_e, f_e;
    for (int i = 0; i < 4000; i++) begin
      peg_level = 12'($urandom); pms = 12'($urandom); lfo = 16'($urandom);
      eg_level = 12'($urandom); base_amp = (i % 3 == 0) ? 12'd4095 : 12'($urandom);
      ams = (i % 2) ? 12'd0 : 12'($urandom); op_on = (i % 10 != 0);
      base_freq = 20'($urandom); pitch_mod = 14'($urandom_range(6000)) - 14'sd3000;
      #1;
      pm_e = real'(peg_level) - 2048.0 + real'(lfo) * real'(pms) / 131072.0;
      check(close(real'(pitch_mod_out), pm_e, 1.0), $sformatf("pitch %0d vs %f", pitch_mod_out, pm_e));
      lvl = real'(eg_level) + real'(base_amp) - 4095.0 - $floor((real'(lfo) + 32768.0) * real'(ams) / 65536.0);
      if (lvl < 0) lvl = 0;
      amp_e = op_on ? 65536.0 * $pow(2.0, (lvl - 4095.0) / 256.0) : 0.0;
      check(close(real'(amp), amp_e, 2.0), $sformatf("amp %0d vs %f (lvl %f)", amp, amp_e, lvl));
      f_e = real'(base_freq) * $pow(2.0, real'(pitch_mod) / 512.0);
      if (f_e > 1048575.0) f_e = 1048575.0;
      check(close(real'(freq), f_e, 2.0), $sformatf("freq %0d vs %f", freq, f_e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
