// tb_egs_lfo: checks the LFO step: phase advance by Speed and its wrap, phase restart on
// a key-on event with Sync, the delay counter gating the output, each waveform's value at
// random phases (computed here from the waveform definitions, sine from $sin within 1 LSB)
// and the sample-and-hold update on phase wrap.
module tb_egs_lfo;
  import dx7_pkg::*;
  logic [21:0] phase, phase_next;
  logic [19:0] delay_cnt, delay_cnt_next, delay;
  logic [15:0] held, held_next, rnd;
  logic [11:0] speed;
  logic sync, key_event;
  lfo_wave_e wave;
  logic signed [15:0] lfo_out;
  egs_lfo dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  function automatic int expected_wave(input int w, input logic [21:0] p, input logic [15:0] h);
    int u;
    real s;
    u = int'(p >> 6);
    case (w)
      0: return (u < 32768) ? 2 * u - 32768 : 2 * (65535 - u) - 32768;
      1: return 32767 - u;
      2: return u - 32768;
      3: return (u >= 32768) ? -32767 : 32767;
      4: begin s = 32767.0 * $sin(2.0 * 3.14159265358979 * real'(p >> 12) / 1024.0);
               return $rtoi(s + (s >= 0 ? 0.5 : -0.5)); end
      default: return int'(signed'(h));
    endcase
  endfunction

  initial begin
    int e, d;
    for (int i = 0; i < 3000; i++) begin
      phase = 22'($urandom); delay = 20'($urandom_range(100)); delay_cnt = 20'($urandom_range(120));
      held = 16'($urandom); rnd = 16'($urandom); speed = 12'($urandom);
      sync = $urandom_range(1); key_event = ($urandom_range(7) == 0);
      wave = lfo_wave_e'($urandom_range(5));
      #1;
      check(phase_next == ((sync && key_event) ? 22'd0 : 22'(phase + 22'(speed))), "phase step");
      check(held_next == ((23'(phase) + 23'(speed) >= 23'(1 << 22)) ? rnd : held), "sample and hold");
      check(delay_cnt_next == (key_event ? 20'd0 : (delay_cnt < delay) ? delay_cnt + 1 : delay_cnt), "delay count");
      if (key_event || delay_cnt < delay) check(lfo_out == 0, "output gated during delay");
      else begin
        e = expected_wave(int'(wave), phase, held);
        d = int'(lfo_out) - e;
        check(d <= 1 && d >= -1, $sformatf("wave %0d phase %h got %0d expected %0d", wave, phase, lfo_out, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
