// egs_lfo: per-sample step of one channel's low-frequency oscillator.
//
// A 22-bit phase accumulator advances by the 12-bit Speed value every sample
// (speed 4095 at 52.08 kHz is about 50 Hz). With Sync set, a key-on event restarts the
// phase at zero. A delay counter restarts at key on and the LFO output stays zero until it
// has counted LFO-delay samples. The waveform generator makes triangle, saw down, saw up,
// square, sine (from the shared cosine table) or sample-and-hold (a new random value taken
// from `rnd` each time the phase wraps). Output is signed 16 bits.
// Combinational: the EGS keeps phase, delay count and held value in its Global RAM.
// Phase acc, sine table and wave generator follow the EGS pipeline; the waveform set and
// encodings, the phase width and the delay counter are this implementation's choices.
module egs_lfo
  import dx7_pkg::*;
(
  input  logic [LFO_PH_W-1:0] phase,
  input  logic [19:0]         delay_cnt,
  input  logic [15:0]         held,      // sample-and-hold value
  input  logic [11:0]         speed,
  input  logic                sync,
  input  lfo_wave_e           wave,
  input  logic [19:0]         delay,
  input  logic                key_event,
  input  logic [15:0]         rnd,
  output logic [LFO_PH_W-1:0] phase_next,
  output logic [19:0]         delay_cnt_next,
  output logic [15:0]         held_next,
  output logic signed [15:0]  lfo_out
);
  logic [LFO_PH_W:0]   sum;
  logic [15:0]         u;
  logic signed [15:0]  sine, value;
  logic [LFO_PH_W-1:0] sine_phase;

  // sine = cos(phase - quarter period)
  assign sine_phase = phase - LFO_PH_W'(1 << (LFO_PH_W-2));
  cos_lut #(.PHASE_W(LFO_PH_W), .LATENCY(0)) u_sine (.clk(1'b0), .phase(sine_phase), .wave(sine));

  always_comb begin
    sum        = {1'b0, phase} + (LFO_PH_W+1)'(speed);
    phase_next = (sync && key_event) ? '0 : sum[LFO_PH_W-1:0];
    held_next  = sum[LFO_PH_W] ? rnd : held;

    if (key_event)             delay_cnt_next = '0;
    else if (delay_cnt < delay) delay_cnt_next = delay_cnt + 20'd1;
    else                        delay_cnt_next = delay_cnt;

    u = phase[LFO_PH_W-1 -: 16];
    unique case (wave)
      LFO_TRI:         value = signed'({u[15] ? ~u[14:0] : u[14:0], 1'b0} ^ 16'h8000);
      LFO_SAW_DOWN:    value = signed'(~u ^ 16'h8000);
      LFO_SAW_UP:      value = signed'(u ^ 16'h8000);
      LFO_SQUARE:      value = u[15] ? -16'sd32767 : 16'sd32767;
      LFO_SINE:        value = sine;
      LFO_SAMPLE_HOLD: value = signed'(held);
      default:         value = '0;
    endcase
    lfo_out = (delay_cnt >= delay && !key_event) ? value : '0;
  end
endmodule
