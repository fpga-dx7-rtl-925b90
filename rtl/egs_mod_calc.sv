// egs_mod_calc: EGS modulation calculation and application (combinational).
//
// Channel path (PEG + pitch LFO): pitch_mod = (PEG level - 2048) + (LFO * PMS) >> 17,
//   a signed pitch offset in 1/512 octave (PEG level 2048 means no pitch change).
// Operator path:
//   amplitude modulation  amod = ((LFO + 32768) * AMS) >> 16, 0..4095,
//   log level             lvl  = EG level + base amplitude - 4095 - amod, clamped 0..4095,
//                         in 1/256 octave (4095 = full scale),
//   linear amplitude      amp  = exp2(lvl[7:0]) >> (15 - lvl[11:8])  (16 bits, 0 when the
//                         operator is off),
//   pitch modulation      freq = base_freq * 2^(pitch_mod/512), saturated to 20 bits.
// Both exponentials use one stored octave (exp2_lut) and a shift, as the design does to
// avoid exponential arithmetic. The scalings and the log units are this implementation's
// choices.
module egs_mod_calc
  import dx7_pkg::*;
(
  // channel globals
  input  logic [LEVEL_W-1:0]   peg_level,
  input  logic [LEVEL_W-1:0]   pms,
  input  logic signed [15:0]   lfo,
  output logic signed [13:0]   pitch_mod_out,
  // operator
  input  logic [LEVEL_W-1:0]   eg_level,
  input  logic [LEVEL_W-1:0]   base_amp,
  input  logic [LEVEL_W-1:0]   ams,
  input  logic                 op_on,
  input  logic [FREQ_W-1:0]    base_freq,
  input  logic signed [13:0]   pitch_mod,
  output logic [AMP_W-1:0]     amp,
  output logic [FREQ_W-1:0]    freq
);
  logic signed [28:0] lfo_pm;
  logic [16:0]        lfo_uni;
  logic [28:0]        amod_p;
  logic [11:0]        amod;
  logic signed [14:0] lvl_s;
  logic [11:0]        lvl;
  logic [15:0]        amp_mant, frq_mant;
  logic signed [4:0]  oct;
  logic [7:0]         pfrac;
  logic [FREQ_W+15:0] fprod;
  logic [FREQ_W+31:0] fshift;   // room for base*mant*2^(8+7)

  exp2_lut u_amp_exp (.frac(lvl[7:0]), .mant(amp_mant));
  exp2_lut u_frq_exp (.frac(pfrac),    .mant(frq_mant));

  always_comb begin
    lfo_pm        = lfo * signed'({1'b0, pms});
    pitch_mod_out = 14'(signed'({2'b0, peg_level}) - 14'sd2048 + 14'(lfo_pm >>> 17));

    lfo_uni = 17'(signed'(lfo) + 17'sd32768);
    amod_p  = lfo_uni * ams;
    amod    = amod_p[27:16];
    lvl_s   = 15'(eg_level) + 15'(base_amp) - 15'sd4095 - 15'(amod);
    if (lvl_s < 0) lvl = '0;
    else           lvl = lvl_s[11:0];
    amp = op_on ? AMP_W'(amp_mant >> (4'd15 - lvl[11:8])) : '0;

    oct    = 5'(pitch_mod >>> 9);
    pfrac  = pitch_mod[8:1];
    fprod  = base_freq * frq_mant;
    // fshift = base * mant * 2^(8 + oct); freq = base * mant / 2^15 * 2^oct
    fshift = (FREQ_W+32)'(fprod) << 8;
    if (oct >= 0) fshift = fshift << oct;
    else          fshift = fshift >> (-oct);
    if ((fshift >> 23) > (FREQ_W+32)'({FREQ_W{1'b1}})) freq = '1;
    else                                               freq = FREQ_W'(fshift >> 23);
  end
endmodule
