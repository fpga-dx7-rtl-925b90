// dx7_pkg: widths, constants and message types shared by the FM synthesizer blocks.
//
// The synthesizer is time-multiplexed: 16 channels (voices) of 6 operators each are
// computed one per clock cycle, operator 6 first, channel 1..16 within each operator.
// Widths that the control protocol fixes (levels 12 bits, base frequency 20 bits,
// rates as a 4-bit exponent and 18-bit mantissa, 8-bit volume/pan, 24-bit audio) follow
// that protocol; internal widths (phase, amplitude, sample) are this design's choice.
package dx7_pkg;

  localparam int NUM_CH     = 16;   // polyphony
  localparam int NUM_OPS    = 6;    // operators per voice
  localparam int NUM_SLOTS  = NUM_CH * NUM_OPS;  // 96 oscillators
  localparam int GLOBAL_OP  = 6;    // "operator 7" address space holds channel globals

  localparam int LEVEL_W    = 12;   // EG / PEG levels, AMS, PMS, base amplitude
  localparam int FREQ_W     = 20;   // base frequency = phase increment per sample
  localparam int RATE_W     = 32;   // decoded rate (mantissa << exponent)
  localparam int EGV_W      = 32;   // envelope state: 12-bit level . 20-bit fraction
  localparam int AMP_W      = 16;   // linear amplitude handed to OPS
  localparam int PHASE_W    = 22;   // oscillator phase accumulator
  localparam int LFO_PH_W   = 22;   // LFO phase accumulator
  localparam int WAVE_W     = 16;   // cosine table output, signed
  localparam int SAMPLE_W   = 20;   // OPS output (sum of 16 voices)
  localparam int AUDIO_W    = 24;   // mixer / I2S sample width
  localparam int VOL_W      = 8;

  // EGS parameter ids (Appendix-style protocol, bits 23-21 of an EGS parameter message)
  typedef enum logic [2:0] {
    PID_L1 = 3'd0, PID_L2 = 3'd1, PID_L3 = 3'd2, PID_L4 = 3'd3,
    PID_FREQ_DELAY = 3'd4,  // operator: base frequency, global: LFO delay
    PID_AMS_PMS    = 3'd5,  // operator: AMS, global: PMS
    PID_OPPARAM    = 3'd6,  // operator: base amplitude + sync on + operator on
    PID_LFOPARAM   = 3'd7   // global: LFO speed + sync + wave + key on
  } egs_pid_e;

  // Write request from the FSL controller to the EGS parameter memory
  typedef struct packed {
    logic [3:0]  channel;
    logic [2:0]  scope;      // 0..5 operator 1..6, 6 global
    logic        is_rate;
    logic [1:0]  stage;      // rate messages: R1..R4
    logic [3:0]  rate_exp;
    logic [17:0] rate_mant;
    logic [2:0]  param_id;   // parameter messages
    logic [20:0] value;
  } egs_msg_t;

  // Algorithm write request from the FSL controller to OPS
  typedef struct packed {
    logic [3:0] channel;
    logic [4:0] algorithm;   // 0..31 = DX7 algorithm 1..32
    logic [2:0] feedback;
  } ops_msg_t;

  // LFO waveforms (3-bit Wave field)
  typedef enum logic [2:0] {
    LFO_TRI = 3'd0, LFO_SAW_DOWN = 3'd1, LFO_SAW_UP = 3'd2,
    LFO_SQUARE = 3'd3, LFO_SINE = 3'd4, LFO_SAMPLE_HOLD = 3'd5
  } lfo_wave_e;

  // Envelope stages
  typedef enum logic [1:0] {EG_R1 = 2'd0, EG_R2 = 2'd1, EG_SUSTAIN = 2'd2, EG_RELEASE = 2'd3} eg_stage_e;

  // OPS modulation source select (phase offset of the operator being started)
  typedef enum logic [2:0] {
    MOD_NONE = 3'd0,   // no modulation
    MOD_OUT  = 3'd1,   // output of the operator computed 16 slots earlier
    MOD_MREG = 3'd2,   // accumulated modulator sum in the M-Reg file
    MOD_MSUM = 3'd3,   // M-Reg plus the operator output arriving now
    MOD_FREG = 3'd4,   // raw F-Reg (stored output of the feedback operator)
    MOD_FB   = 3'd5    // shifted F-Reg: self feedback
  } mod_sel_e;

  // M-Reg file write mode
  typedef enum logic [1:0] {MREG_HOLD = 2'd0, MREG_LOAD = 2'd1, MREG_ACC = 2'd2} mren_e;

  // One word of the OPS control ROM, for one algorithm and one operator
  typedef struct packed {
    mod_sel_e   mod_sel;   // how this operator's phase offset is formed
    logic       oren;      // this operator is a carrier: add into O-Reg
    mren_e      mren;      // what this operator's output does to the M-Reg
    logic       fren;      // this operator's output is stored in the F-Reg
    logic [2:0] ncar;      // number of carriers (compensation)
  } ops_ctrl_t;

endpackage
