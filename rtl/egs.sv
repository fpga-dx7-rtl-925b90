// egs: envelope and modulation generator ("EGS") for 16 channels x 6 operators.
//
// Once per sample (on `tick`) the EGS sequencer first updates the 16 channel globals and
// then the 96 operators, one memory address per clock:
//   * Memory select: the sequencer addresses the OP RAM ({scope, channel}; scope 6 is the
//     channel-global "operator 7" space) and the Global RAM (channel).
//   * Memory decode / update: the shared envelope step (egs_env_gen) advances the operator
//     EG or, for scope 6, the pitch EG; for globals the LFO (egs_lfo) is stepped and the
//     channel pitch offset (pitch EG + LFO x PMS) is formed; new state is written back.
//     The Global RAM is written only while globals are updated.
//   * Modulation calculation / application (egs_mod_calc): amplitude from EG level, base
//     amplitude and LFO x AMS; frequency from base frequency and the channel pitch offset.
// The OPS-facing outputs (freq, amp, key_sync) then stream out, one operator per clock in
// OPS order (operator 6..1, channel 1..16 within each), starting two clocks after the
// single-cycle `sync` pulse. `key_sync` marks a key-on event on an operator with Sync on.
// A key-on event is the channel's Key-on parameter (LFO parameter message, bit 0) seen set
// where it was clear in the previous sample.
//
// Parameter writes (`msg`/`msg_valid`, from the FSL controller) go straight into the
// parameter arrays of the OP RAM through their own write port; they are dropped while the
// Reset state clears the memories. The OP RAM is built as parallel simple dual-port
// arrays sharing one read address (levels, rates, frequency/delay, AMS/PMS, operator
// parameters, LFO parameters, envelope state).
// The two-memory organisation, the operator-7 mapping, the shared EG wiring and the four
// sequencer states follow the design; pipeline depth, widths and scalings are this
// implementation's choices.
module egs
  import dx7_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  egs_msg_t           msg,
  input  logic               msg_valid,
  output logic               sync,
  output logic [FREQ_W-1:0]  freq,
  output logic [AMP_W-1:0]   amp,
  output logic               key_sync,
  output logic               out_valid,
  output logic               busy
);
  typedef struct packed {
    logic [EGV_W-1:0]    peg_value;
    eg_stage_e           peg_stage;
    logic [LFO_PH_W-1:0] lfo_phase;
    logic [19:0]         lfo_delay_cnt;
    logic [15:0]         lfo_held;
    logic signed [15:0]  lfo_val;
    logic signed [13:0]  pitch_mod;
    logic                key_prev;
    logic                key_now;
    logic                key_event;
  } global_t;

  typedef struct packed {
    logic [EGV_W-1:0] value;
    eg_stage_e        stage;
  } eg_state_t;

  // ---------------------------------------------------------------- sequencer
  logic       issue, is_global, first_op, clear;
  logic [2:0] scope;
  logic [3:0] ch;
  logic [6:0] clear_addr;

  egs_fsm u_fsm (
    .clk, .rst, .tick, .issue, .is_global, .scope, .ch, .first_op,
    .clear, .clear_addr, .busy
  );

  logic [6:0] raddr;
  assign raddr = {scope, ch};

  // ---------------------------------------------------------------- OP RAM
  logic [6:0] pw_addr;
  logic       pw_en;
  assign pw_addr = clear ? clear_addr : {msg.scope, msg.channel};
  assign pw_en   = clear | msg_valid;

  logic [3:0][LEVEL_W-1:0] lvl_rd;
  logic [3:0][21:0]        rate_rd;
  logic [19:0]             p100_rd;
  logic [11:0]             p101_rd;
  logic [16:0]             p110_rd, p111_rd;

  for (genvar i = 0; i < 4; i++) begin : g_stage_mem
    sdp_ram #(.DEPTH(128), .WIDTH(LEVEL_W)) u_lvl (
      .clk, .we(pw_en && (clear || (!msg.is_rate && msg.param_id == 3'(i)))),
      .waddr(pw_addr), .wdata(clear ? '0 : msg.value[LEVEL_W-1:0]),
      .raddr, .rdata(lvl_rd[i]));
    sdp_ram #(.DEPTH(128), .WIDTH(22)) u_rate (
      .clk, .we(pw_en && (clear || (msg.is_rate && msg.stage == 2'(i)))),
      .waddr(pw_addr), .wdata(clear ? '0 : {msg.rate_exp, msg.rate_mant}),
      .raddr, .rdata(rate_rd[i]));
  end

  sdp_ram #(.DEPTH(128), .WIDTH(20)) u_p100 (
    .clk, .we(pw_en && (clear || (!msg.is_rate && msg.param_id == PID_FREQ_DELAY))),
    .waddr(pw_addr), .wdata(clear ? '0 : msg.value[19:0]), .raddr, .rdata(p100_rd));
  sdp_ram #(.DEPTH(128), .WIDTH(12)) u_p101 (
    .clk, .we(pw_en && (clear || (!msg.is_rate && msg.param_id == PID_AMS_PMS))),
    .waddr(pw_addr), .wdata(clear ? '0 : msg.value[11:0]), .raddr, .rdata(p101_rd));
  sdp_ram #(.DEPTH(128), .WIDTH(17)) u_p110 (
    .clk, .we(pw_en && (clear || (!msg.is_rate && msg.param_id == PID_OPPARAM))),
    .waddr(pw_addr), .wdata(clear ? '0 : msg.value[16:0]), .raddr, .rdata(p110_rd));
  sdp_ram #(.DEPTH(128), .WIDTH(17)) u_p111 (
    .clk, .we(pw_en && (clear || (!msg.is_rate && msg.param_id == PID_LFOPARAM))),
    .waddr(pw_addr), .wdata(clear ? '0 : msg.value[16:0]), .raddr, .rdata(p111_rd));

  // envelope state part of the OP RAM, written by the pipeline
  eg_state_t st_rd, st_wd;
  logic      st_we;
  logic [6:0] st_waddr;
  sdp_ram #(.DEPTH(128), .WIDTH($bits(eg_state_t))) u_state (
    .clk, .we(clear || st_we), .waddr(clear ? clear_addr : st_waddr),
    .wdata(clear ? '0 : st_wd), .raddr, .rdata(st_rd));

  // ---------------------------------------------------------------- Global RAM
  global_t    g_rd, g_wd;
  logic       g_we;
  logic [3:0] g_waddr;
  sdp_ram #(.DEPTH(NUM_CH), .WIDTH($bits(global_t))) u_global (
    .clk, .we(clear || g_we), .waddr(clear ? clear_addr[3:0] : g_waddr),
    .wdata(clear ? '0 : g_wd), .raddr(ch), .rdata(g_rd));

  // ---------------------------------------------------------------- stage 1: decode
  logic       s1_valid, s1_global, s1_first;
  logic [2:0] s1_scope;
  logic [3:0] s1_ch;
  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0; s1_global <= 1'b0; s1_first <= 1'b0;
    end else begin
      s1_valid <= issue; s1_global <= is_global; s1_first <= first_op;
    end
    s1_scope <= scope;
    s1_ch    <= ch;
  end

  // free-running random source for the sample-and-hold LFO
  logic [15:0] lfsr;
  always_ff @(posedge clk) begin
    if (rst) lfsr <= 16'hACE1;
    else     lfsr <= {lfsr[14:0], 1'b0} ^ (lfsr[15] ? 16'h100B : 16'h0000);
  end

  logic [3:0][RATE_W-1:0] rates;
  for (genvar i = 0; i < 4; i++) begin : g_rate_dec
    logic [RATE_W+14:0] r;
    assign r = (RATE_W+15)'(rate_rd[i][17:0]) << rate_rd[i][21:18];
    assign rates[i] = (r > (RATE_W+15)'({RATE_W{1'b1}})) ? '1 : RATE_W'(r);
  end

  logic                key_now, key_event;
  logic [EGV_W-1:0]    eg_value_next;
  eg_stage_e           eg_stage_next;
  logic [LEVEL_W-1:0]  eg_level;
  logic [LFO_PH_W-1:0] lfo_phase_next;
  logic [19:0]         lfo_delay_next;
  logic [15:0]         lfo_held_next;
  logic signed [15:0]  lfo_out;
  logic signed [13:0]  chan_pitch_mod;

  always_comb begin
    if (s1_global) begin
      key_now   = p111_rd[0];
      key_event = p111_rd[0] & ~g_rd.key_prev;
    end else begin
      key_now   = g_rd.key_now;
      key_event = g_rd.key_event;
    end
  end

  egs_env_gen u_eg (
    .value(st_rd.value), .stage(st_rd.stage), .levels(lvl_rd), .rates,
    .key_on(key_now), .key_event,
    .value_next(eg_value_next), .stage_next(eg_stage_next), .level(eg_level));

  egs_lfo u_lfo (
    .phase(g_rd.lfo_phase), .delay_cnt(g_rd.lfo_delay_cnt), .held(g_rd.lfo_held),
    .speed(p111_rd[16:5]), .sync(p111_rd[4]), .wave(lfo_wave_e'(p111_rd[3:1])),
    .delay(p100_rd), .key_event, .rnd(lfsr),
    .phase_next(lfo_phase_next), .delay_cnt_next(lfo_delay_next),
    .held_next(lfo_held_next), .lfo_out);

  // channel path of the modulation calculation (PEG + pitch LFO)
  egs_mod_calc u_chan_calc (
    .peg_level(eg_level), .pms(p101_rd), .lfo(lfo_out), .pitch_mod_out(chan_pitch_mod),
    .eg_level('0), .base_amp('0), .ams('0), .op_on(1'b0), .base_freq('0),
    .pitch_mod('0), .amp(), .freq());

  // ---------------------------------------------------------------- stage 2: update
  logic               s2_valid;
  logic [LEVEL_W-1:0] s2_eg_level, s2_base_amp, s2_ams;
  logic               s2_op_on, s2_key_sync;
  logic [FREQ_W-1:0]  s2_base_freq;
  logic signed [13:0] s2_pitch_mod;
  logic signed [15:0] s2_lfo;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid <= 1'b0; st_we <= 1'b0; g_we <= 1'b0;
    end else begin
      s2_valid <= s1_valid && !s1_global;
      st_we    <= s1_valid;
      g_we     <= s1_valid && s1_global;
    end
    st_waddr        <= {s1_scope, s1_ch};
    st_wd.value     <= eg_value_next;
    st_wd.stage     <= eg_stage_next;
    g_waddr         <= s1_ch;
    g_wd.peg_value     <= eg_value_next;
    g_wd.peg_stage     <= eg_stage_next;
    g_wd.lfo_phase     <= lfo_phase_next;
    g_wd.lfo_delay_cnt <= lfo_delay_next;
    g_wd.lfo_held      <= lfo_held_next;
    g_wd.lfo_val       <= lfo_out;
    g_wd.pitch_mod     <= chan_pitch_mod;
    g_wd.key_prev      <= key_now;
    g_wd.key_now       <= key_now;
    g_wd.key_event     <= key_event;

    s2_eg_level  <= eg_level;
    s2_base_amp  <= p110_rd[16:5];
    s2_ams       <= p101_rd;
    s2_op_on     <= p110_rd[0];
    s2_key_sync  <= p110_rd[4] & key_event;
    s2_base_freq <= p100_rd;
    s2_pitch_mod <= g_rd.pitch_mod;
    s2_lfo       <= g_rd.lfo_val;
  end

  // ---------------------------------------------------------------- stage 3: modulation
  logic [AMP_W-1:0]  op_amp;
  logic [FREQ_W-1:0] op_freq;
  egs_mod_calc u_op_calc (
    .peg_level('0), .pms('0), .lfo(s2_lfo), .pitch_mod_out(),
    .eg_level(s2_eg_level), .base_amp(s2_base_amp), .ams(s2_ams), .op_on(s2_op_on),
    .base_freq(s2_base_freq), .pitch_mod(s2_pitch_mod), .amp(op_amp), .freq(op_freq));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      key_sync  <= 1'b0;
      freq      <= '0;
      amp       <= '0;
    end else begin
      out_valid <= s2_valid;
      key_sync  <= s2_valid & s2_key_sync;
      freq      <= op_freq;
      amp       <= op_amp;
    end
  end

  // sync leads the first operator value by two clocks
  assign sync = s1_first;
endmodule
