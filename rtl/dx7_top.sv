// dx7_top: FPGA synthesizer hardware of a DX7-style FM synthesizer.
//
// Control words from the processor arrive on a slave FSL link and are routed by the FSL
// controller to the EGS (envelope, LFO and pitch/amplitude modulation parameters), the
// OPS (per-channel algorithm and feedback) and the mixer (volume, pan). The I2S
// controller's frame pulse (40 MHz / 768 = 52.08 kHz) is the sample clock: on each pulse
// the EGS updates 16 channels x 6 operators and streams their frequency and amplitude to
// the OPS, which computes all 96 FM oscillators and sums the carriers into one sample;
// the mixer scales it by the volume and the I2S controller shifts it out to the DAC in
// the next frame. The processor, its UARTs and interrupt controller are outside this
// module; only the FSL slave port is brought out.
module dx7_top
  import dx7_pkg::*;
(
  input  logic        clk,          // 40 MHz system clock
  input  logic        rst,          // synchronous, active high
  input  logic [31:0] FSL_S_Data,
  input  logic        FSL_S_Exists,
  input  logic        FSL_S_Control,
  output logic        FSL_S_Read,
  output logic        i2s_mclk,
  output logic        i2s_sclk,
  output logic        i2s_lrck,
  output logic        i2s_sdata
);
  egs_msg_t         egs_msg;
  ops_msg_t         ops_msg;
  logic             egs_wr, ops_wr, vol_wr, pan_wr;
  logic [VOL_W-1:0] vol_data, pan_data;

  fsl_controller u_fsl (
    .clk, .rst, .FSL_S_Data, .FSL_S_Exists, .FSL_S_Control, .FSL_S_Read,
    .egs_msg, .egs_wr, .ops_msg, .ops_wr, .vol_data, .vol_wr, .pan_data, .pan_wr);

  logic              tick, sync, key_sync, egs_valid, egs_busy;
  logic [FREQ_W-1:0] freq;
  logic [AMP_W-1:0]  amp;

  egs u_egs (
    .clk, .rst, .tick, .msg(egs_msg), .msg_valid(egs_wr),
    .sync, .freq, .amp, .key_sync, .out_valid(egs_valid), .busy(egs_busy));

  logic signed [SAMPLE_W-1:0] sample;
  logic                       sample_valid;
  ops u_ops (
    .clk, .rst, .sync, .freq, .amp, .key_sync, .alg_msg(ops_msg), .alg_wr(ops_wr),
    .sample_data(sample), .sample_valid);

  logic signed [AUDIO_W-1:0] left, right;
  logic                      mix_valid;
  mixer u_mix (
    .clk, .rst, .sample, .sample_valid, .vol_wr, .vol_data, .pan_wr, .pan_data,
    .left, .right, .out_valid(mix_valid));

  i2s_ctrl u_i2s (
    .clk, .rst, .left, .right, .frame_tick(tick),
    .mclk(i2s_mclk), .sclk(i2s_sclk), .lrck(i2s_lrck), .sdata(i2s_sdata));

  // status signals kept for debug visibility only
  logic unused_status;
  assign unused_status = egs_valid ^ egs_busy ^ mix_valid;
endmodule
