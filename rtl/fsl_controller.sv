// fsl_controller: receives 32-bit control words from the processor's FSL link and
// forwards each to its destination: EGS, OPS, mixer volume or mixer pan.
//
// Word format (bit 31 = MSB):
//   [27:25] operator field: 0..5 EGS operator 1..6, 6 EGS channel global, 7 other
//   EGS (field 0..6): [31:28] channel, [24] type (1 rate, 0 parameter)
//       rate:      [23:22] stage R1..R4, [21:18] exponent, [17:0] mantissa
//       parameter: [23:21] parameter id, [20:0] value, right adjusted
//   field 7: [24:23] component: 01 OPS, 10 mixer volume, 11 mixer pan, 00 ignored
//       OPS:     [31:28] channel, [7:3] algorithm, [2:0] feedback level
//       volume / pan: [7:0]
// The link is a slave FSL port: whenever FSL_S_Exists is high the word is consumed
// (FSL_S_Read high in the same clock) and decoded into a one-clock write strobe on the
// next clock. There is no FSL write side and FSL_S_Control is not used. The word layout
// follows the design's protocol; the registered one-word-per-clock decode is this
// implementation's choice.
module fsl_controller
  import dx7_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      FSL_S_Data,
  input  logic             FSL_S_Exists,
  input  logic             FSL_S_Control,
  output logic             FSL_S_Read,
  output egs_msg_t         egs_msg,
  output logic             egs_wr,
  output ops_msg_t         ops_msg,
  output logic             ops_wr,
  output logic [VOL_W-1:0] vol_data,
  output logic             vol_wr,
  output logic [VOL_W-1:0] pan_data,
  output logic             pan_wr
);
  logic [31:0] d;
  logic        is_egs;
  logic [1:0]  component;

  assign FSL_S_Read = FSL_S_Exists;
  assign d          = FSL_S_Data;
  assign is_egs     = d[27:25] != 3'b111;
  assign component  = d[24:23];

  always_ff @(posedge clk) begin
    if (rst) begin
      egs_wr <= 1'b0; ops_wr <= 1'b0; vol_wr <= 1'b0; pan_wr <= 1'b0;
    end else begin
      egs_wr <= FSL_S_Exists && is_egs;
      ops_wr <= FSL_S_Exists && !is_egs && component == 2'b01;
      vol_wr <= FSL_S_Exists && !is_egs && component == 2'b10;
      pan_wr <= FSL_S_Exists && !is_egs && component == 2'b11;
    end
    egs_msg.channel   <= d[31:28];
    egs_msg.scope     <= d[27:25];
    egs_msg.is_rate   <= d[24];
    egs_msg.stage     <= d[23:22];
    egs_msg.rate_exp  <= d[21:18];
    egs_msg.rate_mant <= d[17:0];
    egs_msg.param_id  <= d[23:21];
    egs_msg.value     <= d[20:0];
    ops_msg.channel   <= d[31:28];
    ops_msg.algorithm <= d[7:3];
    ops_msg.feedback  <= d[2:0];
    vol_data          <= d[7:0];
    pan_data          <= d[7:0];
  end

  // the processor side only reads a word that exists
  a_read_exists: assert property (@(posedge clk) disable iff (rst) FSL_S_Read |-> FSL_S_Exists);

  // FSL_S_Control (control-word flag) carries no meaning in this protocol
  logic unused_control;
  assign unused_control = FSL_S_Control;
endmodule
