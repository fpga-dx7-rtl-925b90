// i2s_ctrl: I2S serializer for a CS4344-type stereo DAC.
//
// A frame counter divides the system clock by FRAME_DIV (768: 40 MHz / 768 = 52.08 kHz
// sample rate). From it come MCLK = clk/2 (MCLK/LRCK = 384), SCLK with 64 bit periods
// per frame (FRAME_DIV/64 clocks each) and LRCK (low: left, high: right). Each 32-bit
// half frame carries a 24-bit sample MSB first, starting one SCLK after the LRCK edge
// (I2S format), the rest zero. SDATA changes while SCLK is low and is stable on its
// rising edge. New samples are taken at the start of every frame, when `frame_tick`
// pulses; the synthesizer uses that pulse as its sample clock.
// The sample rate and divider follow the design; the MCLK ratio and slot format are
// this implementation's choice within the DAC's I2S modes.
module i2s_ctrl
  import dx7_pkg::*;
#(
  parameter int FRAME_DIV = 768
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic signed [AUDIO_W-1:0] left,
  input  logic signed [AUDIO_W-1:0] right,
  output logic                      frame_tick,
  output logic                      mclk,
  output logic                      sclk,
  output logic                      lrck,
  output logic                      sdata
);
  localparam int BIT_DIV = FRAME_DIV / 64;   // FRAME_DIV must be a multiple of 64

  logic [$clog2(FRAME_DIV)-1:0] cnt;
  logic [$clog2(BIT_DIV)-1:0]   sub;
  logic [5:0]                   bitn;
  logic [AUDIO_W-1:0]           l_hold, r_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; sub <= '0; bitn <= '0;
      l_hold <= '0; r_hold <= '0;
      mclk <= 1'b0; sclk <= 1'b0; lrck <= 1'b0; sdata <= 1'b0;
    end else begin
      mclk <= ~mclk;
      if (cnt == $bits(cnt)'(FRAME_DIV-1)) cnt <= '0;
      else                                 cnt <= cnt + 1'b1;
      if (sub == $bits(sub)'(BIT_DIV-1)) begin
        sub  <= '0;
        bitn <= bitn + 6'd1;
      end else begin
        sub <= sub + 1'b1;
      end
      if (cnt == '0) begin
        l_hold <= left;
        r_hold <= right;
      end
      // registered pins, one clock behind the counters
      sclk <= (sub >= $bits(sub)'(BIT_DIV/2));
      lrck <= bitn[5];
      if (bitn[4:0] >= 5'd1 && bitn[4:0] <= 5'(AUDIO_W))
        sdata <= bitn[5] ? r_hold[AUDIO_W - 32'(bitn[4:0])] : l_hold[AUDIO_W - 32'(bitn[4:0])];
      else
        sdata <= 1'b0;
    end
  end

  assign frame_tick = !rst && (cnt == '0);
endmodule
