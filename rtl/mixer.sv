// mixer: applies the global volume (and optionally pan) to the OPS sample and produces
// registered 24-bit left and right samples.
//
//   scaled = sample * volume           (20-bit signed x 8-bit unsigned)
//   PAN_EN = 0: left = right = scaled >> 4
//   PAN_EN = 1: left = (scaled * (255 - pan)) >> 11, right = (scaled * pan) >> 11
// Panning costs two more multipliers; the main configuration builds without it
// (PAN_EN = 0), as the design does, and pan writes are then only stored. Volume and
// pan are 8-bit registers written by the FSL controller (reset: volume 255, pan 128).
// The output register is part of the design; the scalings are this implementation's.
// Outputs change one clock after `sample_valid`, with `out_valid` high for that clock.
module mixer
  import dx7_pkg::*;
#(
  parameter bit PAN_EN = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic                       sample_valid,
  input  logic                       vol_wr,
  input  logic [VOL_W-1:0]           vol_data,
  input  logic                       pan_wr,
  input  logic [VOL_W-1:0]           pan_data,
  output logic signed [AUDIO_W-1:0]  left,
  output logic signed [AUDIO_W-1:0]  right,
  output logic                       out_valid
);
  logic [VOL_W-1:0] volume, pan;
  always_ff @(posedge clk) begin
    if (rst) begin
      volume <= 8'd255;
      pan    <= 8'd128;
    end else begin
      if (vol_wr) volume <= vol_data;
      if (pan_wr) pan    <= pan_data;
    end
  end

  logic signed [SAMPLE_W+8:0]  scaled;
  logic signed [SAMPLE_W+17:0] lp, rp;
  logic signed [AUDIO_W-1:0]   l_next, r_next;
  always_comb begin
    scaled = sample * signed'({1'b0, volume});
    lp = scaled * signed'({1'b0, 8'd255 - pan});
    rp = scaled * signed'({1'b0, pan});
    if (PAN_EN) begin
      l_next = AUDIO_W'(lp >>> 11);
      r_next = AUDIO_W'(rp >>> 11);
    end else begin
      l_next = AUDIO_W'(scaled >>> 4);
      r_next = AUDIO_W'(scaled >>> 4);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0; right <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= sample_valid;
      if (sample_valid) begin
        left  <= l_next;
        right <= r_next;
      end
    end
  end
endmodule
