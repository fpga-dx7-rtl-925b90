// cos_lut: cosine lookup table with a configurable pipeline latency.
//
// The top ADDR_W bits of a phase word address a full-period table of 2^ADDR_W signed
// 16-bit samples, round(32767*cos(2*pi*i/1024)). The table is a constant computed at
// elaboration: cos_entry folds i into the first quadrant and sums the Taylor series of
// cos in 30-bit integer fixed point, which reproduces the rounded values exactly; it
// synthesizes to a ROM. The result appears
// LATENCY clocks after the phase (LATENCY = 0 gives a combinational read). OPS uses it with
// the 12-cycle latency of the DDS SIN/COS table it replaces; the EGS LFO uses latency 0.
// Table size and the registered delay line are this implementation's choices.
module cos_lut #(
  parameter int PHASE_W = 22,
  parameter int LATENCY = 12,
  localparam int ADDR_W = 10
) (
  input  logic                clk,
  input  logic [PHASE_W-1:0]  phase,
  output logic signed [15:0]  wave
);
  localparam longint PI_Q30 = 64'd3373259426;   // pi * 2^30

  // round(32767 * cos(pi/2 * j/256)) for j = 0..256, as a Q30 series sum
  function automatic longint cos_q1(input int j);
    longint a, x2, s, t;
    int k;
    a  = PI_Q30 * j / 512;
    x2 = (a * a) >>> 30;
    s  = 64'd1 << 30;
    t  = 64'd1 << 30;
    k  = 1;
    while (t != 0) begin
      t = ((t * x2) >>> 30) / longint'((2*k - 1) * (2*k));
      s = (k % 2 == 1) ? s - t : s + t;
      k++;
    end
    return (s * 32767 + (64'd1 << 29)) >>> 30;
  endfunction

  function automatic logic [15:0] cos_entry(input int i);
    if (i <= 256)      return 16'(cos_q1(i));
    else if (i <= 512) return 16'(-cos_q1(512 - i));
    else if (i < 768)  return 16'(-cos_q1(i - 512));
    else               return 16'(cos_q1(1024 - i));
  endfunction

  logic [15:0] table_rom [2**ADDR_W];
  for (genvar i = 0; i < 2**ADDR_W; i++) begin : g_rom
    localparam logic [15:0] ENTRY = cos_entry(i);
    assign table_rom[i] = ENTRY;
  end

  logic signed [15:0] rd;
  assign rd = signed'(table_rom[phase[PHASE_W-1 -: ADDR_W]]);

  if (LATENCY == 0) begin : g_comb
    assign wave = rd;
  end else begin : g_pipe
    logic signed [15:0] dly [LATENCY];
    always_ff @(posedge clk) begin
      dly[0] <= rd;
      for (int i = 1; i < LATENCY; i++) dly[i] <= dly[i-1];
    end
    assign wave = dly[LATENCY-1];
  end
endmodule
