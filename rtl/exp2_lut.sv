// exp2_lut: one octave of the exponential, 2^(i/256) in Q1.15 (32768..65359).
//
// The amplitude and pitch calculations turn a logarithmic value into a linear one by
// reading this table with the fraction and shifting the result by the integer part, so only
// the range 2^n..2^(n+1) needs to be stored. Combinational read. Entry i is
// round(32768*2^(i/256)), a constant computed at elaboration from the series of
// e^(i*ln2/256) in 30-bit integer fixed point; it synthesizes to a ROM. Storing one octave
// and shifting follows the design; the table size and precision are this design's choice.
module exp2_lut (
  input  logic [7:0]  frac,
  output logic [15:0] mant
);
  localparam longint LN2_Q30 = 64'd744261117;    // ln(2) * 2^30

  function automatic logic [15:0] exp2_entry(input int i);
    longint x, s, t;
    int k;
    x = LN2_Q30 * i / 256;
    s = 64'd1 << 30;
    t = 64'd1 << 30;
    k = 1;
    while (t != 0) begin
      t = ((t * x) >>> 30) / longint'(k);
      s = s + t;
      k++;
    end
    return 16'((s + (64'd1 << 14)) >>> 15);
  endfunction

  logic [15:0] table_rom [256];
  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam logic [15:0] ENTRY = exp2_entry(i);
    assign table_rom[i] = ENTRY;
  end
  assign mant = table_rom[frac];
endmodule
