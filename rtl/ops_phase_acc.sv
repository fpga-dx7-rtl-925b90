// ops_phase_acc: time-multiplexed phase accumulator for 96 oscillators.
//
// One adder and a 96-entry dual-port memory stand in for 96 phase registers. When op_en
// is high, the oscillator at `ch` (slot index operator*16 + channel) reads its stored
// phase, adds `phase_inc` (or starts again from zero when `key_sync` is set, so the
// oscillator restarts at zero phase without disturbing the others) and writes the sum
// back. The phase offset (frequency modulation) is added after the memory, so it does
// not accumulate: phase_out = stored phase + offset. `phase_offset` is registered on the
// way in, as in the schematic. Latency 2: phase_out and out_en are valid two clocks after
// op_en. Structure and latency follow the design; widths are this implementation's.
module ops_phase_acc
  import dx7_pkg::*;
#(
  parameter int SLOTS = NUM_SLOTS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      op_en,
  input  logic [$clog2(SLOTS)-1:0]  ch,
  input  logic [FREQ_W-1:0]         phase_inc,
  input  logic                      key_sync,
  input  logic [PHASE_W-1:0]        phase_offset,
  output logic [PHASE_W-1:0]        phase_out,
  output logic                      out_en
);
  logic [PHASE_W-1:0] mem [SLOTS];
  logic [PHASE_W-1:0] acc, acc_q, off_q;
  logic               en_q;

  assign acc = (key_sync ? '0 : mem[ch]) + PHASE_W'(phase_inc);

  always_ff @(posedge clk) begin
    if (op_en) mem[ch] <= acc;
    acc_q     <= acc;
    off_q     <= phase_offset;
    phase_out <= acc_q + off_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q   <= 1'b0;
      out_en <= 1'b0;
    end else begin
      en_q   <= op_en;
      out_en <= en_q;
    end
  end
endmodule
