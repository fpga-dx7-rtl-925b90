// ops: time-multiplexed FM sound generator ("OPS"), 16 voices x 6 operators.
//
// One phase accumulator, one cosine table and one multiplier serve all 96 oscillators.
// After `sync` from the EGS, the oscillator state machine (ops_osc_sm) starts one
// oscillator per clock, operator 6 down to 1 and channel 1..16 within each operator,
// sampling `freq`, `amp` and `key_sync` for that slot. An oscillator's output appears
// on the internal output bus 16 clocks after it starts (phase accumulator 2, cosine
// table 12, amplitude multiply and output register 2), which is exactly when the next
// operator of the same channel starts; so modulator outputs feed their carriers
// directly and the register files only hold what must wait longer:
//   M-Reg file  per channel, sums modulator outputs for an operator with several
//               modulators;
//   F-Reg file  per channel, keeps the output of the feedback operator (shifted by the
//               Shifter for feedback, raw for an operator modulating several others);
//               cleared when the channel's algorithm is written;
//   O-Reg       accumulates carrier outputs of all channels into the sample.
// The Normaliser maps a summed output of +-1.0 to a phase offset of +-0.5 cycle (+-pi).
// Carrier amplitudes are divided by the algorithm's number of carriers so that the
// output level does not depend on the algorithm. The control ROM (ops_ctrl_rom)
// selects the phase offset source and the register enables for each algorithm and
// operator; the Alg-Reg file (ops_alg_reg) holds each channel's algorithm and feedback.
// `sample_data` (signed, 20 bits) is valid with the one-clock `sample_valid` pulse 114
// clocks after `sync`.
// Block structure, operator order, the 16-clock loop and the 114-clock latency follow the
// design; number formats, the compensation factors and the feedback shift
// (F >>> (7 - feedback), off at 0) are this implementation's choices.
module ops
  import dx7_pkg::*;
#(
  parameter int LUT_LATENCY = 12
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sync,
  input  logic [FREQ_W-1:0]          freq,
  input  logic [AMP_W-1:0]           amp,
  input  logic                       key_sync,
  input  ops_msg_t                   alg_msg,
  input  logic                       alg_wr,
  output logic signed [SAMPLE_W-1:0] sample_data,
  output logic                       sample_valid
);
  localparam int LOOP = 2 + LUT_LATENCY + 2;   // oscillator start to output bus

  // ---------------------------------------------------------------- control
  logic       op_en, first, last;
  logic [2:0] op;
  logic [3:0] reg_ch;
  logic [6:0] slot;
  ops_osc_sm u_sm (.clk, .rst, .sync, .op_en, .op, .reg_ch, .slot, .first, .last);

  logic [4:0] alg_row;
  logic [2:0] fb;
  ops_alg_reg u_alg (
    .clk, .rst, .alg_wr, .alg_ch(alg_msg.channel), .alg_data(alg_msg.algorithm),
    .fb_data(alg_msg.feedback), .alg_reg_ch(reg_ch), .alg_row, .fb);

  ops_ctrl_t ctrl;
  ops_ctrl_rom u_rom (.alg(alg_row), .op, .ctrl);

  // control of each started slot, delayed to meet its output on the bus
  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    logic [3:0] ch;
    logic       oren;
    mren_e      mren;
    logic       fren;
  } bus_tag_t;

  bus_tag_t tag_in, bus_tag;
  bus_tag_t tag_dly [LOOP];
  assign tag_in = '{valid: op_en, first: first, last: last, ch: reg_ch,
                    oren: ctrl.oren, mren: ctrl.mren, fren: ctrl.fren};
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LOOP; i++) tag_dly[i] <= '0;
    end else begin
      tag_dly[0] <= tag_in;
      for (int i = 1; i < LOOP; i++) tag_dly[i] <= tag_dly[i-1];
    end
  end
  assign bus_tag = tag_dly[LOOP-1];

  // ---------------------------------------------------------------- register files
  logic signed [15:0] out_bus;
  logic signed [17:0] mreg [NUM_CH];
  logic signed [15:0] freg [NUM_CH];
  logic signed [17:0] m_cur, m_sum;
  logic signed [15:0] f_cur;

  assign m_cur = mreg[reg_ch];
  assign f_cur = freg[reg_ch];
  assign m_sum = m_cur + 18'(out_bus);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_CH; i++) begin
        mreg[i] <= '0;
        freg[i] <= '0;
      end
    end else begin
      if (bus_tag.valid) begin
        unique case (bus_tag.mren)
          MREG_LOAD: mreg[bus_tag.ch] <= 18'(out_bus);
          MREG_ACC:  mreg[bus_tag.ch] <= mreg[bus_tag.ch] + 18'(out_bus);
          default: ;
        endcase
        if (bus_tag.fren) freg[bus_tag.ch] <= out_bus;
      end
      // an algorithm change resets the channel's feedback
      if (alg_wr) freg[alg_msg.channel] <= '0;
    end
  end

  // ---------------------------------------------------------------- modulation mux + normaliser
  logic signed [17:0]  mod_val;
  logic [PHASE_W-1:0]  phase_offset;

  always_comb begin
    unique case (ctrl.mod_sel)
      MOD_OUT:  mod_val = 18'(out_bus);
      MOD_MREG: mod_val = m_cur;
      MOD_MSUM: mod_val = m_sum;
      MOD_FREG: mod_val = 18'(f_cur);
      MOD_FB:   mod_val = (fb == 3'd0) ? '0 : 18'(f_cur >>> (3'd7 - fb));
      default:  mod_val = '0;
    endcase
    // +-1.0 (+-2^15) -> +-half a cycle (+-2^(PHASE_W-1))
    phase_offset = PHASE_W'(mod_val <<< (PHASE_W - 16));
  end

  // ---------------------------------------------------------------- oscillator
  logic [PHASE_W-1:0] phase;
  logic               phase_en;
  ops_phase_acc u_pacc (
    .clk, .rst, .op_en, .ch(slot), .phase_inc(freq), .key_sync(key_sync & op_en),
    .phase_offset, .phase_out(phase), .out_en(phase_en));

  logic signed [15:0] wave;
  cos_lut #(.PHASE_W(PHASE_W), .LATENCY(LUT_LATENCY)) u_cos (.clk, .phase, .wave);

  // amplitude path: delayed to meet the table output, compensated for carriers
  localparam int AMP_DLY = 2 + LUT_LATENCY - 1;
  logic [AMP_W-1:0] amp_dly [AMP_DLY];
  logic             oren_dly [AMP_DLY];
  logic [2:0]       ncar_dly [AMP_DLY];
  always_ff @(posedge clk) begin
    amp_dly[0]  <= amp;
    oren_dly[0] <= ctrl.oren;
    ncar_dly[0] <= ctrl.ncar;
    for (int i = 1; i < AMP_DLY; i++) begin
      amp_dly[i]  <= amp_dly[i-1];
      oren_dly[i] <= oren_dly[i-1];
      ncar_dly[i] <= ncar_dly[i-1];
    end
  end

  logic [15:0] comp;
  always_comb begin
    unique case (ncar_dly[AMP_DLY-1])
      3'd2:    comp = 16'd32768;
      3'd3:    comp = 16'd21845;
      3'd4:    comp = 16'd16384;
      3'd5:    comp = 16'd13107;
      3'd6:    comp = 16'd10923;
      default: comp = 16'd65535;
    endcase
  end

  logic [AMP_W+15:0]  amp_comp_p;
  logic [AMP_W-1:0]   amp_c;
  logic signed [32:0] prod;
  logic signed [15:0] prod_q;
  assign amp_comp_p = amp_dly[AMP_DLY-1] * comp;

  always_ff @(posedge clk) begin
    amp_c   <= oren_dly[AMP_DLY-1] ? amp_comp_p[AMP_W+15:16] : amp_dly[AMP_DLY-1];
    prod_q  <= 16'(prod >>> 16);
    out_bus <= prod_q;
  end
  assign prod = wave * signed'({1'b0, amp_c});

  // ---------------------------------------------------------------- O-Reg
  logic signed [SAMPLE_W-1:0] oreg, carrier;
  assign carrier = bus_tag.oren ? SAMPLE_W'(out_bus) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      oreg         <= '0;
      sample_data  <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (bus_tag.valid) begin
        oreg <= bus_tag.first ? carrier : oreg + carrier;
        if (bus_tag.last) begin
          sample_data  <= oreg + carrier;
          sample_valid <= 1'b1;
        end
      end
    end
  end

  // the phase accumulator output and the slot tags must stay aligned
  a_align: assert property (@(posedge clk) disable iff (rst)
    phase_en |-> ##(LUT_LATENCY + 2) bus_tag.valid);
endmodule
