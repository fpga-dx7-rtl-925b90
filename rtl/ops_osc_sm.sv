// ops_osc_sm: oscillator state machine of the OPS.
//
// A `sync` pulse from the EGS starts one sample. Two clocks later the machine enables
// the oscillators for 96 consecutive clocks, operator 6 down to 1 and, within each
// operator, channel 1..16: `op_en` is high, `op` (0..5 = operator 1..6) and `reg_ch`
// (channel, also the Alg-Reg read address) name the slot and `slot` = op*16 + reg_ch is
// the phase memory address. `first`/`last` mark the first and last slot. A sync that
// arrives while a sample is running restarts the sequence. The 2-clock start latency and
// the order follow the design; the signal set is this implementation's.
module ops_osc_sm
  import dx7_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sync,
  output logic       op_en,
  output logic [2:0] op,
  output logic [3:0] reg_ch,
  output logic [6:0] slot,
  output logic       first,
  output logic       last
);
  logic       start_dly;
  logic [6:0] cnt;
  logic       run;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_dly <= 1'b0;
      run       <= 1'b0;
      cnt       <= '0;
    end else begin
      start_dly <= sync;
      if (start_dly) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        if (cnt == 7'(NUM_SLOTS-1)) run <= 1'b0;
        cnt <= cnt + 7'd1;
      end
    end
  end

  always_comb begin
    op_en  = run;
    op     = 3'(3'd5 - cnt[6:4]);
    reg_ch = cnt[3:0];
    slot   = {op, reg_ch};
    first  = run && cnt == 7'd0;
    last   = run && cnt == 7'(NUM_SLOTS-1);
  end
endmodule
