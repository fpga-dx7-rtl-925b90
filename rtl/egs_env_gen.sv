// egs_env_gen: one per-sample step of a four-rate / four-level envelope.
//
// The envelope state is a 32-bit value, a 12-bit level with a 20-bit fraction, plus a stage.
// On a key-on event the stage restarts at R1; the value then moves towards L1 by R1 per
// sample, on to L2 at R2, to L3 at R3, and holds at L3 (sustain) while the key is held.
// When the key is released the value moves to L4 at R4. Reaching a target in stage R1 or
// R2 advances the stage for the next sample. The same unit updates the operator EGs and,
// for the "operator 7" address, the pitch EG (PEG): the EGS wiring is shared.
// Purely combinational; the EGS writes the result back to its OP RAM.
// The stage sequence follows the DX7 envelope; the state width, the linear step and the
// "start from the current value" behaviour at key on are this implementation's choices.
module egs_env_gen
  import dx7_pkg::*;
(
  input  logic [EGV_W-1:0]         value,
  input  eg_stage_e                stage,
  input  logic [3:0][LEVEL_W-1:0]  levels,   // L1..L4
  input  logic [3:0][RATE_W-1:0]   rates,    // R1..R4, added per sample
  input  logic                     key_on,   // key held
  input  logic                     key_event,// key pressed this sample
  output logic [EGV_W-1:0]         value_next,
  output eg_stage_e                stage_next,
  output logic [LEVEL_W-1:0]       level      // current output level (after the step)
);
  eg_stage_e               st;
  logic [EGV_W-1:0]        target;
  logic [RATE_W-1:0]       rate;
  logic [EGV_W:0]          up, down;

  always_comb begin
    if (key_event)                          st = EG_R1;
    else if (!key_on && stage != EG_RELEASE) st = EG_RELEASE;
    else                                    st = stage;

    target = {levels[st], {(EGV_W-LEVEL_W){1'b0}}};
    rate   = rates[st];
    up     = {1'b0, value} + {1'b0, rate};
    down   = {1'b0, value} - {1'b0, rate};

    if (value < target)      value_next = (up[EGV_W-1:0] > target || up[EGV_W]) ? target : up[EGV_W-1:0];
    else if (value > target) value_next = (down[EGV_W] || down[EGV_W-1:0] < target) ? target : down[EGV_W-1:0];
    else                     value_next = value;

    if (value_next == target && (st == EG_R1 || st == EG_R2)) stage_next = eg_stage_e'(st + 2'd1);
    else                                                      stage_next = st;

    level = value_next[EGV_W-1 -: LEVEL_W];
  end
endmodule
