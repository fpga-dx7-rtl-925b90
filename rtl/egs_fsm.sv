// egs_fsm: the EGS sequencer, with the four states Wait, Globals Update, Operator Update
// and Reset.
//
// Reset (entered on rst) walks every memory address once with `clear` asserted so the
// EGS memories are zeroed, then goes to Wait. On each sample tick it leaves Wait and issues
// one memory address per clock: first the 16 channel globals (scope 6, the "operator 7"
// space), then the 96 operators in the order OPS consumes them, operator 6 down to 1 and
// channel 1..16 within each operator, and returns to Wait. A tick that arrives while
// updating is ignored. `first_op` marks the first operator issue (the EGS derives the OPS
// sync pulse from it). The four states follow the design; the issue order of the globals
// and the one-address-per-clock schedule are this implementation's choices.
module egs_fsm
  import dx7_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,       // start of a sample period
  output logic       issue,      // an address is issued this cycle
  output logic       is_global,
  output logic [2:0] scope,      // 0..5 operator 1..6, 6 globals
  output logic [3:0] ch,
  output logic       first_op,
  output logic       clear,      // Reset state: write zero at clear_addr
  output logic [6:0] clear_addr,
  output logic       busy
);
  typedef enum logic [1:0] {S_WAIT, S_GLOBALS, S_OPS, S_RESET} state_e;
  state_e     state;
  logic [6:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RESET;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_RESET: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd127) state <= S_WAIT;
        end
        S_WAIT: begin
          cnt <= '0;
          if (tick) state <= S_GLOBALS;
        end
        S_GLOBALS: begin
          if (cnt == 7'(NUM_CH-1)) begin cnt <= '0; state <= S_OPS; end
          else cnt <= cnt + 7'd1;
        end
        S_OPS: begin
          if (cnt == 7'(NUM_SLOTS-1)) begin cnt <= '0; state <= S_WAIT; end
          else cnt <= cnt + 7'd1;
        end
      endcase
    end
  end

  always_comb begin
    issue      = (state == S_GLOBALS) || (state == S_OPS);
    is_global  = (state == S_GLOBALS);
    ch         = cnt[3:0];
    scope      = is_global ? 3'(GLOBAL_OP) : 3'(3'd5 - cnt[6:4]);
    first_op   = (state == S_OPS) && (cnt == 7'd0);
    clear      = (state == S_RESET);
    clear_addr = cnt;
    busy       = (state != S_WAIT);
  end
endmodule
