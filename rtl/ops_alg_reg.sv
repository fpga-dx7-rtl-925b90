// ops_alg_reg: per-channel algorithm and feedback-level register file of the OPS.
//
// Sixteen entries of {algorithm (5 bits, DX7 algorithm n stored as n-1), feedback level
// (3 bits)}. An OPS message writes one entry (alg_wr, alg_ch, alg_data); the datapath
// reads the entry of the channel being computed combinationally (alg_reg_ch). All entries
// reset to algorithm 1 with feedback 0. Follows the design; reset value is this
// implementation's choice.
module ops_alg_reg
  import dx7_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       alg_wr,
  input  logic [3:0] alg_ch,
  input  logic [4:0] alg_data,
  input  logic [2:0] fb_data,
  input  logic [3:0] alg_reg_ch,
  output logic [4:0] alg_row,
  output logic [2:0] fb
);
  logic [4:0] alg_mem [NUM_CH];
  logic [2:0] fb_mem  [NUM_CH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_CH; i++) begin
        alg_mem[i] <= '0;
        fb_mem[i]  <= '0;
      end
    end else if (alg_wr) begin
      alg_mem[alg_ch] <= alg_data;
      fb_mem[alg_ch]  <= fb_data;
    end
  end

  assign alg_row = alg_mem[alg_reg_ch];
  assign fb      = fb_mem[alg_reg_ch];
endmodule
