// ops_ctrl_rom: algorithm-dependent control ROM of the OPS.
//
// For each of the 32 DX7 algorithms and each operator the ROM gives
//   mod_sel  where the operator's phase offset comes from (none, the output of the operator
//            computed 16 slots before it, the M-Reg, M-Reg plus that output, the raw F-Reg,
//            or the shifted F-Reg for feedback);
//   oren     the operator is a carrier and is added into the O-Reg;
//   mren     its output is loaded into, or added to, the channel's M-Reg;
//   fren     its output is stored in the channel's F-Reg (feedback or later reuse);
//   ncar     the number of carriers of the algorithm, for output compensation.
// Because operators are computed 6 down to 1, the output of operator k reaches the
// register files exactly when operator k-1 of the same channel starts, so every DX7
// algorithm can be expressed with one M-Reg and one F-Reg per channel.
// Combinational. The algorithm graphs are those of the DX7 (algorithm n encoded as n-1);
// this encoding of them is this implementation's own.
module ops_ctrl_rom
  import dx7_pkg::*;
(
  input  logic [4:0] alg,
  input  logic [2:0] op,     // 0..5 = operator 1..6
  output ops_ctrl_t  ctrl
);
  function automatic ops_ctrl_t word(mod_sel_e m, logic c, mren_e r, logic f);
    ops_ctrl_t x;
    x.mod_sel = m; x.oren = c; x.mren = r; x.fren = f; x.ncar = '0;
    return x;
  endfunction

  ops_ctrl_t w [6];
  logic [2:0] n;

  always_comb begin
    for (int i = 0; i < 6; i++) w[i] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0);
    unique case (alg)
      5'd0: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd1: begin w[5] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd2: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[1] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd3: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b1); w[2] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[1] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd4: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd5: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b1); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd6: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b0, MREG_LOAD, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd7: begin w[5] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b0, MREG_LOAD, 1'b0); w[3] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[2] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd8: begin w[5] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b0, MREG_LOAD, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd9: begin w[5] = word(MOD_NONE, 1'b0, MREG_LOAD, 1'b0); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[1] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd10: begin w[5] = word(MOD_FB, 1'b0, MREG_LOAD, 1'b1); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[1] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd11: begin w[5] = word(MOD_NONE, 1'b0, MREG_LOAD, 1'b0); w[4] = word(MOD_NONE, 1'b0, MREG_ACC, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd12: begin w[5] = word(MOD_FB, 1'b0, MREG_LOAD, 1'b1); w[4] = word(MOD_NONE, 1'b0, MREG_ACC, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd13: begin w[5] = word(MOD_FB, 1'b0, MREG_LOAD, 1'b1); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd14: begin w[5] = word(MOD_NONE, 1'b0, MREG_LOAD, 1'b0); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd15: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b0, MREG_LOAD, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b0, MREG_ACC, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); end
      5'd16: begin w[5] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b0, MREG_LOAD, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b0, MREG_ACC, 1'b0); w[1] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[0] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); end
      5'd17: begin w[5] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[4] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_OUT, 1'b0, MREG_LOAD, 1'b0); w[2] = word(MOD_FB, 1'b0, MREG_ACC, 1'b1); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); end
      5'd18: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[1] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd19: begin w[5] = word(MOD_NONE, 1'b0, MREG_LOAD, 1'b0); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[1] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); end
      5'd20: begin w[5] = word(MOD_NONE, 1'b0, MREG_LOAD, 1'b0); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_MREG, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[1] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); end
      5'd21: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd22: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[1] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd23: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd24: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_FREG, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd25: begin w[5] = word(MOD_FB, 1'b0, MREG_LOAD, 1'b1); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[1] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd26: begin w[5] = word(MOD_NONE, 1'b0, MREG_LOAD, 1'b0); w[4] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[3] = word(MOD_MSUM, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[1] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd27: begin w[5] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[4] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[3] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[0] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); end
      5'd28: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd29: begin w[5] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[4] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[3] = word(MOD_OUT, 1'b0, MREG_HOLD, 1'b0); w[2] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd30: begin w[5] = word(MOD_FB, 1'b0, MREG_HOLD, 1'b1); w[4] = word(MOD_OUT, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      5'd31: begin w[5] = word(MOD_FB, 1'b1, MREG_HOLD, 1'b1); w[4] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[3] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[2] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[1] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); w[0] = word(MOD_NONE, 1'b1, MREG_HOLD, 1'b0); end
      default: ;
    endcase
    n = '0;
    for (int i = 0; i < 6; i++) n = n + 3'(w[i].oren);
    ctrl = (op < 3'd6) ? w[op] : word(MOD_NONE, 1'b0, MREG_HOLD, 1'b0);
    ctrl.ncar = n;
  end
endmodule
