// tb_ops_ctrl_rom: checks the OPS control ROM against the DX7 algorithm graphs.
//
// For every algorithm the testbench runs the OPS register machine (output bus, M-Reg,
// F-Reg, operators 6..1) on random operator outputs over two samples, driven only by the
// ROM's words, and checks that each operator's phase offset source evaluates to the sum of
// the outputs of its modulators in tb_alg_pkg, that the feedback operator sees the
// previous sample's output of its feedback source, and that the carrier flags and carrier
// count match the graph.
module tb_ops_ctrl_rom;
  import dx7_pkg::*;
  import tb_alg_pkg::*;

  logic [4:0] alg;
  logic [2:0] op;
  ops_ctrl_t  ctrl;
  ops_ctrl_rom dut (.alg, .op, .ctrl);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL alg %0d op %0d: %s", alg + 1, op + 1, what);
    end
  endtask

  initial begin
    logic [5:0] mods [6];
    logic [5:0] car;
    int fb_src, fb_dst;
    int outv [2][6];
    int m, f, modv, expv, bus;
    ops_ctrl_t c;
    for (int a = 1; a <= 32; a++) begin
      graph(a, mods, car, fb_src, fb_dst);
      alg = 5'(a - 1);
      m = $urandom_range(1000); f = $urandom_range(1000);
      for (int s = 0; s < 2; s++) begin
        for (int k = 0; k < 6; k++) outv[s][k] = $urandom_range(30000) + 1;
        for (int k = 5; k >= -1; k--) begin
          bus = (k < 5) ? outv[s][k+1] : 0;
          if (k >= 0) begin
            op = 3'(k); #1; c = ctrl;
            unique case (c.mod_sel)
              MOD_OUT:  modv = bus;
              MOD_MREG: modv = m;
              MOD_MSUM: modv = m + bus;
              MOD_FREG: modv = f;
              MOD_FB:   modv = f;
              default:  modv = 0;
            endcase
            if (s == 1) begin
              if (k == fb_dst) begin
                check(c.mod_sel == MOD_FB, "feedback operator must select MOD_FB");
                check(modv == outv[0][fb_src], "feedback value");
              end else begin
                expv = 0;
                for (int j = 0; j < 6; j++) if (mods[k][j]) expv += outv[1][j];
                check(c.mod_sel != MOD_FB, "MOD_FB on a non-feedback operator");
                check(modv == expv, $sformatf("modulation %0d expected %0d", modv, expv));
              end
              check(c.oren == car[k], "carrier flag");
              check(c.ncar == 3'($countones(car)), "carrier count");
            end
          end
          // the output of operator k+2 (on the bus now) is written as operator k+2's word says
          if (k < 5) begin
            op = 3'(k + 1); #1; c = ctrl;
            if (c.mren == MREG_LOAD) m = bus;
            else if (c.mren == MREG_ACC) m = m + bus;
            if (c.fren) f = bus;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
