// tb_egs_env_gen: runs the envelope step sample by sample through key on, the R1/R2/R3
// segments, sustain, key off and release, with random levels and rates, against a
// behavioural envelope written in the testbench. Counts that every stage was visited.
module tb_egs_env_gen;
  import dx7_pkg::*;
  logic [EGV_W-1:0] value, value_next;
  eg_stage_e stage, stage_next;
  logic [3:0][LEVEL_W-1:0] levels;
  logic [3:0][RATE_W-1:0]  rates;
  logic key_on, key_event;
  logic [LEVEL_W-1:0] level;
  egs_env_gen dut (.*);

  int checks = 0, failures = 0;
  int seen [4];
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: one step
  function automatic void ref_step(input longint v, input int st, input bit kon, input bit kev,
                                   output longint vn, output int sn);
    longint t, r;
    int s;
    s = kev ? 0 : (!kon && st != 3) ? 3 : st;
    t = longint'(levels[s]) * (1 << 20);
    r = longint'(rates[s]);
    if (v < t) vn = (v + r > t) ? t : v + r;
    else if (v > t) vn = (v - r < t) ? t : v - r;
    else vn = v;
    sn = (vn == t && s < 2) ? s + 1 : s;
  endfunction

  initial begin
    longint v, vn;
    int st, sn;
    for (int trial = 0; trial < 40; trial++) begin
      for (int i = 0; i < 4; i++) begin
        levels[i] = LEVEL_W'($urandom);
        rates[i]  = RATE_W'($urandom_range(1 << 26) + 1);
      end
      if (trial % 4 == 0) rates[0] = '1;   // instant attack
      v = 0; st = 3;
      for (int n = 0; n < 600; n++) begin
        key_event = (n == 5);
        key_on    = (n >= 5 && n < 400);
        value = EGV_W'(v); stage = eg_stage_e'(st);
        #1;
        ref_step(v, st, key_on, key_event, vn, sn);
        checks++;
        if (value_next !== EGV_W'(vn) || stage_next !== eg_stage_e'(sn) || level !== vn[31:20]) begin
          failures++;
          if (failures < 10) $display("FAIL trial %0d n %0d: got %h/%0d expected %h/%0d", trial, n, value_next, stage_next, vn, sn);
        end
        seen[sn]++;
        v = vn; st = sn;
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL stage %0d never reached", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
