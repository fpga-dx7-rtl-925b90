// tb_alg_pkg: reference description of the 32 DX7 algorithms for the testbenches.
//
// For algorithm n (1..32): mods[k] is the bit mask of operators that modulate operator
// k+1 (bit j = operator j+1), car the mask of carriers, and the feedback loop takes the
// output of operator fb_src+1 into the phase of operator fb_dst+1 (one sample later).
// Written from the published DX7 algorithm chart, independently of the RTL control ROM.
package tb_alg_pkg;
  function automatic void graph(input int alg, output logic [5:0] mods [6], output logic [5:0] car,
                                output int fb_src, output int fb_dst);
    case (alg)
      1: begin mods = '{6'h02, 6'h00, 6'h08, 6'h10, 6'h20, 6'h00}; car = 6'h05; fb_src = 5; fb_dst = 5; end
      2: begin mods = '{6'h02, 6'h00, 6'h08, 6'h10, 6'h20, 6'h00}; car = 6'h05; fb_src = 1; fb_dst = 1; end
      3: begin mods = '{6'h02, 6'h04, 6'h00, 6'h10, 6'h20, 6'h00}; car = 6'h09; fb_src = 5; fb_dst = 5; end
      4: begin mods = '{6'h02, 6'h04, 6'h00, 6'h10, 6'h20, 6'h00}; car = 6'h09; fb_src = 3; fb_dst = 5; end
      5: begin mods = '{6'h02, 6'h00, 6'h08, 6'h00, 6'h20, 6'h00}; car = 6'h15; fb_src = 5; fb_dst = 5; end
      6: begin mods = '{6'h02, 6'h00, 6'h08, 6'h00, 6'h20, 6'h00}; car = 6'h15; fb_src = 4; fb_dst = 5; end
      7: begin mods = '{6'h02, 6'h00, 6'h18, 6'h00, 6'h20, 6'h00}; car = 6'h05; fb_src = 5; fb_dst = 5; end
      8: begin mods = '{6'h02, 6'h00, 6'h18, 6'h00, 6'h20, 6'h00}; car = 6'h05; fb_src = 3; fb_dst = 3; end
      9: begin mods = '{6'h02, 6'h00, 6'h18, 6'h00, 6'h20, 6'h00}; car = 6'h05; fb_src = 1; fb_dst = 1; end
      10: begin mods = '{6'h02, 6'h04, 6'h00, 6'h30, 6'h00, 6'h00}; car = 6'h09; fb_src = 2; fb_dst = 2; end
      11: begin mods = '{6'h02, 6'h04, 6'h00, 6'h30, 6'h00, 6'h00}; car = 6'h09; fb_src = 5; fb_dst = 5; end
      12: begin mods = '{6'h02, 6'h00, 6'h38, 6'h00, 6'h00, 6'h00}; car = 6'h05; fb_src = 1; fb_dst = 1; end
      13: begin mods = '{6'h02, 6'h00, 6'h38, 6'h00, 6'h00, 6'h00}; car = 6'h05; fb_src = 5; fb_dst = 5; end
      14: begin mods = '{6'h02, 6'h00, 6'h08, 6'h30, 6'h00, 6'h00}; car = 6'h05; fb_src = 5; fb_dst = 5; end
      15: begin mods = '{6'h02, 6'h00, 6'h08, 6'h30, 6'h00, 6'h00}; car = 6'h05; fb_src = 1; fb_dst = 1; end
      16: begin mods = '{6'h16, 6'h00, 6'h08, 6'h00, 6'h20, 6'h00}; car = 6'h01; fb_src = 5; fb_dst = 5; end
      17: begin mods = '{6'h16, 6'h00, 6'h08, 6'h00, 6'h20, 6'h00}; car = 6'h01; fb_src = 1; fb_dst = 1; end
      18: begin mods = '{6'h0e, 6'h00, 6'h00, 6'h10, 6'h20, 6'h00}; car = 6'h01; fb_src = 2; fb_dst = 2; end
      19: begin mods = '{6'h02, 6'h04, 6'h00, 6'h20, 6'h20, 6'h00}; car = 6'h19; fb_src = 5; fb_dst = 5; end
      20: begin mods = '{6'h04, 6'h04, 6'h00, 6'h30, 6'h00, 6'h00}; car = 6'h0b; fb_src = 2; fb_dst = 2; end
      21: begin mods = '{6'h04, 6'h04, 6'h00, 6'h20, 6'h20, 6'h00}; car = 6'h1b; fb_src = 2; fb_dst = 2; end
      22: begin mods = '{6'h02, 6'h00, 6'h20, 6'h20, 6'h20, 6'h00}; car = 6'h1d; fb_src = 5; fb_dst = 5; end
      23: begin mods = '{6'h00, 6'h04, 6'h00, 6'h20, 6'h20, 6'h00}; car = 6'h1b; fb_src = 5; fb_dst = 5; end
      24: begin mods = '{6'h00, 6'h00, 6'h20, 6'h20, 6'h20, 6'h00}; car = 6'h1f; fb_src = 5; fb_dst = 5; end
      25: begin mods = '{6'h00, 6'h00, 6'h00, 6'h20, 6'h20, 6'h00}; car = 6'h1f; fb_src = 5; fb_dst = 5; end
      26: begin mods = '{6'h00, 6'h04, 6'h00, 6'h30, 6'h00, 6'h00}; car = 6'h0b; fb_src = 5; fb_dst = 5; end
      27: begin mods = '{6'h00, 6'h04, 6'h00, 6'h30, 6'h00, 6'h00}; car = 6'h0b; fb_src = 2; fb_dst = 2; end
      28: begin mods = '{6'h02, 6'h00, 6'h08, 6'h10, 6'h00, 6'h00}; car = 6'h25; fb_src = 4; fb_dst = 4; end
      29: begin mods = '{6'h00, 6'h00, 6'h08, 6'h00, 6'h20, 6'h00}; car = 6'h17; fb_src = 5; fb_dst = 5; end
      30: begin mods = '{6'h00, 6'h00, 6'h08, 6'h10, 6'h00, 6'h00}; car = 6'h27; fb_src = 4; fb_dst = 4; end
      31: begin mods = '{6'h00, 6'h00, 6'h00, 6'h00, 6'h20, 6'h00}; car = 6'h1f; fb_src = 5; fb_dst = 5; end
      32: begin mods = '{6'h00, 6'h00, 6'h00, 6'h00, 6'h00, 6'h00}; car = 6'h3f; fb_src = 5; fb_dst = 5; end
      default: begin mods = '{6'h0, 6'h0, 6'h0, 6'h0, 6'h0, 6'h0}; car = 6'h0; fb_src = 5; fb_dst = 5; end
    endcase
  endfunction
endpackage
