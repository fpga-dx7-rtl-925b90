// tb_cos_lut: compares the table with 32767*cos(2*pi*phase) computed by the simulator
// (tolerance 1 LSB) and checks the 12-clock latency with a stream of random phases.
module tb_cos_lut;
  localparam int LAT = 12;
  logic clk = 0;
  logic [21:0] phase;
  logic signed [15:0] wave;
  cos_lut #(.PHASE_W(22), .LATENCY(LAT)) dut (.clk, .phase, .wave);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [21:0] hist [$];
  initial begin
    real ref_v;
    int d;
    phase = 0;
    for (int i = 0; i < 1024 + LAT; i++) begin
      @(negedge clk);
      phase = (i < 1024) ? 22'(i << 12) | 22'($urandom_range(4095)) : 22'(0);
      hist.push_back(phase);
      if (hist.size() > LAT) begin
        logic [21:0] p;
        p = hist.pop_front();
        ref_v = 32767.0 * $cos(2.0 * 3.14159265358979 * real'(p >> 12) / 1024.0);
        d = int'(wave) - $rtoi(ref_v + (ref_v >= 0 ? 0.5 : -0.5));
        checks++;
        if (d > 1 || d < -1) begin
          failures++;
          if (failures < 10) $display("FAIL phase %h wave %0d ref %f", p, wave, ref_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
