// tb_sdp_ram: random writes and reads of the simple dual-port RAM against an array model;
// checks the one-clock read latency and old-data on a same-address read/write.
module tb_sdp_ram;
  localparam int DEPTH = 128, WIDTH = 32;
  logic clk = 0, we;
  logic [6:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [WIDTH-1:0] expect_q;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr = 7'($urandom); we = $urandom_range(1);
      waddr = ($urandom_range(3) == 0) ? raddr : 7'($urandom); wdata = $urandom;
      expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
