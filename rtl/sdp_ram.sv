// sdp_ram: simple dual-port RAM, one synchronous write port and one read port.
//
// Used for the EGS OP RAM (operator parameters and envelope state, channel globals in the
// "operator 7" space) and for the EGS Global RAM (per-channel pitch-EG, LFO and key state).
// The read data is registered: rdata shows mem[raddr] one clock after raddr is presented.
// A read and a write of the same address in the same cycle returns the old contents.
// The one-read/one-write organisation follows the design; the registered read port is the
// usual block/distributed-RAM style and is this implementation's choice.
module sdp_ram #(
  parameter int DEPTH = 128,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
