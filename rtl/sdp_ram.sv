// Simple dual-port RAM: one synchronous write port, one synchronous read
// port with one cycle of read latency. Used for the variance map and the
// mode histogram. Contents are not reset; every reader writes first.
module sdp_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 24
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
