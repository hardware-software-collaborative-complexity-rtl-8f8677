// Behavioural model of the DDR3 frame memory behind its controller, for
// testbenches only. Avalon-MM-style pipelined read slave: `waitrequest`
// is raised at random (STALL_PCT percent of cycles), accepted reads return
// in order after LAT..LAT+3 cycles, 8 bytes per beat, lowest address in the
// lowest byte. `calibrated` rises CAL_CYCLES cycles after reset. The byte
// array `mem` is filled by the testbench.
module ddr_model #(
  parameter int unsigned BYTES      = 65536,
  parameter int unsigned LAT        = 4,
  parameter int unsigned STALL_PCT  = 25,
  parameter int unsigned CAL_CYCLES = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        calibrated,
  input  logic [31:0] address,
  input  logic        read,
  output logic        waitrequest,
  output logic [63:0] readdata,
  output logic        readdatavalid
);
  logic [7:0] mem [BYTES];
  int unsigned cycle = 0;
  int unsigned stalls = 0;
  int unsigned reads = 0;
  typedef struct { int unsigned addr; int unsigned due; } req_t;
  req_t q [$];

  always @(posedge clk) begin
    if (!rst_n) begin
      cycle         <= 0;
      calibrated    <= 1'b0;
      waitrequest   <= 1'b1;
      readdatavalid <= 1'b0;
      readdata      <= '0;
      q.delete();
    end else begin
      cycle <= cycle + 1;
      calibrated <= (cycle >= CAL_CYCLES);
      if (read && !waitrequest) begin
        q.push_back('{addr: address, due: cycle + LAT + ($urandom % 4)});
        reads++;
      end
      if (read && waitrequest) stalls++;
      waitrequest <= ($urandom % 100) < STALL_PCT;
      readdatavalid <= 1'b0;
      if (q.size() > 0 && q[0].due <= cycle) begin
        for (int b = 0; b < 8; b++) readdata[8*b +: 8] <= mem[(q[0].addr + b) % BYTES];
        readdatavalid <= 1'b1;
        void'(q.pop_front());
      end
    end
  end
endmodule
