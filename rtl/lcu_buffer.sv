// On-chip LCU buffer: holds one 64x64 LCU of 8-bit pixels.
//
// The read master fills it in 8-pixel segments (one memory beat each); the
// variance computer, the Sobel edge/histogram unit and the distributed
// intra prediction unit each read a whole 64-pixel LCU row. The buffer
// itself is named by the design; its organisation (64 rows of 512 bits,
// NRD synchronous read ports with one cycle of latency) is this
// implementation's choice, sized so that one LCU row can be handed to all
// prediction blocks in a single cycle.
module lcu_buffer
  import hevc_intra_pkg::*;
#(
  parameter int unsigned NRD = 3
) (
  input  logic                                  clk,
  input  logic                                  wr_en,
  input  logic [$clog2(LCU_SIZE)-1:0]           wr_row,
  input  logic [$clog2(NUM_HW)-1:0]             wr_seg,
  input  logic [LANES-1:0][PIX_W-1:0]           wr_data,
  input  logic [NRD-1:0][$clog2(LCU_SIZE)-1:0]  rd_row,
  output logic [NRD-1:0][LCU_SIZE-1:0][PIX_W-1:0] rd_data
);
  logic [NUM_HW-1:0][LANES-1:0][PIX_W-1:0] mem [LCU_SIZE];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_seg] <= wr_data;
    for (int p = 0; p < NRD; p++) rd_data[p] <= mem[rd_row[p]];
  end
endmodule
