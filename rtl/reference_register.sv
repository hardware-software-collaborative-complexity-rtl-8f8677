// Reference register: neighbouring reconstructed samples of the current PU.
//
// Index 0 of both arrays is the corner sample p[-1][-1]; top[i] = p[i-1][-1]
// and left[i] = p[-1][i-1] for i = 1..2*LCU_SIZE, enough for the largest
// PU. The reconstruction path writes one sample per cycle (`we`, `sel_left`
// picks the array, index 0 writes the corner of both). The arrays are
// broadcast to all prediction blocks. The design names this register; its
// write interface is this implementation's choice. Reset fills every
// sample with 128 (1 << (PIX_W-1)), the HEVC substitute for unavailable
// neighbours; substitution of partly available neighbours is left to the
// writer.
module reference_register
  import hevc_intra_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic                         sel_left,
  input  logic [7:0]                   idx,
  input  logic [PIX_W-1:0]             data,
  output logic [REF_LEN-1:0][PIX_W-1:0] top,
  output logic [REF_LEN-1:0][PIX_W-1:0] left
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top  <= {REF_LEN{PIX_W'(1 << (PIX_W - 1))}};
      left <= {REF_LEN{PIX_W'(1 << (PIX_W - 1))}};
    end else if (we && idx < 8'(REF_LEN)) begin
      if (idx == 8'd0) begin
        top[0]  <= data;
        left[0] <= data;
      end else if (sel_left) left[idx] <= data;
      else                   top[idx]  <= data;
    end
  end
endmodule
