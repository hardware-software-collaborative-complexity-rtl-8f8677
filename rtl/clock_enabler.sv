// Clock enabler: gates the clock of each intra prediction block.
//
// Software writes one enable bit per prediction block into a control
// register (`mask`), chosen from the size and LCU position of the PU so
// that blocks whose eight columns lie outside the PU stay idle. The
// enabler also stops all block clocks while the prediction unit is not
// `active`. Each block gets its own latch-based gate (clock_gate); the
// applied enables are returned as `en_status` for the status register.
// The software-controlled mask and the AND-gate structure follow the
// design; combining the mask with the unit's activity is this
// implementation's choice. An enable change takes effect from the next
// rising clock edge.
module clock_enabler #(
  parameter int unsigned NUM_HW = 8
) (
  input  logic              clk,
  input  logic [NUM_HW-1:0] mask,
  input  logic              active,
  output logic [NUM_HW-1:0] gclk,
  output logic [NUM_HW-1:0] en_status
);
  assign en_status = mask & {NUM_HW{active}};

  for (genvar i = 0; i < NUM_HW; i++) begin : g_gate
    clock_gate u_gate (
      .clk (clk),
      .en  (en_status[i]),
      .gclk(gclk[i])
    );
  end
endmodule
