// Mode selection: picks the cheapest candidate mode of the current PU and
// forwards the residue rows of the chosen mode towards the transform.
//
// For every evaluated PU row the SADs of the selected prediction blocks
// (`blk_sel`: blocks overlapping the PU whose clock is enabled) are summed
// and accumulated; on the last row of a candidate (`row_last`) the total is
// compared with the best so far and replaces it when strictly smaller (the
// first candidate after `clear` always does). In the final pass
// (`row_final`) the cost logic is idle and each row of residues is passed
// to the transform output, masked to the lanes inside the PU. The design
// names this block; SAD as the cost and the forwarding are this
// implementation's choices. `best_*` are valid one cycle after the last
// row of the last candidate.
module mode_selection
  import hevc_intra_pkg::*;
(
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   clear,
  input  logic                                   row_valid,
  input  logic                                   row_last,
  input  logic                                   row_final,
  input  logic [5:0]                             row_mode,
  input  logic [5:0]                             row_y,
  input  logic [NUM_HW-1:0]                      blk_sel,
  input  logic [NUM_HW-1:0][PIX_W+3-1:0]         blk_sad,
  input  logic [NUM_HW-1:0][LANES-1:0]           blk_lane_valid,
  input  logic [NUM_HW-1:0][LANES-1:0][PIX_W:0]  blk_residue,
  output logic [5:0]                             best_mode,
  output logic [COST_W-1:0]                      best_cost,
  output logic [COST_W-1:0]                      last_cost,
  output logic                                   tx_valid,
  output logic [5:0]                             tx_y,
  output logic [5:0]                             tx_mode,
  output logic [NUM_HW*LANES-1:0]                tx_lane_valid,
  output logic [NUM_HW*LANES-1:0][PIX_W:0]       tx_residue
);
  logic [COST_W-1:0] acc, row_cost, total;
  logic              have_best;

  always_comb begin
    row_cost = '0;
    for (int b = 0; b < NUM_HW; b++)
      if (blk_sel[b]) row_cost = row_cost + COST_W'(blk_sad[b]);
    total = acc + row_cost;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc           <= '0;
      have_best     <= 1'b0;
      best_mode     <= '0;
      best_cost     <= '0;
      last_cost     <= '0;
      tx_valid      <= 1'b0;
      tx_y          <= '0;
      tx_mode       <= '0;
      tx_lane_valid <= '0;
      tx_residue    <= '0;
    end else begin
      tx_valid <= 1'b0;
      if (clear) begin
        acc       <= '0;
        have_best <= 1'b0;
      end else if (row_valid && !row_final) begin
        if (row_last) begin
          acc       <= '0;
          last_cost <= total;
          if (!have_best || total < best_cost) begin
            best_cost <= total;
            best_mode <= row_mode;
            have_best <= 1'b1;
          end
        end else acc <= total;
      end else if (row_valid && row_final) begin
        tx_valid <= 1'b1;
        tx_y     <= row_y;
        tx_mode  <= row_mode;
        for (int b = 0; b < NUM_HW; b++)
          for (int l = 0; l < LANES; l++) begin
            tx_lane_valid[b*LANES+l] <= blk_sel[b] & blk_lane_valid[b][l];
            tx_residue[b*LANES+l]    <= (blk_sel[b] & blk_lane_valid[b][l]) ? blk_residue[b][l] : '0;
          end
      end
    end
  end
endmodule
