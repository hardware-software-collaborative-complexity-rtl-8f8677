// Self-checking testbench of mode_selection: random candidate sequences
// (random PU heights, block selections and per-block SADs) are fed row by
// row; after each candidate the running best mode/cost must match a model
// (strictly smaller cost wins, first candidate always taken), `clear`
// must restart the search, and in the final pass the residue rows must be
// forwarded with only the lanes of selected blocks marked valid.
module tb_mode_selection;
  import hevc_intra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, clear, row_valid, row_last, row_final, tx_valid;
  logic [5:0] row_mode, row_y, best_mode, tx_y, tx_mode;
  logic [NUM_HW-1:0] blk_sel;
  logic [NUM_HW-1:0][PIX_W+3-1:0] blk_sad;
  logic [NUM_HW-1:0][LANES-1:0] blk_lane_valid;
  logic [NUM_HW-1:0][LANES-1:0][PIX_W:0] blk_residue;
  logic [COST_W-1:0] best_cost, last_cost;
  logic [NUM_HW*LANES-1:0] tx_lane_valid;
  logic [NUM_HW*LANES-1:0][PIX_W:0] tx_residue;

  mode_selection dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; row_valid = 0; row_last = 0; row_final = 0; row_mode = 0; row_y = 0;
    blk_sel = 0; blk_sad = 0; blk_lane_valid = 0; blk_residue = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pu = 0; pu < 30; pu++) begin
      int n, k, bm;
      longint bc;
      n = 4 << ($urandom % 5); k = 1 + $urandom % 8; bm = -1; bc = 0;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      blk_sel = NUM_HW'($urandom);
      for (int c = 0; c < k; c++) begin
        longint tot;
        int m;
        tot = 0; m = $urandom % 35;
        for (int r = 0; r < n; r++) begin
          row_valid = 1; row_final = 0; row_last = (r == n - 1); row_mode = 6'(m); row_y = 6'(r);
          for (int b = 0; b < NUM_HW; b++) begin
            blk_sad[b] = 11'($urandom % ((pu % 3 == 0) ? 4 : 2040));
            if (blk_sel[b]) tot += blk_sad[b];
          end
          @(negedge clk);
        end
        row_valid = 0;
        if (bm < 0 || tot < bc) begin bm = m; bc = tot; end
        @(negedge clk);
        checks += 3;
        if (last_cost != COST_W'(tot)) begin failures++; $display("last cost %0d exp %0d", last_cost, tot); end
        if (best_cost != COST_W'(bc)) begin failures++; $display("best cost %0d exp %0d", best_cost, bc); end
        if (best_mode != 6'(bm)) begin failures++; $display("best mode %0d exp %0d", best_mode, bm); end
      end
      // final pass: one row forwarded
      row_valid = 1; row_final = 1; row_last = 0; row_mode = best_mode; row_y = 6'(pu % 64);
      for (int b = 0; b < NUM_HW; b++) begin
        blk_lane_valid[b] = 8'($urandom);
        for (int l = 0; l < LANES; l++) blk_residue[b][l] = 9'($urandom);
      end
      @(negedge clk) row_valid = 0;
      checks++;
      if (!tx_valid || tx_y != 6'(pu % 64) || tx_mode != best_mode) begin failures++; $display("tx control wrong"); end
      for (int b = 0; b < NUM_HW; b++)
        for (int l = 0; l < LANES; l++) begin
          bit v;
          v = blk_sel[b] && blk_lane_valid[b][l];
          checks++;
          if (tx_lane_valid[b*LANES+l] != v || (v && tx_residue[b*LANES+l] != blk_residue[b][l])) begin
            failures++; $display("tx lane %0d wrong", b*LANES+l);
          end
        end
      checks++;
      if (best_cost != COST_W'(bc)) begin failures++; $display("final pass changed the cost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
