// Self-checking testbench of intra_pred_unit: the testbench plays the LCU
// buffer and the reference register. For random images, references, PU
// sizes 4..64, positions and candidate lists it checks the best mode and
// its SAD against the HEVC reference model, that exactly N residue rows of
// the chosen mode come out in order with the right lanes and values, the
// cycle count K*N + N + 8 (one PU row per cycle per candidate), and that a
// block whose clock is masked off contributes nothing. It counts clock
// gating, 4x4 PUs and candidate replacement so that each is exercised.
module tb_intra_pred_unit;
  import hevc_intra_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, tx_valid, busy, done;
  logic [5:0] pu_x, pu_y, rd_row, tx_y, tx_mode, best_mode;
  logic [2:0] pu_log2;
  logic [MAX_CAND-1:0][5:0] cand;
  logic [3:0] num_cand;
  logic [NUM_HW-1:0] clk_mask, gate_en;
  logic [REF_LEN-1:0][PIX_W-1:0] top, left;
  logic [LCU_SIZE-1:0][PIX_W-1:0] rd_data;
  logic [LCU_SIZE-1:0] tx_lane_valid;
  logic [LCU_SIZE-1:0][PIX_W:0] tx_residue;
  logic [COST_W-1:0] best_cost, last_cost;
  logic [15:0] cycles;
  int img [64][64];
  u8arr_t t_ref, l_ref;
  int n_gated = 0, n_4x4 = 0;

  intra_pred_unit dut (.*);

  always_ff @(posedge clk)
    for (int c = 0; c < 64; c++) rd_data[c] <= 8'(img[rd_row][c]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int x0, input int y0, input int lg, input int k, input bit drop_block);
    int n = 1 << lg, bm = -1, cyc = 0, rows = 0;
    longint bc = 0;
    logic [NUM_HW-1:0] msk = '0;
    int modes [8];
    for (int b = 0; b < NUM_HW; b++) if (b * 8 + 8 > x0 && b * 8 < x0 + n) msk[b] = 1;
    if (drop_block) begin
      for (int b = NUM_HW - 1; b >= 0; b--) if (msk[b]) begin msk[b] = 0; break; end
      n_gated++;
    end
    if (n == 4) n_4x4++;
    for (int i = 0; i < 129; i++) begin
      t_ref[i] = $urandom % 256; l_ref[i] = $urandom % 256;
    end
    l_ref[0] = t_ref[0];
    for (int i = 0; i < 129; i++) begin top[i] = 8'(t_ref[i]); left[i] = 8'(l_ref[i]); end
    for (int c = 0; c < k; c++) modes[c] = $urandom % 35;
    // model: SAD of each candidate over the lanes of enabled blocks
    for (int c = 0; c < k; c++) begin
      longint s = 0;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++)
          if (msk[(x0 + x) / 8]) begin
            int d = img[y0 + y][x0 + x] - pred_px(modes[c], n, x, y, t_ref, l_ref);
            s += d < 0 ? -d : d;
          end
      if (bm < 0 || s < bc) begin bm = modes[c]; bc = s; end
    end
    @(negedge clk);
    pu_x = 6'(x0); pu_y = 6'(y0); pu_log2 = 3'(lg); num_cand = 4'(k); clk_mask = msk;
    for (int c = 0; c < 8; c++) cand[c] = 6'(modes[c % k]);
    start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk); #1; cyc++;
      if (tx_valid) begin
        checks++;
        if (tx_y != 6'(rows) || tx_mode != 6'(bm)) begin failures++; $display("tx row %0d mode %0d", tx_y, tx_mode); end
        for (int c = 0; c < 64; c++) begin
          int x = c - x0;
          bit v = (x >= 0 && x < n && msk[c / 8]);
          checks++;
          if (tx_lane_valid[c] != v) begin failures++; $display("lane %0d valid %0d", c, tx_lane_valid[c]); end
          else if (v && $signed(tx_residue[c]) != img[y0 + rows][c] - pred_px(bm, n, x, rows, t_ref, l_ref)) begin
            failures++; $display("residue row %0d col %0d", rows, c);
          end
        end
        rows++;
      end
    end
    checks += 4;
    if (best_mode != 6'(bm) || best_cost != COST_W'(bc)) begin
      failures++; $display("PU %0d@(%0d,%0d): best %0d/%0d exp %0d/%0d", n, x0, y0, best_mode, best_cost, bm, bc);
    end
    if (rows != n) begin failures++; $display("%0d tx rows, expected %0d", rows, n); end
    if (cyc != k * n + n + 8) begin failures++; $display("took %0d cycles, expected %0d", cyc, k * n + n + 8); end
    if (cycles != 16'(cyc)) begin failures++; $display("cycle register %0d, measured %0d", cycles, cyc); end
  endtask

  initial begin
    rst_n = 0; start = 0; pu_x = 0; pu_y = 0; pu_log2 = 3; cand = '0; num_cand = 1; clk_mask = '0;
    top = '0; left = '0;
    foreach (img[y, x]) img[y][x] = (x * 3 + y * 2 + $urandom % 30) % 256;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0, 3, 4, 0);
    run(12, 20, 2, 3, 0);
    run(16, 32, 4, 5, 0);
    run(32, 0, 5, 8, 0);
    run(0, 0, 6, 2, 0);
    run(8, 8, 3, 1, 0);
    run(0, 32, 5, 3, 1);
    run(40, 40, 3, 6, 0);
    checks += 2;
    if (n_gated == 0) failures++;
    if (n_4x4 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
