// End-to-end testbench of hevc_intra_accel at its default size (64x64 LCU,
// eight prediction blocks). The testbench plays the processor software,
// the DDR3 memory (ddr_model with wait states) and the reconstruction path:
//   1. a 256x192 frame with flat, striped (four orientations) and noisy
//      regions is placed in memory; the LCU at (64,64) is fetched, the load
//      being issued before the memory reports calibration;
//   2. all 64 variance-map entries are read and checked against a model;
//   3. for PUs of size 4, 8, 16, 32 and 64 the reference samples are
//      written, the gradient histogram is computed and checked bin by bin,
//      software sorts it into the three best angular modes plus planar and
//      DC, programs the clock mask for the PU columns and runs the
//      prediction; best mode, cost, cycle count and every residue row are
//      checked against the HEVC reference model.
// Each mechanism (calibration wait, memory stalls, clock gating, 4x4 PU in
// half a block, negative-angle projection, final replay to the transform)
// is counted and must occur at least once.
module tb_hevc_intra_accel;
  import hevc_intra_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int FW = 256, FH = 192, LX = 64, LY = 64;

  logic rst_n, ci_start, ci_done, ddr_calibrated, avm_read, avm_waitrequest, avm_readdatavalid;
  logic [7:0] ci_n;
  logic [31:0] ci_dataa, ci_datab, ci_result, avm_address;
  logic [63:0] avm_readdata;
  logic ref_we, ref_sel_left, tx_valid;
  logic [7:0] ref_idx;
  logic [PIX_W-1:0] ref_data;
  logic [5:0] tx_y, tx_mode;
  logic [LCU_SIZE-1:0] tx_lane_valid;
  logic [LCU_SIZE-1:0][PIX_W:0] tx_residue;

  hevc_intra_accel dut (.*);
  ddr_model #(.BYTES(FW * FH), .CAL_CYCLES(60)) ddr (
    .clk, .rst_n, .calibrated(ddr_calibrated), .address(avm_address), .read(avm_read),
    .waitrequest(avm_waitrequest), .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  int frame [FH][FW];
  int n_cal_wait = 0, n_gated = 0, n_4x4 = 0, n_negang = 0, n_replay = 0, n_stall = 0;

  // transform-side capture
  int tx_rows = 0;
  logic [LCU_SIZE-1:0][PIX_W:0] tx_cap [64];
  logic [LCU_SIZE-1:0] tx_lv [64];
  logic [5:0] tx_md [64];
  always @(posedge clk) if (tx_valid) begin
    tx_cap[tx_y] <= tx_residue;
    tx_lv[tx_y]  <= tx_lane_valid;
    tx_md[tx_y]  <= tx_mode;
    tx_rows++;
  end
  always @(posedge clk) if (avm_read && !ddr_calibrated) failures++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ci(input logic [7:0] n, input logic [31:0] a, input logic [31:0] b, output logic [31:0] r);
    @(negedge clk);
    ci_start = 1; ci_n = n; ci_dataa = a; ci_datab = b;
    @(negedge clk) ci_start = 0;
    while (!ci_done) @(negedge clk);
    r = ci_result;
  endtask

  task automatic wait_status(input int bitpos);
    logic [31:0] r;
    int polls = 0;
    do begin ci(CI_STATUS, 0, 0, r); polls++; end while (!r[bitpos] && polls < 20000);
  endtask

  function automatic int lpx(int y, int x);   // LCU pixel, clamped to the LCU
    if (y < 0) y = 0; if (y > 63) y = 63;
    if (x < 0) x = 0; if (x > 63) x = 63;
    return frame[LY + y][LX + x];
  endfunction

  task automatic do_pu(input int x0, input int y0, input int lg);
    int n = 1 << lg, cand [5], k = 5, bm = -1, cyc_exp;
    longint h [35], bc = 0;
    logic [31:0] r;
    logic [NUM_HW-1:0] msk = '0;
    u8arr_t t_ref, l_ref;
    bit used [35];
    // reference samples: reconstructed neighbours (the original frame here)
    for (int i = 0; i <= 2 * n; i++) begin
      t_ref[i] = frame[LY + y0 - 1][LX + x0 - 1 + i];
      l_ref[i] = frame[LY + y0 - 1 + i][LX + x0 - 1];
    end
    for (int i = 0; i <= 2 * n; i++) begin
      @(negedge clk);
      ref_we = 1; ref_sel_left = 0; ref_idx = 8'(i); ref_data = 8'(t_ref[i]);
      if (i > 0) begin
        @(negedge clk);
        ref_sel_left = 1; ref_data = 8'(l_ref[i]);
      end
    end
    @(negedge clk) ref_we = 0;
    // histogram
    ci(CI_PU, {13'd0, 3'(lg), 2'd0, 6'(y0), 2'd0, 6'(x0)}, 0, r);
    ci(CI_CMD, 32'b010, 0, r);
    wait_status(6);
    for (int m = 0; m < 35; m++) begin h[m] = 0; used[m] = 0; end
    for (int y = y0; y < y0 + n; y++)
      for (int x = x0; x < x0 + n; x++) begin
        int gx = (lpx(y-1,x+1) + 2*lpx(y,x+1) + lpx(y+1,x+1)) - (lpx(y-1,x-1) + 2*lpx(y,x-1) + lpx(y+1,x-1));
        int gy = (lpx(y+1,x-1) + 2*lpx(y+1,x) + lpx(y+1,x+1)) - (lpx(y-1,x-1) + 2*lpx(y-1,x) + lpx(y-1,x+1));
        h[closest_mode_ref(gx, gy)] += (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
      end
    for (int m = 2; m <= 34; m++) begin
      ci(CI_HIST_RD, 0, m, r);
      checks++;
      if (r != 32'(h[m])) begin failures++; $display("PU %0d: bin %0d = %0d exp %0d", n, m, r, h[m]); end
    end
    // software: descending sort -> three best angular modes, plus planar, DC
    for (int c = 0; c < 3; c++) begin
      int bi = 2;
      while (used[bi]) bi++;
      for (int m = 2; m <= 34; m++) if (!used[m] && h[m] > h[bi]) bi = m;
      used[bi] = 1;
      cand[c] = bi;
    end
    ci(CI_HIST_PEAK, 0, 0, r);
    checks++;
    if (r != 32'(cand[0])) begin failures++; $display("peak %0d, sorted best %0d", r, cand[0]); end
    cand[3] = 0; cand[4] = 1;
    for (int c = 0; c < k; c++) begin
      ci(CI_CAND, cand[c], c, r);
      if (cand[c] >= 11 && cand[c] <= 25 && cand[c] != 18 && n >= 8) n_negang++;
      if (cand[c] == 18) n_negang++;
    end
    ci(CI_NUM_CAND, k, 0, r);
    // software clock manager: enable only blocks that hold PU columns
    for (int b = 0; b < NUM_HW; b++) if (b * 8 + 8 > x0 && b * 8 < x0 + n) msk[b] = 1;
    if (msk != '1) n_gated++;
    if (n == 4) n_4x4++;
    ci(CI_CLK_MASK, 32'(msk), 0, r);
    // model
    for (int c = 0; c < k; c++) begin
      longint s = 0;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          int d = lpx(y0 + y, x0 + x) - pred_px(cand[c], n, x, y, t_ref, l_ref);
          s += d < 0 ? -d : d;
        end
      if (bm < 0 || s < bc) begin bm = cand[c]; bc = s; end
    end
    tx_rows = 0;
    ci(CI_CMD, 32'b100, 0, r);
    wait_status(7);
    ci(CI_BEST, 0, 0, r);
    checks += 2;
    if (r[5:0] != 6'(bm) || r[31:8] != 24'(bc)) begin
      failures++; $display("PU %0d@(%0d,%0d): best %0d cost %0d, exp %0d %0d", n, x0, y0, r[5:0], r[31:8], bm, bc);
    end
    ci(CI_CYCLES, 0, 0, r);
    cyc_exp = k * n + n + 8;
    if (r != 32'(cyc_exp)) begin failures++; $display("cycles %0d exp %0d", r, cyc_exp); end
    checks++;
    if (tx_rows != n) begin failures++; $display("%0d residue rows, expected %0d", tx_rows, n); end
    else n_replay++;
    for (int y = 0; y < n; y++)
      for (int c = 0; c < 64; c++) begin
        int x = c - x0;
        bit v = (x >= 0 && x < n);
        checks++;
        if (tx_lv[y][c] != v || tx_md[y] != 6'(bm) ||
            (v && $signed(tx_cap[y][c]) != lpx(y0 + y, c) - pred_px(bm, n, x, y, t_ref, l_ref))) begin
          failures++; $display("residue PU %0d row %0d col %0d", n, y, c);
        end
      end
    $display("PU %0dx%0d at (%0d,%0d): candidates %0d %0d %0d %0d %0d -> mode %0d, SAD %0d",
             n, n, x0, y0, cand[0], cand[1], cand[2], cand[3], cand[4], bm, bc);
  endtask

  initial begin
    logic [31:0] r;
    rst_n = 0; ci_start = 0; ci_n = 0; ci_dataa = 0; ci_datab = 0;
    ref_we = 0; ref_sel_left = 0; ref_idx = 0; ref_data = 0;
    foreach (frame[y, x]) begin
      int lx, ly;
      lx = x - LX; ly = y - LY;
      if (lx < 0 || ly < 0 || lx >= 64 || ly >= 64) frame[y][x] = (x + 2 * y + $urandom % 9) % 256;
      else if (ly < 32 && lx < 32) frame[y][x] = ((lx / 3) % 2) ? 190 : 40;                 // vertical stripes
      else if (ly < 32)            frame[y][x] = (((lx - ly) / 4) % 2 != 0) ? 230 : 20;     // diagonal x-y
      else if (lx < 32)            frame[y][x] = (((lx + ly) / 5) % 2) ? 180 : 60;          // diagonal x+y
      else if (ly < 48)            frame[y][x] = 100 + $urandom % 8;                        // near flat
      else                         frame[y][x] = $urandom % 256;                            // noise
    end
    foreach (frame[y, x]) ddr.mem[y * FW + x] = 8'(frame[y][x]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    ci(CI_LCU_ADDR, LY * FW + LX, 0, r);
    ci(CI_STRIDE, FW, 0, r);
    if (!ddr_calibrated) n_cal_wait++;
    ci(CI_CMD, 32'b001, 0, r);
    wait_status(5);              // variance map done (implies LCU loaded)
    n_stall = ddr.stalls;
    for (int b = 0; b < 64; b++) begin
      longint s, q;
      s = 0; q = 0;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          int p;
          p = lpx((b / 8) * 8 + y, (b % 8) * 8 + x);
          s += p; q += p * p;
        end
      ci(CI_VAR_RD, 0, b, r);
      checks++;
      if (r[23:0] != {8'(s / 64), 16'((64 * q - s * s) / 4096)}) begin
        failures++; $display("variance block %0d: %h exp mean %0d var %0d", b, r, s / 64, (64 * q - s * s) / 4096);
      end
    end
    do_pu(0, 0, 5);     // 32x32 vertical stripes
    do_pu(40, 8, 3);    // 8x8 in the x-y diagonal region
    do_pu(12, 44, 2);   // 4x4 in the x+y diagonal region, upper half of a block
    do_pu(48, 32, 4);   // 16x16 near-flat region
    do_pu(36, 56, 2);   // 4x4 in noise
    do_pu(0, 0, 6);     // the whole LCU
    $display("mechanisms: calibration wait %0d, memory stalls %0d, clock gating %0d, 4x4 PUs %0d, negative angles %0d, replays %0d",
             n_cal_wait, n_stall, n_gated, n_4x4, n_negang, n_replay);
    checks += 6;
    if (n_cal_wait == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_gated == 0) failures++;
    if (n_4x4 == 0) failures++;
    if (n_negang == 0) failures++;
    if (n_replay == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
