// Frame-level workload for hevc_intra_accel at its default size: synthetic
// pictures of the three common HEVC test-sequence sizes, 416x240, 832x480
// and 1920x1080, are encoded LCU by LCU (7 x 4, 13 x 8 and 30 x 17 LCUs).
// Each picture is stored with its width and height rounded up to whole
// LCUs: the pattern continues to the right of the picture, and the rows
// below it repeat its last row. The testbench plays the software layer:
//   * PU size estimation: a 64x64 region is kept whole when its variance,
//     merged from the 8x8 entries of the variance map (using their means),
//     is below 150; otherwise it is split into four, down to 8x8; an 8x8
//     block whose variance exceeds 6000 becomes four 4x4 PUs;
//   * mode selection: the three largest histogram bins plus planar and DC
//     are the candidates; the clock mask covers the PU's columns.
// Reference samples are the original neighbouring pixels (128 outside the
// picture). For every PU the chosen mode, its SAD and its residue rows are
// checked against the HEVC reference model, and for every LCU the whole
// variance map. PU-size, gating and mode statistics are printed.
module tb_frame_workload;
  import hevc_intra_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int MAXW = 1920, MAXH = 1088;
  int PW, PH, FW, FH;               // picture and its padded size in memory

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
  ddr_model #(.BYTES(MAXW * MAXH), .CAL_CYCLES(30), .STALL_PCT(10)) ddr (
    .clk, .rst_n, .calibrated(ddr_calibrated), .address(avm_address), .read(avm_read),
    .waitrequest(avm_waitrequest), .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  int frame [MAXH][MAXW];
  int lx0, ly0;                     // current LCU origin in the picture
  int pu_count [7];                 // by log2 size
  int mode_count [35];
  int gated_blocks = 0, total_cycles = 0;
  logic [23:0] vmap [64];

  int tx_rows = 0;
  logic [LCU_SIZE-1:0][PIX_W:0] tx_cap [64];
  logic [LCU_SIZE-1:0] tx_lv [64];
  always @(posedge clk) if (tx_valid) begin
    tx_cap[tx_y] <= tx_residue;
    tx_lv[tx_y]  <= tx_lane_valid;
    tx_rows++;
  end

  initial begin
    repeat (30000000) @(posedge clk);
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
    do begin ci(CI_STATUS, 0, 0, r); polls++; end while (!r[bitpos] && polls < 50000);
  endtask

  function automatic int lpx(int y, int x);
    if (y < 0) y = 0; if (y > 63) y = 63;
    if (x < 0) x = 0; if (x > 63) x = 63;
    return frame[ly0 + y][lx0 + x];
  endfunction

  function automatic int ref_px(int y, int x);   // picture coordinates
    if (y < 0 || x < 0 || y >= PH || x >= PW) return 128;
    return frame[y][x];
  endfunction

  // merged variance of an s x s region at LCU block coordinates (bx, by)
  function automatic real region_var(int bx, int by, int s);
    int nb = s / 8;
    real mv = 0, mm = 0, m = 0;
    for (int j = 0; j < nb; j++)
      for (int i = 0; i < nb; i++) begin
        logic [23:0] e = vmap[(by + j) * 8 + bx + i];
        mv += e[15:0];
        mm += real'(e[23:16]) * real'(e[23:16]);
        m  += e[23:16];
      end
    mv /= nb * nb; mm /= nb * nb; m /= nb * nb;
    return mv + mm - m * m;
  endfunction

  task automatic do_pu(input int x0, input int y0, input int lg);
    int n = 1 << lg, cand [5], k = 5, bm = -1;
    longint h [35], bc = 0;
    logic [31:0] r;
    logic [NUM_HW-1:0] msk = '0;
    u8arr_t t_ref, l_ref;
    bit used [35];
    for (int i = 0; i <= 2 * n; i++) begin
      t_ref[i] = ref_px(ly0 + y0 - 1, lx0 + x0 - 1 + i);
      l_ref[i] = ref_px(ly0 + y0 - 1 + i, lx0 + x0 - 1);
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
    ci(CI_PU, {13'd0, 3'(lg), 2'd0, 6'(y0), 2'd0, 6'(x0)}, 0, r);
    ci(CI_CMD, 32'b010, 0, r);
    wait_status(6);
    for (int m = 0; m < 35; m++) begin h[m] = 0; used[m] = 0; end
    for (int m = 2; m <= 34; m++) begin
      ci(CI_HIST_RD, 0, m, r);
      h[m] = r;
    end
    for (int c = 0; c < 3; c++) begin
      int bi = 2;
      while (used[bi]) bi++;
      for (int m = 2; m <= 34; m++) if (!used[m] && h[m] > h[bi]) bi = m;
      used[bi] = 1;
      cand[c] = bi;
    end
    cand[3] = 0; cand[4] = 1;
    for (int c = 0; c < k; c++) ci(CI_CAND, cand[c], c, r);
    ci(CI_NUM_CAND, k, 0, r);
    for (int b = 0; b < NUM_HW; b++) if (b * 8 + 8 > x0 && b * 8 < x0 + n) msk[b] = 1;
    for (int b = 0; b < NUM_HW; b++) if (!msk[b]) gated_blocks++;
    ci(CI_CLK_MASK, 32'(msk), 0, r);
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
    checks++;
    if (r[5:0] != 6'(bm) || r[31:8] != 24'(bc)) begin
      failures++; $display("LCU(%0d,%0d) PU %0d@(%0d,%0d): best %0d/%0d exp %0d/%0d", lx0, ly0, n, x0, y0, r[5:0], r[31:8], bm, bc);
    end
    ci(CI_CYCLES, 0, 0, r);
    total_cycles += r;
    checks++;
    if (tx_rows != n) begin failures++; $display("%0d residue rows", tx_rows); end
    for (int y = 0; y < n; y++) begin
      checks++;
      for (int c = 0; c < 64; c++) begin
        int x = c - x0;
        if (x >= 0 && x < n &&
            (!tx_lv[y][c] || $signed(tx_cap[y][c]) != lpx(y0 + y, c) - pred_px(bm, n, x, y, t_ref, l_ref))) begin
          failures++; $display("residue PU %0d row %0d col %0d", n, y, c); break;
        end
      end
    end
    pu_count[lg]++;
    mode_count[bm]++;
  endtask

  task automatic quad(input int x0, input int y0, input int s);
    if (s > 8 && region_var(x0 / 8, y0 / 8, s) >= 150.0) begin
      quad(x0, y0, s / 2); quad(x0 + s / 2, y0, s / 2);
      quad(x0, y0 + s / 2, s / 2); quad(x0 + s / 2, y0 + s / 2, s / 2);
    end else if (s == 8 && vmap[(y0 / 8) * 8 + x0 / 8][15:0] > 6000) begin
      do_pu(x0, y0, 2); do_pu(x0 + 4, y0, 2); do_pu(x0, y0 + 4, 2); do_pu(x0 + 4, y0 + 4, 2);
    end else do_pu(x0, y0, $clog2(s));
  endtask

  task automatic run_picture(input int w, input int h);
    logic [31:0] r;
    PW = w; PH = h; FW = (w + 63) / 64 * 64; FH = (h + 63) / 64 * 64;
    for (int i = 0; i < 7; i++) pu_count[i] = 0;
    for (int i = 0; i < 35; i++) mode_count[i] = 0;
    gated_blocks = 0; total_cycles = 0;
    // picture, laid out in proportion to its size: smooth sky gradient,
    // a band of diagonal stripes, vertical stripes, oblique stripes and a
    // noisy corner
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int v, yy, xs, ys;
        yy = y < PH ? y : PH - 1;
        xs = x * 416 / PW; ys = yy * 240 / PH;
        if (ys < 80)       v = 60 + ys / 2 + xs / 16;
        else if (ys < 140) v = (((x + 2 * yy) / 6) % 2) ? 200 : 50;
        else if (xs < 200) v = ((x / 5) % 2) ? 170 : 90;
        else if (xs < 320) v = (((x - yy) / 7) % 2 != 0) ? 210 : 30;
        else               v = $urandom % 256;
        frame[y][x] = v % 256;
        ddr.mem[y * FW + x] = 8'(v % 256);
      end
    ci(CI_STRIDE, FW, 0, r);
    for (int ly = 0; ly < PH; ly += 64)
      for (int lx = 0; lx < PW; lx += 64) begin
        lx0 = lx; ly0 = ly;
        ci(CI_LCU_ADDR, ly * FW + lx, 0, r);
        ci(CI_CMD, 32'b001, 0, r);
        wait_status(5);
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
          vmap[b] = r[23:0];
          checks++;
          if (r[23:0] != {8'(s / 64), 16'((64 * q - s * s) / 4096)}) begin
            failures++; $display("LCU(%0d,%0d) variance block %0d wrong", lx, ly, b);
          end
        end
        quad(0, 0, 64);
      end
    $display("%0dx%0d: %0d LCUs; PUs 4x4 %0d, 8x8 %0d, 16x16 %0d, 32x32 %0d, 64x64 %0d",
             PW, PH, (FW / 64) * (FH / 64), pu_count[2], pu_count[3], pu_count[4], pu_count[5], pu_count[6]);
    $display("  chosen modes: planar %0d, DC %0d, angular %0d", mode_count[0], mode_count[1],
             pu_count[2] + pu_count[3] + pu_count[4] + pu_count[5] + pu_count[6] - mode_count[0] - mode_count[1]);
    $display("  prediction cycles %0d, block-cycles gated off (per PU) %0d", total_cycles, gated_blocks);
    checks++;
    if (pu_count[2] == 0 || pu_count[3] == 0 || pu_count[6] + pu_count[5] == 0) begin
      failures++; $display("PU size mix not exercised");
    end
  endtask

  initial begin
    rst_n = 0; ci_start = 0; ci_n = 0; ci_dataa = 0; ci_datab = 0;
    ref_we = 0; ref_sel_left = 0; ref_idx = 0; ref_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_picture(416, 240);
    run_picture(832, 480);
    run_picture(1920, 1080);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
