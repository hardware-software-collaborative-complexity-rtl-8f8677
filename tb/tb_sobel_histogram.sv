// Self-checking testbench of sobel_histogram: the testbench plays the LCU
// buffer. For random images and for oriented stripe patterns it runs PUs
// of every size (4..64) at various LCU positions, then compares all 33
// histogram bins and the peak mode with a model that computes the Sobel
// gradients with clamped neighbours, picks the angular mode nearest to the
// edge direction by direct distance minimisation and accumulates
// |gx|+|gy|. Stripe images must peak at the mode of the stripe direction.
module tb_sobel_histogram;
  import hevc_intra_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, done;
  logic [5:0] pu_x, pu_y, rd_row, hist_mode, peak_mode;
  logic [2:0] pu_log2;
  logic [LCU_SIZE-1:0][PIX_W-1:0] rd_data;
  logic [HIST_W-1:0] hist_data;
  int img [64][64];

  sobel_histogram dut (.*);

  always_ff @(posedge clk)
    for (int c = 0; c < 64; c++) rd_data[c] <= 8'(img[rd_row][c]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(int y, int x);
    if (y < 0) y = 0; if (y > 63) y = 63;
    if (x < 0) x = 0; if (x > 63) x = 63;
    return img[y][x];
  endfunction

  task automatic run_pu(input int x0, input int y0, input int lg, input int expect_peak);
    longint h [35];
    int n = 1 << lg, cyc = 0, pk = 2;
    for (int m = 0; m < 35; m++) h[m] = 0;
    for (int y = y0; y < y0 + n; y++)
      for (int x = x0; x < x0 + n; x++) begin
        int gx = (px(y-1,x+1) + 2*px(y,x+1) + px(y+1,x+1)) - (px(y-1,x-1) + 2*px(y,x-1) + px(y+1,x-1));
        int gy = (px(y+1,x-1) + 2*px(y+1,x) + px(y+1,x+1)) - (px(y-1,x-1) + 2*px(y-1,x) + px(y-1,x+1));
        int m = closest_mode_ref(gx, gy);
        h[m] += (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
      end
    for (int m = 3; m < 35; m++) if (h[m] > h[pk]) pk = m;
    @(negedge clk);
    pu_x = 6'(x0); pu_y = 6'(y0); pu_log2 = 3'(lg); start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc > n * (n + 4) + 8) begin failures++; $display("PU %0d took %0d cycles", n, cyc); end
    for (int m = 2; m <= 34; m++) begin
      @(negedge clk) hist_mode = 6'(m);
      @(posedge clk); #1;
      checks++;
      if (hist_data != HIST_W'(h[m])) begin
        failures++;
        $display("PU(%0d,%0d,%0d) bin %0d: got %0d exp %0d", x0, y0, n, m, hist_data, h[m]);
      end
    end
    checks++;
    if (peak_mode != 6'(pk)) begin failures++; $display("peak %0d exp %0d", peak_mode, pk); end
    if (expect_peak >= 0) begin
      checks++;
      if (peak_mode != 6'(expect_peak)) begin failures++; $display("stripe peak %0d exp %0d", peak_mode, expect_peak); end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; pu_x = 0; pu_y = 0; pu_log2 = 3; hist_mode = 2;
    foreach (img[y, x]) img[y][x] = $urandom % 256;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_pu(0, 0, 2, -1);
    run_pu(60, 60, 2, -1);
    run_pu(8, 16, 3, -1);
    run_pu(48, 0, 4, -1);
    run_pu(32, 32, 5, -1);
    run_pu(0, 0, 6, -1);
    // vertical stripes: vertical edges -> mode 26
    foreach (img[y, x]) img[y][x] = ((x / 3) % 2) ? 200 : 20;
    run_pu(16, 16, 4, 26);
    // horizontal stripes -> mode 10
    foreach (img[y, x]) img[y][x] = ((y / 3) % 2) ? 200 : 20;
    run_pu(8, 8, 3, 10);
    // diagonal stripes along x+y = const -> 45 degree modes (2 or 34)
    foreach (img[y, x]) img[y][x] = (((x + y) / 4) % 2) ? 220 : 10;
    run_pu(16, 16, 4, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
