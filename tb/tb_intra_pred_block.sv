// Self-checking testbench of intra_pred_block: random reference samples
// and original pixels, every mode 0..34, every PU size 4..64 and several
// PU positions and rows. The eight predicted samples are compared with an
// HEVC reference model that builds the extended reference array the way
// the standard does; residues, lane-valid flags and the SAD are checked
// too. The block is instantiated at BLK_IDX 3 and the result must appear
// one clock after the request.
module tb_intra_pred_block;
  import hevc_intra_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BI = 3;

  logic rst_n, in_valid, out_valid;
  logic [5:0] mode, pu_x, y;
  logic [2:0] pu_log2;
  logic [PIX_W-1:0] dc_val;
  logic [REF_LEN-1:0][PIX_W-1:0] top, left;
  logic [LANES-1:0][PIX_W-1:0] orig, pred;
  logic [LANES-1:0][PIX_W:0] residue;
  logic [LANES-1:0] lane_valid;
  logic [PIX_W+3-1:0] sad;
  u8arr_t t_ref, l_ref;

  intra_pred_block #(.BLK_IDX(BI)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int m, input int lg, input int px0, input int row);
    int n = 1 << lg, es = 0;
    @(negedge clk);
    mode = 6'(m); pu_log2 = 3'(lg); pu_x = 6'(px0); y = 6'(row); in_valid = 1;
    dc_val = 8'(dc_of(n, t_ref, l_ref));
    for (int l = 0; l < 8; l++) orig[l] = 8'($urandom);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("no out_valid"); end
    for (int l = 0; l < 8; l++) begin
      int x = BI * 8 + l - px0;
      bit v = (x >= 0 && x < n);
      checks++;
      if (lane_valid[l] != v) begin failures++; $display("lane_valid %0d", l); end
      if (v) begin
        int e = pred_px(m, n, x, row, t_ref, l_ref);
        int r = int'(orig[l]) - e;
        checks++;
        if (pred[l] != 8'(e) || $signed(residue[l]) != r) begin
          failures++;
          $display("mode %0d n %0d x %0d y %0d: pred %0d exp %0d", m, n, x, row, pred[l], e);
        end
        es += r < 0 ? -r : r;
      end
    end
    checks++;
    if (sad != 11'(es)) begin failures++; $display("sad %0d exp %0d", sad, es); end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; mode = 0; pu_x = 0; y = 0; pu_log2 = 3; dc_val = 0; orig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < REF_LEN; i++) begin
        t_ref[i] = (rep == 2) ? (i * 2) % 256 : $urandom % 256;
        l_ref[i] = (rep == 2) ? 255 - (i % 256) : $urandom % 256;
        if (i == 0) l_ref[0] = t_ref[0];
        top[i] = 8'(t_ref[i]); left[i] = 8'(l_ref[i]);
      end
      for (int m = 0; m < 35; m++) begin
        // 4x4 PU in either half of the block, 8x8 aligned, larger PUs
        one(m, 2, BI * 8, $urandom % 4);
        one(m, 2, BI * 8 + 4, $urandom % 4);
        one(m, 3, BI * 8, $urandom % 8);
        one(m, 4, 16, $urandom % 16);
        one(m, 5, 0, $urandom % 32);
        one(m, 5, 32, $urandom % 32);   // block outside the PU: no valid lanes
        one(m, 6, 0, $urandom % 64);
        one(m, 6, 0, 63);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
