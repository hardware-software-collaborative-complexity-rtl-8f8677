// Self-checking testbench of lcu_buffer: fills the 64x64 buffer with
// random 8-pixel segments, then reads every row on all three ports (with
// different rows per port) and compares with a shadow copy; also checks
// the one-cycle read latency and that a later write overwrites a segment.
module tb_lcu_buffer;
  import hevc_intra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [5:0] wr_row;
  logic [2:0] wr_seg;
  logic [LANES-1:0][PIX_W-1:0] wr_data;
  logic [2:0][5:0] rd_row;
  logic [2:0][LCU_SIZE-1:0][PIX_W-1:0] rd_data;
  logic [LCU_SIZE-1:0][PIX_W-1:0] shadow [LCU_SIZE];

  lcu_buffer #(.NRD(3)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_row = 0; wr_seg = 0; wr_data = '0; rd_row = '0;
    for (int r = 0; r < 64; r++)
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 6'(r); wr_seg = 3'(s);
        for (int l = 0; l < 8; l++) begin
          wr_data[l] = 8'($urandom);
          shadow[r][s*8+l] = wr_data[l];
        end
      end
    @(negedge clk) wr_en = 0;
    // overwrite one segment
    @(negedge clk);
    wr_en = 1; wr_row = 6'd17; wr_seg = 3'd5; wr_data = 64'h0102030405060708;
    for (int l = 0; l < 8; l++) shadow[17][40+l] = wr_data[l];
    @(negedge clk) wr_en = 0;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      rd_row[0] = 6'(r); rd_row[1] = 6'(63 - r); rd_row[2] = 6'((r * 7) % 64);
      @(posedge clk); #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_data[p] !== shadow[rd_row[p]]) begin
          failures++;
          $display("row %0d port %0d mismatch", rd_row[p], p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
