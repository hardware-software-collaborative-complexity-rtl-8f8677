// Self-checking testbench of read_master: a DDR3 model with random wait
// states and latencies holds a random frame; the master fetches two LCUs
// at different addresses and strides. Every buffer write is compared with
// the frame, every LCU position must be written exactly once, the fetch
// must not start before calibration, and `done` must pulse once per fetch.
module tb_read_master;
  import hevc_intra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, ddr_calibrated;
  logic [31:0] lcu_addr, stride, avm_address;
  logic avm_read, avm_waitrequest, avm_readdatavalid;
  logic [63:0] avm_readdata;
  logic wr_en, busy, done;
  logic [5:0] wr_row;
  logic [2:0] wr_seg;
  logic [LANES-1:0][PIX_W-1:0] wr_data;

  read_master dut (.*);
  ddr_model #(.BYTES(65536), .CAL_CYCLES(40)) ddr (
    .clk, .rst_n, .calibrated(ddr_calibrated), .address(avm_address), .read(avm_read),
    .waitrequest(avm_waitrequest), .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  int written [64][8];
  int done_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (done) done_cnt++;
    if (avm_read && !ddr_calibrated) begin failures++; $display("read before calibration"); end
    if (wr_en) begin
      written[wr_row][wr_seg]++;
      checks++;
      for (int l = 0; l < 8; l++)
        if (wr_data[l] != ddr.mem[(lcu_addr + wr_row * stride + wr_seg * 8 + l) % 65536]) begin
          failures++;
          $display("row %0d seg %0d lane %0d wrong", wr_row, wr_seg, l);
          break;
        end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(input int addr, input int str);
    int t0;
    foreach (written[r, s]) written[r][s] = 0;
    done_cnt = 0;
    @(negedge clk);
    lcu_addr = addr; stride = str; start = 1;
    @(negedge clk) start = 0;
    t0 = 0;
    while (!done && t0 < 10000) begin @(posedge clk); t0++; end
    @(negedge clk);
    foreach (written[r, s]) begin
      checks++;
      if (written[r][s] != 1) begin failures++; $display("seg %0d,%0d written %0d times", r, s, written[r][s]); end
    end
    checks++;
    if (done_cnt != 1) begin failures++; $display("done pulses %0d", done_cnt); end
    $display("LCU at %0d fetched in %0d cycles", addr, t0);
  endtask

  initial begin
    rst_n = 0; start = 0; lcu_addr = 0; stride = 0;
    for (int i = 0; i < 65536; i++) ddr.mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fetch(0, 256);        // started before calibration: must wait
    fetch(64 + 8 * 256, 320);
    $display("waitrequest stalls seen: %0d", ddr.stalls);
    checks++;
    if (ddr.stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
