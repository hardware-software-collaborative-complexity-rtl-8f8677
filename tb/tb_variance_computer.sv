// Self-checking testbench of variance_computer: the testbench plays the
// LCU buffer (one-cycle row read) holding first a random LCU and then a
// structured one (flat, ramp and checkerboard 8x8 blocks). After each run
// all 64 RAM entries are read and compared with mean = sum/64 and
// variance = (64*sum(p^2) - sum^2)/4096 computed here; the run must take
// 64*8 + 2 cycles from start to done.
module tb_variance_computer;
  import hevc_intra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, done;
  logic [5:0] rd_row, ram_raddr;
  logic [LCU_SIZE-1:0][PIX_W-1:0] rd_data;
  logic [23:0] ram_rdata;
  logic [7:0] img [64][64];

  variance_computer dut (.*);

  always_ff @(posedge clk)
    for (int c = 0; c < 64; c++) rd_data[c] <= img[rd_row][c];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check();
    int cyc = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 64 * 8 + 2) begin failures++; $display("run took %0d cycles", cyc); end
    for (int b = 0; b < 64; b++) begin
      longint s = 0, q = 0;
      int by = b / 8, bx = b % 8, em, ev;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          s += img[by*8+y][bx*8+x];
          q += img[by*8+y][bx*8+x] * img[by*8+y][bx*8+x];
        end
      em = int'(s / 64);
      ev = int'((64 * q - s * s) / 4096);
      @(negedge clk) ram_raddr = 6'(b);
      @(posedge clk); #1;
      checks++;
      if (ram_rdata != {8'(em), 16'(ev)}) begin
        failures++;
        $display("block %0d: got mean %0d var %0d, expected %0d %0d", b, ram_rdata[23:16], ram_rdata[15:0], em, ev);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; ram_raddr = 0;
    foreach (img[y, x]) img[y][x] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_and_check();
    foreach (img[y, x]) begin
      case (((y / 8) * 8 + x / 8) % 4)
        0: img[y][x] = 8'd77;                          // flat: variance 0
        1: img[y][x] = 8'(x * 4 + y);                  // ramp
        2: img[y][x] = ((x + y) % 2) ? 8'd255 : 8'd0;  // maximal contrast
        default: img[y][x] = 8'($urandom % 16);
      endcase
    end
    run_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
