// Self-checking testbench of reference_register: checks the reset value
// 128, random writes to the top and left arrays, the corner write that
// updates both arrays, and that an out-of-range index is ignored.
module tb_reference_register;
  import hevc_intra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, we, sel_left;
  logic [7:0] idx;
  logic [PIX_W-1:0] data;
  logic [REF_LEN-1:0][PIX_W-1:0] top, left;
  int exp_top [REF_LEN], exp_left [REF_LEN];

  reference_register dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < REF_LEN; i++) begin
      checks += 2;
      if (top[i] != 8'(exp_top[i]))  begin failures++; $display("top[%0d]=%0d exp %0d", i, top[i], exp_top[i]); end
      if (left[i] != 8'(exp_left[i])) begin failures++; $display("left[%0d]=%0d exp %0d", i, left[i], exp_left[i]); end
    end
  endtask

  initial begin
    rst_n = 0; we = 0; sel_left = 0; idx = 0; data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < REF_LEN; i++) begin exp_top[i] = 128; exp_left[i] = 128; end
    @(negedge clk) compare();
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      we = 1; sel_left = 1'($urandom); idx = 8'($urandom % 140); data = 8'($urandom);
      if (idx == 0) begin exp_top[0] = data; exp_left[0] = data; end
      else if (idx < REF_LEN) begin
        if (sel_left) exp_left[idx] = data; else exp_top[idx] = data;
      end
    end
    @(negedge clk) we = 0;
    @(negedge clk) compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
