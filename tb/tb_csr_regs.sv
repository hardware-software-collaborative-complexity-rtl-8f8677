// Self-checking testbench of csr_regs: issues custom instructions like the
// processor would (start for one cycle, wait for done) and checks every
// control field, the one-cycle command pulses, the status word, the
// variance-RAM and histogram read paths (modelled here as one-cycle RAMs
// addressed by datab) and the two-cycle instruction timing.
module tb_csr_regs;
  import hevc_intra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ci_start, ci_done;
  logic [7:0] ci_n;
  logic [31:0] ci_dataa, ci_datab, ci_result;
  ctrl_t ctrl;
  stat_t stat;
  logic [5:0] var_raddr, hist_mode;
  logic [23:0] var_rdata;
  logic [HIST_W-1:0] hist_data;
  int pulses_load = 0, pulses_edge = 0, pulses_pred = 0;

  csr_regs dut (.*);

  always_ff @(posedge clk) begin
    var_rdata <= {2'b10, var_raddr, 16'h1234};
    hist_data <= HIST_W'(hist_mode) * 24'd1000;
    if (rst_n && ctrl.cmd_load) pulses_load++;
    if (rst_n && ctrl.cmd_edge) pulses_edge++;
    if (rst_n && ctrl.cmd_pred) pulses_pred++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ci(input logic [7:0] n, input logic [31:0] a, input logic [31:0] b, output logic [31:0] r);
    int cyc = 0;
    @(negedge clk);
    ci_start = 1; ci_n = n; ci_dataa = a; ci_datab = b;
    @(negedge clk) ci_start = 0;
    cyc = 1;
    while (!ci_done) begin @(negedge clk); cyc++; end
    r = ci_result;
    checks++;
    if (cyc != 2) begin failures++; $display("instruction %0h took %0d cycles", n, cyc); end
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] r;
    rst_n = 0; ci_start = 0; ci_n = 0; ci_dataa = 0; ci_datab = 0; stat = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ci(CI_LCU_ADDR, 32'h0001_2340, 0, r);  expect_eq(ctrl.lcu_addr, 32'h0001_2340, "lcu_addr");
    ci(CI_STRIDE, 32'd1920, 0, r);         expect_eq(ctrl.stride, 32'd1920, "stride");
    ci(CI_PU, {13'd0, 3'd4, 2'd0, 6'd48, 2'd0, 6'd16}, 0, r);
    expect_eq(32'(ctrl.pu_x), 16, "pu_x"); expect_eq(32'(ctrl.pu_y), 48, "pu_y"); expect_eq(32'(ctrl.pu_log2), 4, "pu_log2");
    ci(CI_CLK_MASK, 32'h5A, 0, r);         expect_eq(32'(ctrl.clk_mask), 32'h5A, "clk_mask");
    for (int i = 0; i < MAX_CAND; i++) ci(CI_CAND, 32'(i * 4 + 2), 32'(i), r);
    for (int i = 0; i < MAX_CAND; i++) expect_eq(32'(ctrl.cand[i]), 32'(i * 4 + 2), "cand");
    ci(CI_NUM_CAND, 5, 0, r);              expect_eq(32'(ctrl.num_cand), 5, "num_cand");
    ci(CI_CMD, 32'b101, 0, r);
    ci(CI_CMD, 32'b010, 0, r);
    @(negedge clk);
    expect_eq(pulses_load, 1, "load pulses"); expect_eq(pulses_edge, 1, "edge pulses"); expect_eq(pulses_pred, 1, "pred pulses");
    stat.lcu_busy = 1; stat.pred_done = 1; stat.edge_busy = 1;
    stat.best_mode = 6'd27; stat.best_cost = 24'h00ABCD; stat.hist_peak = 6'd11;
    stat.pred_cycles = 16'd99; stat.gate_en = 8'h3C; stat.last_cost = 24'h00F00D;
    ci(CI_STATUS, 0, 0, r);    expect_eq(r, 32'h85, "status");
    ci(CI_BEST, 0, 0, r);      expect_eq(r, {24'h00ABCD, 2'b00, 6'd27}, "best");
    ci(CI_HIST_PEAK, 0, 0, r); expect_eq(r, 11, "peak");
    ci(CI_CYCLES, 0, 0, r);    expect_eq(r, 99, "cycles");
    ci(CI_GATE_STAT, 0, 0, r); expect_eq(r, 32'h3C, "gate");
    ci(CI_LAST_COST, 0, 0, r); expect_eq(r, 32'h00F00D, "last cost");
    for (int i = 0; i < 64; i += 7) begin
      ci(CI_VAR_RD, 0, 32'(i), r);  expect_eq(r, {8'd0, 2'b10, 6'(i), 16'h1234}, "var read");
    end
    for (int m = 2; m <= 34; m += 5) begin
      ci(CI_HIST_RD, 0, 32'(m), r); expect_eq(r, 32'(m * 1000), "hist read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
