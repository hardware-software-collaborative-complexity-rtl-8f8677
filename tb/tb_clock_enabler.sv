// Self-checking testbench of clock_enabler: for a sequence of random
// masks and activity windows it counts the rising edges of every gated
// clock and compares them with the number of free-running clock edges for
// which that block was enabled; it also checks that a gated clock is never
// high while the free clock is low (no glitches) and the status bits.
module tb_clock_enabler;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 8;

  logic [N-1:0] mask, gclk, en_status;
  logic active;
  int edges [N];
  int expected [N];

  clock_enabler #(.NUM_HW(N)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge gclk[i]) edges[i]++;
  end
  always @(negedge clk) #1
    for (int i = 0; i < N; i++)
      if (gclk[i]) begin failures++; $display("gclk[%0d] high while clk low", i); end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask = '0; active = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin edges[i] = 0; expected[i] = 0; end
    for (int phase = 0; phase < 40; phase++) begin
      int len;
      len = 1 + $urandom % 20;
      mask = N'($urandom);
      active = ($urandom % 4) != 0;
      #1;
      checks++;
      if (en_status != (mask & {N{active}})) begin failures++; $display("en_status wrong"); end
      for (int c = 0; c < len; c++) begin
        for (int i = 0; i < N; i++) if (mask[i] && active) expected[i]++;
        @(negedge clk);
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (edges[i] != expected[i]) begin failures++; $display("block %0d: %0d edges, expected %0d", i, edges[i], expected[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
