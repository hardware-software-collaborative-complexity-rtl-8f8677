// Variance generator: builds the variance map of the LCU held in the
// on-chip buffer and stores it in a RAM that the processor reads.
//
// The design asks for the variance of the LCU to be stored in a RAM from
// which software derives the PU map; the granularity is not given. This
// implementation computes, for every 8x8 block (the minimum CU size), the
// mean sum/64 and the variance (64*sum(p^2) - sum(p)^2) / 4096, truncated.
// Storing the mean as well lets software merge four blocks into the
// variance of a larger partition: var = mean(var_i) + mean(mean_i^2) - mean^2.
//
// Operation: after `start` the LCU is scanned row by row, one 8-pixel
// segment per cycle (8 squarers). Eight accumulator pairs, one per block
// column, collect sum and sum of squares; after the eighth row of a block
// its entry {mean[7:0], var[15:0]} is written to RAM address
// 8*block_row + block_col. A run takes LCU_SIZE*NUM_HW + 2 cycles and
// ends with a one-cycle `done`. The RAM read port (`ram_raddr`,
// `ram_rdata`, one cycle latency) belongs to the processor side.
module variance_computer
  import hevc_intra_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic [$clog2(LCU_SIZE)-1:0]  rd_row,
  input  logic [LCU_SIZE-1:0][PIX_W-1:0] rd_data,
  input  logic [5:0]                   ram_raddr,
  output logic [23:0]                  ram_rdata,
  output logic                         busy,
  output logic                         done
);
  localparam int unsigned SW = $clog2(NUM_HW);    // segment index bits
  localparam int unsigned RW = $clog2(LCU_SIZE);  // row index bits

  logic [RW+SW-1:0] idx, idx_d;          // issued / data-stage position
  logic             run, val_d;
  logic [13:0]      acc_sum [NUM_HW];
  logic [21:0]      acc_sq  [NUM_HW];

  // Stage-1 arithmetic on the segment selected from the row read.
  logic [SW-1:0]    seg_d;
  logic [RW-1:0]    row_d;
  logic [10:0]      seg_sum;
  logic [18:0]      seg_sq;
  logic [13:0]      new_sum;
  logic [21:0]      new_sq;
  logic [27:0]      sq_scaled, sum_sq;
  logic [27:0]      diff;
  logic             blk_last;

  assign seg_d = idx_d[SW-1:0];
  assign row_d = idx_d[RW+SW-1:SW];
  assign rd_row = idx[RW+SW-1:SW];

  always_comb begin
    seg_sum = '0;
    seg_sq  = '0;
    for (int l = 0; l < LANES; l++) begin
      seg_sum = seg_sum + 11'(rd_data[LANES*seg_d + l]);
      seg_sq  = seg_sq + 19'(rd_data[LANES*seg_d + l] * rd_data[LANES*seg_d + l]);
    end
    new_sum   = acc_sum[seg_d] + 14'(seg_sum);
    new_sq    = acc_sq[seg_d] + 22'(seg_sq);
    sq_scaled = {new_sq, 6'b0};
    sum_sq    = 28'(new_sum * new_sum);
    diff      = sq_scaled - sum_sq;
    blk_last  = (row_d[2:0] == 3'd7);
  end

  logic        ram_we;
  logic [5:0]  ram_waddr;
  logic [23:0] ram_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx   <= '0;
      idx_d <= '0;
      run   <= 1'b0;
      val_d <= 1'b0;
      done  <= 1'b0;
      ram_we <= 1'b0;
      ram_waddr <= '0;
      ram_wdata <= '0;
      for (int b = 0; b < NUM_HW; b++) begin
        acc_sum[b] <= '0;
        acc_sq[b]  <= '0;
      end
    end else begin
      done   <= 1'b0;
      ram_we <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        idx <= '0;
        for (int b = 0; b < NUM_HW; b++) begin
          acc_sum[b] <= '0;
          acc_sq[b]  <= '0;
        end
      end else if (run) begin
        idx <= idx + 1'b1;
        if (idx == '1) run <= 1'b0;
      end
      val_d <= run;
      idx_d <= idx;
      if (val_d) begin
        if (blk_last) begin
          acc_sum[seg_d] <= '0;
          acc_sq[seg_d]  <= '0;
          ram_we    <= 1'b1;
          ram_waddr <= {row_d[RW-1:3], seg_d};
          ram_wdata <= {new_sum[13:6], diff[27:12]};
          if (idx_d == '1) done <= 1'b1;
        end else begin
          acc_sum[seg_d] <= new_sum;
          acc_sq[seg_d]  <= new_sq;
        end
      end
    end
  end

  assign busy = run | val_d;

  sdp_ram #(.DEPTH(64), .WIDTH(24)) u_var_ram (
    .clk  (clk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .raddr(ram_raddr),
    .rdata(ram_rdata)
  );
endmodule
