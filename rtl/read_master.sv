// Read master: fetches one full LCU from external frame memory into the
// on-chip LCU buffer.
//
// A fetch starts on `start` but waits until the DDR3 controller reports
// calibration (`ddr_calibrated`), as the design requires. The LCU is read
// in raster order, LCU_SIZE rows of LCU_SIZE/8 beats, each beat carrying 8
// pixels (64 bits, lowest byte = leftmost pixel). Beat addresses are
// lcu_addr + row*stride + 8*seg. The memory side is a simple
// Avalon-MM-style pipelined read master: `avm_read` is held until
// `!avm_waitrequest`; data return in order on `avm_readdatavalid`; up to
// MAX_OUT reads may be outstanding. The bus protocol, beat width and
// outstanding-read limit are this implementation's choices. `done` pulses
// for one cycle after the last beat has been written.
module read_master
  import hevc_intra_pkg::*;
#(
  parameter int unsigned MAX_OUT = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [31:0]                 lcu_addr,
  input  logic [31:0]                 stride,
  input  logic                        ddr_calibrated,
  output logic [31:0]                 avm_address,
  output logic                        avm_read,
  input  logic                        avm_waitrequest,
  input  logic [63:0]                 avm_readdata,
  input  logic                        avm_readdatavalid,
  output logic                        wr_en,
  output logic [$clog2(LCU_SIZE)-1:0] wr_row,
  output logic [$clog2(NUM_HW)-1:0]   wr_seg,
  output logic [LANES-1:0][PIX_W-1:0] wr_data,
  output logic                        busy,
  output logic                        done
);
  localparam int unsigned BEATS = LCU_SIZE * NUM_HW;
  localparam int unsigned BW    = $clog2(BEATS);

  typedef enum logic [1:0] {IDLE, WAIT_CAL, RUN} state_e;
  state_e state;

  logic [BW:0]     req_cnt, rsp_cnt;   // requests issued / data received
  logic [$clog2(MAX_OUT+1)-1:0] outstanding;
  logic [31:0]     row_base;
  logic            issue, accept;

  assign issue  = (state == RUN) && (req_cnt < (BW+1)'(BEATS)) &&
                  (outstanding < $bits(outstanding)'(MAX_OUT));
  assign accept = avm_read && !avm_waitrequest;

  assign avm_read    = issue;
  assign avm_address = row_base + {26'd0, req_cnt[$clog2(NUM_HW)-1:0], 3'b000};
  assign busy        = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      req_cnt     <= '0;
      rsp_cnt     <= '0;
      outstanding <= '0;
      row_base    <= '0;
      done        <= 1'b0;
      wr_en       <= 1'b0;
      wr_row      <= '0;
      wr_seg      <= '0;
      wr_data     <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state    <= WAIT_CAL;
          req_cnt  <= '0;
          rsp_cnt  <= '0;
          row_base <= lcu_addr;
        end
        WAIT_CAL: if (ddr_calibrated) state <= RUN;
        RUN: begin
          if (accept) begin
            req_cnt <= req_cnt + 1'b1;
            if (req_cnt[$clog2(NUM_HW)-1:0] == '1) row_base <= row_base + stride;
          end
          if (avm_readdatavalid) begin
            wr_en   <= 1'b1;
            wr_row  <= rsp_cnt[BW-1:$clog2(NUM_HW)];
            wr_seg  <= rsp_cnt[$clog2(NUM_HW)-1:0];
            wr_data <= avm_readdata;
            rsp_cnt <= rsp_cnt + 1'b1;
            if (rsp_cnt == (BW+1)'(BEATS - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end
          end
          outstanding <= outstanding + $bits(outstanding)'(accept) - $bits(outstanding)'(avm_readdatavalid);
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Memory must not return more data than was requested.
  assert property (@(posedge clk) disable iff (!rst_n)
                   avm_readdatavalid |-> (state == RUN && outstanding != 0));
endmodule
