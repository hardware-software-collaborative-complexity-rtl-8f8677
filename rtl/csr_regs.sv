// Control and status registers behind the processor's custom-instruction
// port.
//
// The processor issues a custom instruction with function code `ci_n`
// (hevc_intra_pkg::ci_func_e) and operands `ci_dataa`, `ci_datab`. Every
// instruction completes in two cycles: the request is registered on the
// cycle after `ci_start`, write side effects and command pulses happen
// then, and `ci_done` with `ci_result` follows one cycle later, which also
// gives the variance RAM and histogram their read cycle (their addresses,
// `var_raddr` and `hist_mode`, are `ci_datab` of the start cycle). Writes return 0.
// Command bits of CI_CMD leave as one-cycle pulses in `ctrl`.
//
// Connecting the accelerators to the processor through custom instructions
// and steering them with control and status registers follow the design;
// the register map and the two-cycle timing are this implementation's.
module csr_regs
  import hevc_intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ci_start,
  input  logic [7:0]  ci_n,
  input  logic [31:0] ci_dataa,
  input  logic [31:0] ci_datab,
  output logic        ci_done,
  output logic [31:0] ci_result,
  output ctrl_t       ctrl,
  input  stat_t       stat,
  output logic [5:0]  var_raddr,
  input  logic [23:0] var_rdata,
  output logic [5:0]  hist_mode,
  input  logic [HIST_W-1:0] hist_data
);
  logic        req_v;
  logic [7:0]  req_n;
  logic [31:0] req_a, req_b;  // req_b keeps the candidate index

  // RAM-like sources are addressed in the start cycle so that their
  // one-cycle read data are ready when the request is executed.
  assign var_raddr = ci_datab[5:0];
  assign hist_mode = ci_datab[5:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_v     <= 1'b0;
      req_n     <= '0;
      req_a     <= '0;
      req_b     <= '0;
      ci_done   <= 1'b0;
      ci_result <= '0;
      ctrl      <= '0;
      ctrl.num_cand <= 4'd1;
      ctrl.pu_log2  <= 3'd3;
    end else begin
      ctrl.cmd_load <= 1'b0;
      ctrl.cmd_edge <= 1'b0;
      ctrl.cmd_pred <= 1'b0;
      ci_done       <= 1'b0;
      req_v         <= ci_start && !req_v;
      if (ci_start && !req_v) begin
        req_n <= ci_n;
        req_a <= ci_dataa;
        req_b <= ci_datab;
      end
      if (req_v) begin
        ci_done   <= 1'b1;
        ci_result <= '0;
        case (req_n)
          CI_CMD: begin
            ctrl.cmd_load <= req_a[0];
            ctrl.cmd_edge <= req_a[1];
            ctrl.cmd_pred <= req_a[2];
          end
          CI_LCU_ADDR: ctrl.lcu_addr <= req_a;
          CI_STRIDE:   ctrl.stride   <= req_a;
          CI_PU: begin
            ctrl.pu_x    <= req_a[5:0];
            ctrl.pu_y    <= req_a[13:8];
            ctrl.pu_log2 <= req_a[18:16];
          end
          CI_CLK_MASK: ctrl.clk_mask <= req_a[NUM_HW-1:0];
          CI_CAND:     ctrl.cand[req_b[$clog2(MAX_CAND)-1:0]] <= req_a[5:0];
          CI_NUM_CAND: ctrl.num_cand <= req_a[3:0];
          CI_STATUS:   ci_result <= {24'd0, stat.pred_done, stat.edge_done, stat.var_done, stat.lcu_done,
                                     stat.pred_busy, stat.edge_busy, stat.var_busy, stat.lcu_busy};
          CI_VAR_RD:   ci_result <= {8'd0, var_rdata};
          CI_HIST_RD:  ci_result <= 32'(hist_data);
          CI_BEST:     ci_result <= {stat.best_cost, 2'b00, stat.best_mode};
          CI_HIST_PEAK: ci_result <= {26'd0, stat.hist_peak};
          CI_CYCLES:   ci_result <= {16'd0, stat.pred_cycles};
          CI_GATE_STAT: ci_result <= 32'(stat.gate_en);
          CI_LAST_COST: ci_result <= 32'(stat.last_cost);
          default:     ci_result <= '0;
        endcase
      end
    end
  end

  // One instruction at a time: the processor waits for ci_done.
  assert property (@(posedge clk) disable iff (!rst_n) req_v |-> !ci_start);
endmodule
