// HEVC intra encoding accelerator: the custom hardware of a
// hardware/software complexity-reduction scheme for HEVC intra coding.
//
// Software on an embedded processor decides the PU size from a variance
// map and the candidate intra modes from a gradient histogram; this
// hardware produces both maps and evaluates the chosen modes:
//   * read_master fetches one 64x64 LCU from DDR3 into lcu_buffer;
//   * variance_computer then builds the 8x8 mean/variance map (auto-started
//     when the LCU has been loaded);
//   * sobel_histogram builds the 33-bin angular-mode histogram of one PU;
//   * intra_pred_unit predicts the PU one full row per cycle on eight
//     clock-gated 8-pixel prediction blocks, lets mode_selection pick the
//     cheapest candidate (SAD) and sends its residue rows to the transform
//     (tx_* ports);
//   * reference_register holds the neighbouring reconstructed samples,
//     written by the reconstruction path (ref_* ports);
//   * csr_regs exposes everything to the processor as custom instructions.
// The processor, the DDR3 memory and the transform are outside this module.
//
// Interfaces: custom-instruction slave (ci_*, two cycles per instruction),
// Avalon-MM-style pipelined 64-bit read master (avm_*), reference-sample
// write port, and the residue row output (one row per tx_valid). Status
// "done" flags are sticky and cleared by the next command of their kind.
module hevc_intra_accel
  import hevc_intra_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // custom instruction slave
  input  logic                         ci_start,
  input  logic [7:0]                   ci_n,
  input  logic [31:0]                  ci_dataa,
  input  logic [31:0]                  ci_datab,
  output logic                         ci_done,
  output logic [31:0]                  ci_result,
  // frame memory
  input  logic                         ddr_calibrated,
  output logic [31:0]                  avm_address,
  output logic                         avm_read,
  input  logic                         avm_waitrequest,
  input  logic [63:0]                  avm_readdata,
  input  logic                         avm_readdatavalid,
  // reference samples from the reconstruction path
  input  logic                         ref_we,
  input  logic                         ref_sel_left,
  input  logic [7:0]                   ref_idx,
  input  logic [PIX_W-1:0]             ref_data,
  // residue rows to the transform
  output logic                         tx_valid,
  output logic [5:0]                   tx_y,
  output logic [5:0]                   tx_mode,
  output logic [LCU_SIZE-1:0]          tx_lane_valid,
  output logic [LCU_SIZE-1:0][PIX_W:0] tx_residue
);
  ctrl_t ctrl;
  stat_t stat;

  // LCU buffer write side
  logic                        lb_we;
  logic [5:0]                  lb_wrow;
  logic [2:0]                  lb_wseg;
  logic [LANES-1:0][PIX_W-1:0] lb_wdata;
  // LCU buffer read ports: 0 variance, 1 edge detector, 2 prediction
  logic [2:0][5:0]                          lb_rrow;
  logic [2:0][LCU_SIZE-1:0][PIX_W-1:0]      lb_rdata;

  logic lcu_busy, lcu_done_p, var_busy, var_done_p, edge_busy, edge_done_p;
  logic pred_busy, pred_done_p;
  logic lcu_done_s, var_done_s, edge_done_s, pred_done_s;

  logic [5:0]        var_raddr, hist_mode, hist_peak, best_mode;
  logic [23:0]       var_rdata;
  logic [HIST_W-1:0] hist_data;
  logic [COST_W-1:0] best_cost, last_cost;
  logic [15:0]       pred_cycles;
  logic [NUM_HW-1:0] gate_en;

  logic [REF_LEN-1:0][PIX_W-1:0] ref_top, ref_left;

  csr_regs u_csr (
    .clk, .rst_n, .ci_start, .ci_n, .ci_dataa, .ci_datab, .ci_done, .ci_result,
    .ctrl, .stat, .var_raddr, .var_rdata, .hist_mode, .hist_data
  );

  read_master u_rm (
    .clk, .rst_n,
    .start          (ctrl.cmd_load),
    .lcu_addr       (ctrl.lcu_addr),
    .stride         (ctrl.stride),
    .ddr_calibrated,
    .avm_address, .avm_read, .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .wr_en          (lb_we),
    .wr_row         (lb_wrow),
    .wr_seg         (lb_wseg),
    .wr_data        (lb_wdata),
    .busy           (lcu_busy),
    .done           (lcu_done_p)
  );

  lcu_buffer #(.NRD(3)) u_lcu (
    .clk,
    .wr_en  (lb_we),
    .wr_row (lb_wrow),
    .wr_seg (lb_wseg),
    .wr_data(lb_wdata),
    .rd_row (lb_rrow),
    .rd_data(lb_rdata)
  );

  variance_computer u_var (
    .clk, .rst_n,
    .start    (lcu_done_p),
    .rd_row   (lb_rrow[0]),
    .rd_data  (lb_rdata[0]),
    .ram_raddr(var_raddr),
    .ram_rdata(var_rdata),
    .busy     (var_busy),
    .done     (var_done_p)
  );

  sobel_histogram u_edge (
    .clk, .rst_n,
    .start    (ctrl.cmd_edge),
    .pu_x     (ctrl.pu_x),
    .pu_y     (ctrl.pu_y),
    .pu_log2  (ctrl.pu_log2),
    .rd_row   (lb_rrow[1]),
    .rd_data  (lb_rdata[1]),
    .hist_mode(hist_mode),
    .hist_data(hist_data),
    .peak_mode(hist_peak),
    .busy     (edge_busy),
    .done     (edge_done_p)
  );

  reference_register u_ref (
    .clk, .rst_n,
    .we      (ref_we),
    .sel_left(ref_sel_left),
    .idx     (ref_idx),
    .data    (ref_data),
    .top     (ref_top),
    .left    (ref_left)
  );

  intra_pred_unit u_pred (
    .clk, .rst_n,
    .start        (ctrl.cmd_pred),
    .pu_x         (ctrl.pu_x),
    .pu_y         (ctrl.pu_y),
    .pu_log2      (ctrl.pu_log2),
    .cand         (ctrl.cand),
    .num_cand     (ctrl.num_cand),
    .clk_mask     (ctrl.clk_mask),
    .top          (ref_top),
    .left         (ref_left),
    .rd_row       (lb_rrow[2]),
    .rd_data      (lb_rdata[2]),
    .tx_valid, .tx_y, .tx_mode, .tx_lane_valid, .tx_residue,
    .best_mode    (best_mode),
    .best_cost    (best_cost),
    .last_cost    (last_cost),
    .gate_en      (gate_en),
    .cycles       (pred_cycles),
    .busy         (pred_busy),
    .done         (pred_done_p)
  );

  // Sticky completion flags.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcu_done_s  <= 1'b0;
      var_done_s  <= 1'b0;
      edge_done_s <= 1'b0;
      pred_done_s <= 1'b0;
    end else begin
      if (ctrl.cmd_load)     begin lcu_done_s <= 1'b0; var_done_s <= 1'b0; end
      if (lcu_done_p)        lcu_done_s  <= 1'b1;
      if (var_done_p)        var_done_s  <= 1'b1;
      if (ctrl.cmd_edge)     edge_done_s <= 1'b0;
      else if (edge_done_p)  edge_done_s <= 1'b1;
      if (ctrl.cmd_pred)     pred_done_s <= 1'b0;
      else if (pred_done_p)  pred_done_s <= 1'b1;
    end
  end

  always_comb begin
    stat.lcu_busy    = lcu_busy;
    stat.var_busy    = var_busy;
    stat.edge_busy   = edge_busy;
    stat.pred_busy   = pred_busy;
    stat.lcu_done    = lcu_done_s;
    stat.var_done    = var_done_s;
    stat.edge_done   = edge_done_s;
    stat.pred_done   = pred_done_s;
    stat.best_mode   = best_mode;
    stat.best_cost   = best_cost;
    stat.last_cost   = last_cost;
    stat.hist_peak   = hist_peak;
    stat.pred_cycles = pred_cycles;
    stat.gate_en     = gate_en;
  end
endmodule
