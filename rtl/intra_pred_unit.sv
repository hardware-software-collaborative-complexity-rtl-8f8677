// Distributed intra prediction unit.
//
// NUM_HW prediction blocks (intra_pred_block), each owning eight columns of
// the LCU row, are fed the same original LCU row and the same reference
// samples, so one full PU row (up to 64 pixels) is predicted per cycle.
// For a PU of size N and K candidate modes the unit:
//   1. computes the DC value (sum of N top and N left samples, rounded,
//      >> log2(2N)) in one cycle;
//   2. evaluates each candidate, one PU row per cycle (K*N cycles), while
//      mode_selection accumulates the SAD per candidate;
//   3. waits for the pipeline to drain, then replays the cheapest mode
//      (N cycles) and mode_selection forwards its residue rows to the
//      transform output.
// A run therefore takes K*N + N + 8 cycles, counting the cycle in which
// `start` is high and the one in which `done` is high; `cycles` reports it.
// Each block runs on its own gated clock from clock_enabler, enabled by
// the software mask while the unit is busy; a block whose clock is off
// contributes neither cost nor residue.
//
// Row-at-a-time prediction with 8-pixel blocks, per-block clock gating and
// the mode selection after the blocks follow the design. The candidate
// count (MAX_CAND), SAD cost, final replay and DC computation in the unit
// are this implementation's choices.
//
// Pipeline: stage A issues the LCU row address, stage B presents the row
// and the request to the blocks, stage C (block outputs) feeds
// mode_selection, whose registered outputs form stage D.
module intra_pred_unit
  import hevc_intra_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  logic [5:0]                            pu_x,
  input  logic [5:0]                            pu_y,
  input  logic [2:0]                            pu_log2,
  input  logic [MAX_CAND-1:0][5:0]              cand,
  input  logic [3:0]                            num_cand,
  input  logic [NUM_HW-1:0]                     clk_mask,
  input  logic [REF_LEN-1:0][PIX_W-1:0]         top,
  input  logic [REF_LEN-1:0][PIX_W-1:0]         left,
  output logic [$clog2(LCU_SIZE)-1:0]           rd_row,
  input  logic [LCU_SIZE-1:0][PIX_W-1:0]        rd_data,
  output logic                                  tx_valid,
  output logic [5:0]                            tx_y,
  output logic [5:0]                            tx_mode,
  output logic [LCU_SIZE-1:0]                   tx_lane_valid,
  output logic [LCU_SIZE-1:0][PIX_W:0]          tx_residue,
  output logic [5:0]                            best_mode,
  output logic [COST_W-1:0]                     best_cost,
  output logic [COST_W-1:0]                     last_cost,
  output logic [NUM_HW-1:0]                     gate_en,
  output logic [15:0]                           cycles,
  output logic                                  busy,
  output logic                                  done
);
  typedef enum logic [2:0] {IDLE, DCV, EVAL, DRAIN, FINAL, FDRAIN} state_e;
  state_e state;

  logic [6:0]        n;
  logic [5:0]        ya;            // stage A row
  logic [3:0]        ca;            // stage A candidate index
  logic [2:0]        dcnt;
  logic [PIX_W-1:0]  dc_val;
  logic [15:0]       cyc;

  // stage B / C control
  logic              vb, lastb, finb, vc, lastc, finc;
  logic [5:0]        modeb, yb, modec, yc;

  assign n      = 7'd1 << pu_log2;
  assign rd_row = pu_y + ya;

  // DC value of the PU.
  logic [14:0] dc_sum;
  always_comb begin
    dc_sum = 15'(n);
    for (int i = 1; i <= LCU_SIZE; i++)
      if (i <= int'(n)) dc_sum = dc_sum + 15'(top[i]) + 15'(left[i]);
  end

  // Blocks overlapping the PU columns.
  logic [NUM_HW-1:0] overlap;
  always_comb
    for (int b = 0; b < NUM_HW; b++)
      overlap[b] = (7'(b * LANES + LANES) > 7'(pu_x)) && (7'(b * LANES) < 7'(pu_x) + n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      ya     <= '0;
      ca     <= '0;
      dcnt   <= '0;
      dc_val <= '0;
      cyc    <= '0;
      cycles <= '0;
      done   <= 1'b0;
      vb <= 1'b0; lastb <= 1'b0; finb <= 1'b0; modeb <= '0; yb <= '0;
      vc <= 1'b0; lastc <= 1'b0; finc <= 1'b0; modec <= '0; yc <= '0;
    end else begin
      done <= 1'b0;
      vb   <= 1'b0;
      if (state != IDLE) cyc <= cyc + 16'd1;
      case (state)
        IDLE: if (start) begin
          state <= DCV;
          cyc   <= 16'd1;
        end
        DCV: begin
          dc_val <= PIX_W'(dc_sum >> (pu_log2 + 3'd1));
          ya     <= '0;
          ca     <= '0;
          state  <= EVAL;
        end
        EVAL: begin
          vb    <= 1'b1;
          finb  <= 1'b0;
          modeb <= cand[ca[2:0]];
          yb    <= ya;
          lastb <= (7'(ya) == n - 7'd1);
          ya    <= ya + 6'd1;
          if (7'(ya) == n - 7'd1) begin
            ya <= '0;
            ca <= ca + 4'd1;
            if (ca + 4'd1 >= num_cand) begin
              state <= DRAIN;
              dcnt  <= '0;
            end
          end
        end
        DRAIN: begin
          dcnt <= dcnt + 3'd1;
          if (dcnt == 3'd2) state <= FINAL;
        end
        FINAL: begin
          vb    <= 1'b1;
          finb  <= 1'b1;
          modeb <= best_mode;
          yb    <= ya;
          lastb <= (7'(ya) == n - 7'd1);
          ya    <= ya + 6'd1;
          if (7'(ya) == n - 7'd1) begin
            state <= FDRAIN;
            dcnt  <= '0;
          end
        end
        FDRAIN: begin
          dcnt <= dcnt + 3'd1;
          if (dcnt == 3'd2) begin
            state  <= IDLE;
            done   <= 1'b1;
            cycles <= cyc + 16'd1;
          end
        end
        default: state <= IDLE;
      endcase
      vc    <= vb;
      lastc <= lastb;
      finc  <= finb;
      modec <= modeb;
      yc    <= yb;
    end
  end

  assign busy = (state != IDLE);

  logic [NUM_HW-1:0] gclk;
  clock_enabler #(.NUM_HW(NUM_HW)) u_clk_en (
    .clk      (clk),
    .mask     (clk_mask),
    .active   (busy),
    .gclk     (gclk),
    .en_status(gate_en)
  );

  logic [NUM_HW-1:0][PIX_W+3-1:0]        blk_sad;
  logic [NUM_HW-1:0][LANES-1:0]          blk_lv;
  logic [NUM_HW-1:0][LANES-1:0][PIX_W:0] blk_res;

  for (genvar b = 0; b < NUM_HW; b++) begin : g_hw
    logic                        ov;
    logic [LANES-1:0][PIX_W-1:0] pr;
    intra_pred_block #(.BLK_IDX(b)) u_blk (
      .clk       (gclk[b]),
      .rst_n     (rst_n),
      .in_valid  (vb),
      .mode      (modeb),
      .pu_x      (pu_x),
      .pu_log2   (pu_log2),
      .y         (yb),
      .dc_val    (dc_val),
      .top       (top),
      .left      (left),
      .orig      (rd_data[b*LANES +: LANES]),
      .out_valid (ov),
      .pred      (pr),
      .residue   (blk_res[b]),
      .lane_valid(blk_lv[b]),
      .sad       (blk_sad[b])
    );
  end

  mode_selection u_sel (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (start && state == IDLE),
    .row_valid     (vc),
    .row_last      (lastc),
    .row_final     (finc),
    .row_mode      (modec),
    .row_y         (yc),
    .blk_sel       (overlap & gate_en),
    .blk_sad       (blk_sad),
    .blk_lane_valid(blk_lv),
    .blk_residue   (blk_res),
    .best_mode     (best_mode),
    .best_cost     (best_cost),
    .last_cost     (last_cost),
    .tx_valid      (tx_valid),
    .tx_y          (tx_y),
    .tx_mode       (tx_mode),
    .tx_lane_valid (tx_lane_valid),
    .tx_residue    (tx_residue)
  );
endmodule
