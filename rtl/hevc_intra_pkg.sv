// Shared constants, types and arithmetic helpers of the HEVC intra accelerator.
//
// The LCU size (64x64), the pixel width (8 bits), the eight-pixel prediction
// block and the number of such blocks per LCU row (64/8 = 8) follow the
// design description. The custom-instruction register map, the 8x8 variance
// granularity, the candidate-list depth and the cost width are choices of
// this implementation. Intra mode numbering follows HEVC: 0 planar, 1 DC,
// 2..34 angular (2..17 horizontal family, 18..34 vertical family).
package hevc_intra_pkg;

  localparam int unsigned LCU_SIZE = 64;             // LCU width/height in pixels
  localparam int unsigned PIX_W    = 8;              // bits per pixel
  localparam int unsigned LANES    = 8;              // pixels per prediction block per cycle
  localparam int unsigned NUM_HW   = LCU_SIZE / LANES; // prediction blocks per LCU row
  localparam int unsigned REF_LEN  = 2 * LCU_SIZE + 1; // corner + 2N samples
  localparam int unsigned NUM_ANG  = 33;             // angular modes 2..34
  localparam int unsigned MAX_CAND = 8;              // candidate modes per PU
  localparam int unsigned COST_W   = 24;             // SAD of a 64x64 PU < 2^20
  localparam int unsigned HIST_W   = 24;             // histogram bin width

  localparam logic [5:0] MODE_PLANAR = 6'd0;
  localparam logic [5:0] MODE_DC     = 6'd1;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic signed [PIX_W:0] res_t;              // residue orig - pred

  // Custom-instruction function codes (ci_n).
  typedef enum logic [7:0] {
    CI_CMD       = 8'h00,  // write: bit0 load LCU, bit1 edge/histogram, bit2 prediction
    CI_LCU_ADDR  = 8'h01,  // write: byte address of LCU top-left in frame memory
    CI_STRIDE    = 8'h02,  // write: frame line stride in bytes
    CI_PU        = 8'h03,  // write: [5:0] pu_x, [13:8] pu_y, [18:16] log2 size
    CI_CLK_MASK  = 8'h04,  // write: clock enable per prediction block
    CI_CAND      = 8'h05,  // write: candidate[datab] = dataa[5:0]
    CI_NUM_CAND  = 8'h06,  // write: number of candidates (1..MAX_CAND)
    CI_STATUS    = 8'h10,  // read: {.., pred_done, edge_done, var_done, lcu_done, pred_busy, edge_busy, var_busy, lcu_busy}
    CI_VAR_RD    = 8'h11,  // read: variance RAM entry datab -> {mean, variance}
    CI_HIST_RD   = 8'h12,  // read: histogram bin for angular mode datab
    CI_BEST      = 8'h13,  // read: {best_cost, 2'b0, best_mode}
    CI_HIST_PEAK = 8'h14,  // read: mode of the largest histogram bin
    CI_CYCLES    = 8'h15,  // read: cycles taken by the last prediction run
    CI_GATE_STAT = 8'h16,  // read: clock enables currently applied
    CI_LAST_COST = 8'h17   // read: SAD of the last candidate evaluated
  } ci_func_e;

  // Control register contents driven towards the datapath.
  typedef struct packed {
    logic                 cmd_load;   // one-cycle pulses
    logic                 cmd_edge;
    logic                 cmd_pred;
    logic [31:0]          lcu_addr;
    logic [31:0]          stride;
    logic [5:0]           pu_x;
    logic [5:0]           pu_y;
    logic [2:0]           pu_log2;    // 2..6
    logic [NUM_HW-1:0]    clk_mask;
    logic [MAX_CAND-1:0][5:0] cand;
    logic [3:0]           num_cand;
  } ctrl_t;

  // Status values read back by the processor.
  typedef struct packed {
    logic                 lcu_busy, var_busy, edge_busy, pred_busy;
    logic                 lcu_done, var_done, edge_done, pred_done;
    logic [5:0]           best_mode;
    logic [COST_W-1:0]    best_cost;
    logic [COST_W-1:0]    last_cost;
    logic [5:0]           hist_peak;
    logic [15:0]          pred_cycles;
    logic [NUM_HW-1:0]    gate_en;
  } stat_t;

  // HEVC intraPredAngle for angular modes 2..34.
  function automatic logic signed [6:0] intra_angle(input logic [5:0] mode);
    logic signed [6:0] t [0:16];
    t = '{7'sd32, 7'sd26, 7'sd21, 7'sd17, 7'sd13, 7'sd9, 7'sd5, 7'sd2, 7'sd0,
          -7'sd2, -7'sd5, -7'sd9, -7'sd13, -7'sd17, -7'sd21, -7'sd26, -7'sd32};
    if (mode < 6'd2)       return 7'sd0;
    else if (mode <= 6'd18) return t[5'(mode - 6'd2)];
    else                    return -t[5'(mode - 6'd18)];  // 19..34 mirror 17..2
  endfunction

  // HEVC invAngle (256*32/angle, rounded) for negative angles.
  function automatic logic signed [13:0] inv_angle(input logic signed [6:0] ang);
    case (ang)
      -7'sd2:  return -14'sd4096;
      -7'sd5:  return -14'sd1638;
      -7'sd9:  return -14'sd910;
      -7'sd13: return -14'sd630;
      -7'sd17: return -14'sd482;
      -7'sd21: return -14'sd390;
      -7'sd26: return -14'sd315;
      -7'sd32: return -14'sd256;
      default: return 14'sd0;
    endcase
  endfunction

  // Closest angular mode to the edge direction perpendicular to gradient
  // (gx, gy). The prediction direction of a vertical-family mode has slope
  // angle/32 = gy/gx, of a horizontal-family mode angle/32 = gx/gy. The
  // magnitude is found by comparing 64*|num| with the doubled midpoints
  // between successive angles {0,2,5,9,13,17,21,26,32}: no divider needed.
  function automatic logic [5:0] closest_mode(input logic signed [11:0] gx,
                                              input logic signed [11:0] gy);
    logic [10:0] ax, ay, num, den;
    logic        vert, neg;
    logic [3:0]  k;
    logic [6:0]  mid [0:7];
    mid = '{7'd2, 7'd7, 7'd14, 7'd22, 7'd30, 7'd38, 7'd47, 7'd58};
    ax   = gx[11] ? 11'(-gx) : 11'(gx);
    ay   = gy[11] ? 11'(-gy) : 11'(gy);
    vert = (ax > ay);
    num  = vert ? ay : ax;
    den  = vert ? ax : ay;
    neg  = (gx[11] ^ gy[11]) && (num != 0);
    k    = '0;
    for (int i = 0; i < 8; i++)
      if (({7'd0, num} << 6) > ({7'd0, den} * 18'(mid[i]))) k = k + 4'd1;
    if (vert) return neg ? 6'(6'd26 - 6'(k)) : 6'(6'd26 + 6'(k));
    else      return neg ? 6'(6'd10 + 6'(k)) : 6'(6'd10 - 6'(k));
  endfunction

endpackage
