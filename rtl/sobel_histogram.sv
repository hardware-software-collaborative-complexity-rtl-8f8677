// Edge detector and histogram parser.
//
// For every pixel of the current PU the unit applies the 3x3 Sobel
// operator (gx = right column - left column, gy = lower row - upper row,
// weights 1-2-1), maps the direction perpendicular to the gradient onto the
// closest HEVC angular mode (hevc_intra_pkg::closest_mode) and adds the
// gradient magnitude to that mode's bin of a 33-bin histogram (modes
// 2..34). When the PU is finished the mode with the largest bin is
// reported as `peak_mode`; software reads the bins (`hist_mode` ->
// `hist_data`, one cycle later) and sorts them into the list of candidate
// modes. This is the per-pixel loop of the fast mode selection algorithm;
// the descending sort stays in software.
//
// Choices of this implementation: the magnitude is |gx|+|gy|; neighbours
// outside the LCU are replaced by the nearest LCU pixel (pixels of
// neighbouring PUs inside the LCU are used as they are); one pixel is
// processed per cycle. For each PU row the three LCU rows around it are
// read first (4 cycles), so a PU of size N takes about N*(N+4)+4 cycles.
// Ties in the peak search go to the lower mode number.
module sobel_histogram
  import hevc_intra_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [5:0]                     pu_x,
  input  logic [5:0]                     pu_y,
  input  logic [2:0]                     pu_log2,
  output logic [$clog2(LCU_SIZE)-1:0]    rd_row,
  input  logic [LCU_SIZE-1:0][PIX_W-1:0] rd_data,
  input  logic [5:0]                     hist_mode,
  output logic [HIST_W-1:0]              hist_data,
  output logic [5:0]                     peak_mode,
  output logic                           busy,
  output logic                           done
);
  typedef enum logic [1:0] {IDLE, LOAD, PIX, FLUSH} state_e;
  state_e state;

  logic [LCU_SIZE-1:0][PIX_W-1:0] win [3];   // rows y-1, y, y+1
  logic [HIST_W-1:0] hist [NUM_ANG];
  logic [6:0]  n;                             // PU size
  logic [5:0]  x, y;                          // position inside PU
  logic [1:0]  lcnt;
  logic [1:0]  fcnt;
  logic        s1_val;
  logic [5:0]  s1_mode;
  logic [11:0] s1_mag;

  assign n = 7'd1 << pu_log2;

  function automatic logic [5:0] clamp_idx(input logic signed [7:0] v);
    if (v < 0)                           return 6'd0;
    else if (v > $signed(8'(LCU_SIZE-1))) return 6'(LCU_SIZE-1);
    else                                 return v[5:0];
  endfunction

  // LCU row requested during LOAD: pu_y + y - 1 + lcnt, clamped.
  assign rd_row = clamp_idx($signed({2'b0, pu_y}) + $signed({2'b0, y}) - 8'sd1 + $signed({6'b0, lcnt}));

  // Sobel at the current pixel.
  logic [5:0]  cl, cc, cr;
  logic signed [11:0] gx, gy;
  logic [10:0] agx, agy;
  always_comb begin
    cc = pu_x + x;
    cl = clamp_idx($signed({2'b0, cc}) - 8'sd1);
    cr = clamp_idx($signed({2'b0, cc}) + 8'sd1);
    gx = $signed(12'(win[0][cr]) + 12'(2 * win[1][cr]) + 12'(win[2][cr]))
       - $signed(12'(win[0][cl]) + 12'(2 * win[1][cl]) + 12'(win[2][cl]));
    gy = $signed(12'(win[2][cl]) + 12'(2 * win[2][cc]) + 12'(win[2][cr]))
       - $signed(12'(win[0][cl]) + 12'(2 * win[0][cc]) + 12'(win[0][cr]));
    agx = gx[11] ? 11'(-gx) : 11'(gx);
    agy = gy[11] ? 11'(-gy) : 11'(gy);
  end

  // Peak search over the bins.
  logic [5:0]        pk;
  logic [HIST_W-1:0] pv;
  always_comb begin
    pk = 6'd2;
    pv = hist[0];
    for (int b = 1; b < NUM_ANG; b++)
      if (hist[b] > pv) begin
        pv = hist[b];
        pk = 6'(b + 2);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      x         <= '0;
      y         <= '0;
      lcnt      <= '0;
      fcnt      <= '0;
      s1_val    <= 1'b0;
      s1_mode   <= '0;
      s1_mag    <= '0;
      peak_mode <= 6'd2;
      done      <= 1'b0;
      hist_data <= '0;
      for (int b = 0; b < NUM_ANG; b++) hist[b] <= '0;
      for (int r = 0; r < 3; r++) win[r] <= '0;
    end else begin
      done   <= 1'b0;
      s1_val <= 1'b0;
      hist_data <= (hist_mode >= 6'd2 && hist_mode <= 6'd34) ? hist[hist_mode - 6'd2] : '0;
      if (s1_val) hist[s1_mode - 6'd2] <= hist[s1_mode - 6'd2] + HIST_W'(s1_mag);
      case (state)
        IDLE: if (start) begin
          for (int b = 0; b < NUM_ANG; b++) hist[b] <= '0;
          x     <= '0;
          y     <= '0;
          lcnt  <= '0;
          state <= LOAD;
        end
        LOAD: begin
          if (lcnt != 0) win[lcnt - 2'd1] <= rd_data;
          lcnt <= lcnt + 2'd1;
          if (lcnt == 2'd3) begin
            state <= PIX;
            x     <= '0;
          end
        end
        PIX: begin
          s1_val  <= 1'b1;
          s1_mode <= closest_mode(gx, gy);
          s1_mag  <= 12'(agx) + 12'(agy);
          x <= x + 6'd1;
          if (7'(x) == n - 7'd1) begin
            x <= '0;
            y <= y + 6'd1;
            lcnt <= '0;
            if (7'(y) == n - 7'd1) begin
              state <= FLUSH;
              fcnt  <= '0;
            end else state <= LOAD;
          end
        end
        FLUSH: begin
          fcnt <= fcnt + 2'd1;
          if (fcnt == 2'd1) begin
            peak_mode <= pk;
            done      <= 1'b1;
            state     <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
