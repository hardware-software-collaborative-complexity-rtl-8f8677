// Intra prediction block (one HW_i of the distributed prediction unit).
//
// Each block owns eight adjacent columns of the LCU row, columns
// 8*BLK_IDX .. 8*BLK_IDX+7, and produces, per cycle of its (gated) clock,
// the eight HEVC intra prediction samples of the requested PU row at those
// columns, the residue orig - pred and the SAD of the lanes that fall
// inside the PU. Planar, DC and the 33 angular modes are supported with
// the HEVC formulas: planar ((N-1-x)L + (x+1)T[N] + (N-1-y)T + (y+1)L[N] + N)
// >> (log2 N + 1); DC value supplied by the unit; angular two-tap
// interpolation ((32-f)*r[k] + f*r[k+1] + 16) >> 5 along the mode's
// intraPredAngle, with the side reference projected through invAngle for
// negative angles.
//
// The eight-pixel width and the row-at-a-time operation follow the design.
// Choices of this implementation: no reference smoothing filter and no DC,
// horizontal or vertical boundary filter are applied (the design does not
// mention them); PU sizes 4..64 are accepted; a 4x4 PU uses four of the
// eight lanes. Latency: results appear on the clock edge after `in_valid`,
// so with a gated clock the request must be held until that edge.
module intra_pred_block
  import hevc_intra_pkg::*;
#(
  parameter int unsigned BLK_IDX = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [5:0]                    mode,
  input  logic [5:0]                    pu_x,
  input  logic [2:0]                    pu_log2,
  input  logic [5:0]                    y,
  input  logic [PIX_W-1:0]              dc_val,
  input  logic [REF_LEN-1:0][PIX_W-1:0] top,
  input  logic [REF_LEN-1:0][PIX_W-1:0] left,
  input  logic [LANES-1:0][PIX_W-1:0]   orig,
  output logic                          out_valid,
  output logic [LANES-1:0][PIX_W-1:0]   pred,
  output logic [LANES-1:0][PIX_W:0]     residue,
  output logic [LANES-1:0]              lane_valid,
  output logic [PIX_W+3-1:0]            sad
);
  localparam int unsigned RL = REF_LEN;

  function automatic logic [PIX_W-1:0] pick(input logic [RL-1:0][PIX_W-1:0] a,
                                            input logic signed [10:0] i);
    if (i < 0)                      return a[0];
    else if (i > $signed(11'(RL-1))) return a[RL-1];
    else                            return a[i];
  endfunction

  logic [6:0] n;
  assign n = 7'd1 << pu_log2;

  logic [LANES-1:0][PIX_W-1:0] p_c;
  logic [LANES-1:0]            v_c;

  always_comb begin
    logic signed [7:0]  x, yy;
    logic signed [6:0]  ang;
    logic signed [13:0] inv;
    logic               vert;
    logic signed [13:0] pos;
    logic signed [10:0] k;
    logic [4:0]         f;
    logic [PIX_W-1:0]   ra, rb;
    logic signed [10:0] proj;
    logic signed [7:0]  jj;
    logic [21:0]        acc;
    ang  = intra_angle(mode);
    inv  = inv_angle(ang);
    vert = (mode >= 6'd18);
    yy   = $signed({2'b0, y});
    for (int l = 0; l < LANES; l++) begin
      x      = $signed(8'(BLK_IDX * LANES + l)) - $signed({2'b0, pu_x});
      v_c[l] = (x >= 0) && (x < $signed({1'b0, n}));
      ra = '0; rb = '0; f = '0; pos = '0; k = '0; proj = '0; acc = '0; jj = '0;
      if (mode == MODE_PLANAR) begin
        acc = (22'(n) - 22'(x) - 22'd1) * 22'(pick(left, 11'(yy + 8'sd1)))
            + (22'(x) + 22'd1) * 22'(pick(top, 11'({1'b0, n}) + 11'sd1))
            + (22'(n) - 22'(yy) - 22'd1) * 22'(pick(top, 11'(x + 8'sd1)))
            + (22'(yy) + 22'd1) * 22'(pick(left, 11'({1'b0, n}) + 11'sd1))
            + 22'(n);
        p_c[l] = PIX_W'(acc >> (pu_log2 + 3'd1));
      end else if (mode == MODE_DC) begin
        p_c[l] = dc_val;
      end else begin
        jj  = vert ? yy : x;
        pos = (14'(jj) + 14'sd1) * 14'(ang);
        k   = 11'(vert ? x : yy) + 11'(pos >>> 5) + 11'sd1;
        f   = pos[4:0];
        // main reference r[k]: k >= 0 from the own side, k < 0 projected
        if (k >= 0) ra = vert ? pick(top, k) : pick(left, k);
        else begin
          proj = 11'((24'(k) * 24'(inv) + 24'sd128) >>> 8);
          ra   = vert ? pick(left, proj) : pick(top, proj);
        end
        if (k + 1 >= 0) rb = vert ? pick(top, k + 11'sd1) : pick(left, k + 11'sd1);
        else begin
          proj = 11'((24'(k + 11'sd1) * 24'(inv) + 24'sd128) >>> 8);
          rb   = vert ? pick(left, proj) : pick(top, proj);
        end
        acc    = (22'd32 - 22'(f)) * 22'(ra) + 22'(f) * 22'(rb) + 22'd16;
        p_c[l] = PIX_W'(acc >> 5);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      pred       <= '0;
      residue    <= '0;
      lane_valid <= '0;
      sad        <= '0;
    end else begin
      logic [PIX_W+3-1:0] s;
      out_valid <= in_valid;
      if (in_valid) begin
        s = '0;
        for (int l = 0; l < LANES; l++) begin
          logic signed [PIX_W+1:0] d;
          d = $signed({2'b0, orig[l]}) - $signed({2'b0, p_c[l]});
          residue[l] <= (PIX_W+1)'(d);
          if (v_c[l]) s = s + (PIX_W+3)'(d < 0 ? -d : d);
        end
        pred       <= p_c;
        lane_valid <= v_c;
        sad        <= s;
      end
    end
  end
endmodule
