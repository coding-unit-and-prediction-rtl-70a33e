// intra_predictor: reconfigurable HEVC luma intra predictor.
//
// One predictor serves both RDO engines. Per cycle it produces one row of N
// prediction samples for L consecutive intra modes at once, with L * N = 128:
// 32 modes of a 4x4 block, 16 of an 8x8, 8 of a 16x16 or 4 of a 32x32. Output slot
// s = lane * N + x holds mode (mode_base + lane), column x, of row `row`.
//
// How it works. The neighbouring reconstructed samples (2N above, 2N left and the
// corner) come in unfiltered; a [1 2 1] smoothed copy is made alongside. Each lane
// picks the smoothed copy when the HEVC rule asks for it (N > 4, not DC, and the
// mode farther from pure horizontal/vertical than 7, 1 or 0 steps for N = 8, 16, 32).
// Each output sample is then
//   * planar (mode 0): the bilinear blend of left, top, top-right and bottom-left;
//   * DC (mode 1): the mean of the N top and N left samples;
//   * angular (2..34): the two-tap 1/32-sample interpolation along the mode's
//     displacement, with samples of the other side projected through the inverse
//     angle when the displacement is negative;
// followed, for N < 32, by the HEVC edge filters of DC and of modes 10 and 26.
// The method only names this unit and its throughput; the prediction itself follows
// the HEVC standard. Strong (bi-linear) smoothing of 32x32 references is not done,
// which is this design's choice, as is the single output register.
//
// Interface: in_valid with log2n (2..5), mode_base (0..34), row (0..N-1) and the
// reference samples; one cycle later out_valid with pred, lane_valid (the lane
// exists at this size and its mode is at most 34), and the request's tag.
module intra_predictor
  import pmf_pkg::*;
#(
  parameter int unsigned SLOTS = 128,    // samples per cycle, L * N
  parameter int unsigned MAX_N = 32,
  parameter int unsigned TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [2:0]           log2n,
  input  logic [5:0]           mode_base,
  input  logic [4:0]           row,
  input  logic [TAG_W-1:0]     tag,
  input  logic [PIX_W-1:0]     ref_top  [2*MAX_N],   // p[x][-1], x = 0..2N-1
  input  logic [PIX_W-1:0]     ref_left [2*MAX_N],   // p[-1][y], y = 0..2N-1
  input  logic [PIX_W-1:0]     ref_corner,           // p[-1][-1]
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic [PIX_W-1:0]     pred [SLOTS],
  output logic [SLOTS/4-1:0]   lane_valid
);

  localparam int R = 2 * MAX_N;

  // Displacement per row/column of modes 2..34, index = mode - 2.
  localparam int ANG [33] = '{32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26,
                              -32, -26, -21, -17, -13, -9, -5, -2, 0, 2, 5, 9, 13, 17, 21, 26, 32};

  function automatic int inv_angle(int a);
    case (a)
      -2:      return -4096;
      -5:      return -1638;
      -9:      return -910;
      -13:     return -630;
      -17:     return -482;
      -21:     return -390;
      -26:     return -315;
      default: return -256;
    endcase
  endfunction

  function automatic int clip8(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  logic signed [31:0] n;
  logic signed [31:0] ut [R], ul [R], uc;      // unfiltered
  logic signed [31:0] ft [R], fl [R], fc;      // smoothed
  logic signed [31:0] dc_val;
  logic signed [31:0] nxt [SLOTS];

  // Reference sample i of the top (left = 0) or left (left = 1) side, smoothed or not.
  function automatic int side_at(bit left, bit filt, int i);
    logic [$clog2(R)-1:0] j;
    j = (i < R) ? i[$clog2(R)-1:0] : $clog2(R)'(R - 1);
    if (left) return filt ? fl[j] : ul[j];
    return filt ? ft[j] : ut[j];
  endfunction

  // Reference k along the main side (k > 0: main[k-1], 0: corner, k < 0: projected
  // from the other side through the inverse angle). The main side is the top for
  // vertical modes and the left for horizontal ones.
  function automatic int ref_at(int k, int a, bit vert, bit filt);
    if (k > 0) return side_at(!vert, filt, k - 1);
    if (k == 0) return filt ? fc : uc;
    return side_at(vert, filt, ((k * inv_angle(a) + 128) >>> 8) - 1);
  endfunction

  always_comb begin
    automatic int sum, lane, x, y, mode, a, pos, idx, fr, r1, r2, hvd, thr, v;
    automatic bit use_f;
    for (int s = 0; s < SLOTS; s++) nxt[s] = 0;
    n = 1 << log2n;
    y = int'(row);
    for (int i = 0; i < R; i++) begin
      ut[i] = int'(ref_top[i]);
      ul[i] = int'(ref_left[i]);
    end
    uc = int'(ref_corner);
    fc = (ul[0] + 2 * uc + ut[0] + 2) >>> 2;
    for (int i = 0; i < R; i++) begin
      if (i >= 2 * n - 1) begin
        ft[i] = ut[i];
        fl[i] = ul[i];
      end else begin
        ft[i] = ((i == 0 ? uc : ut[i-1]) + 2 * ut[i] + ut[i+1] + 2) >>> 2;
        fl[i] = ((i == 0 ? uc : ul[i-1]) + 2 * ul[i] + ul[i+1] + 2) >>> 2;
      end
    end
    sum = 0;
    for (int i = 0; i < MAX_N; i++)
      if (i < n) sum += ut[i] + ul[i];
    dc_val = (sum + n) >>> (log2n + 1);

    for (int s = 0; s < SLOTS; s++) begin
      a = 0; pos = 0; idx = 0; fr = 0; r1 = 0; r2 = 0;
      lane = s >> log2n;
      x    = s & (n - 1);
      mode = int'(mode_base) + lane;
      if (mode > 34) mode = 34;
      hvd = (mode > 26 ? mode - 26 : 26 - mode);
      if ((mode > 10 ? mode - 10 : 10 - mode) < hvd) hvd = (mode > 10 ? mode - 10 : 10 - mode);
      thr   = (n == 8) ? 7 : (n == 16) ? 1 : 0;
      use_f = (n != 4) && (mode != 1) && (hvd > thr);
      if (mode == 0) begin
        v = ((n - 1 - x) * side_at(1'b1, use_f, y) + (x + 1) * side_at(1'b0, use_f, n)
             + (n - 1 - y) * side_at(1'b0, use_f, x) + (y + 1) * side_at(1'b1, use_f, n) + n)
            >>> (log2n + 1);
      end else if (mode == 1) begin
        v = dc_val;
        if (n < 32) begin
          if (x == 0 && y == 0) v = (ul[0] + 2 * dc_val + ut[0] + 2) >>> 2;
          else if (y == 0)      v = (ut[x] + 3 * dc_val + 2) >>> 2;
          else if (x == 0)      v = (ul[y] + 3 * dc_val + 2) >>> 2;
        end
      end else if (mode >= 18) begin
        a   = ANG[mode - 2];
        pos = (y + 1) * a;
        idx = pos >>> 5;
        fr  = pos & 31;
        r1  = ref_at(x + idx + 1, a, 1'b1, use_f);
        r2  = ref_at(x + idx + 2, a, 1'b1, use_f);
        v   = ((32 - fr) * r1 + fr * r2 + 16) >>> 5;
        if (mode == 26 && x == 0 && n < 32) v = clip8(ut[0] + ((ul[y] - uc) >>> 1));
      end else begin
        a   = ANG[mode - 2];
        pos = (x + 1) * a;
        idx = pos >>> 5;
        fr  = pos & 31;
        r1  = ref_at(y + idx + 1, a, 1'b0, use_f);
        r2  = ref_at(y + idx + 2, a, 1'b0, use_f);
        v   = ((32 - fr) * r1 + fr * r2 + 16) >>> 5;
        if (mode == 10 && y == 0 && n < 32) v = clip8(ul[0] + ((ut[x] - uc) >>> 1));
      end
      nxt[s] = v;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_tag    <= '0;
      lane_valid <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= tag;
        for (int i = 0; i < SLOTS / 4; i++)
          lane_valid[i] <= (i < (SLOTS >> log2n)) && (int'(mode_base) + i <= 34);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int s = 0; s < SLOTS; s++) pred[s] <= PIX_W'(nxt[s]);
  end

endmodule
