// satd_rmd: rough intra mode decision of a 4x4 PU by SATD, fed by the shared predictor.
//
// Before the full RD search, the small-block engine ranks the 35 intra modes of a
// 4x4 PU by a cheap cost, the SATD: the sum of absolute values of the 4x4 Hadamard
// transform of the prediction residual. This unit sits on the predictor's output.
// For a 4x4 block the predictor delivers one row of 32 modes per cycle (lane m holds
// mode mode_base + m), so a 4x4 PU takes two passes of four rows: modes 0..31 with
// mode_base = 0, then modes 32..34 with mode_base = 32.
//
// How it works. Each input row is subtracted from the source row of the PU and the
// 32 x 4 residuals are kept per row index. When row 3 arrives the unit transforms
// all 32 residual blocks at once (rows 0..2 from the store, row 3 straight from the
// input), giving SATD = (sum |H * D * H^T| + 1) >> 1 per lane, with H the 4x4
// Hadamard matrix in natural order. The lowest SATD among the valid lanes of the pass
// is compared with the best one kept from earlier passes of the same PU (a pass with
// mode_base = 0 starts a new PU); the pass that covers mode 34 ends the PU and
// reports the winning mode. Ties keep the lower mode number.
//
// Interface: in_valid, mode_base, row (0..3), pred (slot lane * 4 + x), lane_valid
// and src (the PU's source row `row`), all in one cycle. One cycle after a row 3:
// satd_valid with satd[m] of every lane, and, when that pass reached mode 34,
// best_valid with best_mode and best_satd of the PU.
//
// From the method: the Hadamard transform, the SATD and the selection stage of the
// rough decision, and the 32-mode 4x4 rows of the shared predictor. This design's
// choices: the (sum + 1) >> 1 scaling (the usual one for 4x4 SATD), no mode-bit
// term in the cost, a single surviving candidate, and the one-cycle timing. The full
// RD stages that would follow (transform, quantisation, rate model) are not here.
module satd_rmd
  import pmf_pkg::*;
#(
  parameter int unsigned LANES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [5:0]         mode_base,
  input  logic [1:0]         row,
  input  logic [PIX_W-1:0]   pred [LANES*4],
  input  logic [LANES-1:0]   lane_valid,
  input  logic [PIX_W-1:0]   src  [4],
  output logic               satd_valid,
  output logic [12:0]        satd [LANES],
  output logic               best_valid,
  output logic [5:0]         best_mode,
  output logic [12:0]        best_satd
);

  typedef logic signed [PIX_W:0] res_t;     // residual, -255..255

  res_t       res_q [3][LANES][4];            // rows 0..2 of every lane
  logic [12:0] satd_n [LANES];
  logic [12:0] pass_min;
  logic [5:0]  pass_mode;
  logic        pass_any;
  logic [12:0] run_satd;
  logic [5:0]  run_mode;
  logic        run_any;

  // 4-point Hadamard butterfly in natural order: rows of H are
  // (1 1 1 1), (1 -1 1 -1), (1 1 -1 -1), (1 -1 -1 1).
  function automatic void had4(input int a0, input int a1, input int a2, input int a3,
                               output int b0, output int b1, output int b2, output int b3);
    int s0, s1, d0, d1;
    s0 = a0 + a2; s1 = a1 + a3; d0 = a0 - a2; d1 = a1 - a3;
    b0 = s0 + s1; b1 = s0 - s1; b2 = d0 + d1; b3 = d0 - d1;
  endfunction

  always_comb begin
    automatic int d [4][4];
    automatic int t [4][4];
    automatic int c0, c1, c2, c3, sum;
    for (int m = 0; m < LANES; m++) begin
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 4; x++) d[y][x] = int'(res_q[y][m][x]);
      for (int x = 0; x < 4; x++) d[3][x] = int'(pred[m*4 + x]) - int'(src[x]);
      for (int y = 0; y < 4; y++)
        had4(d[y][0], d[y][1], d[y][2], d[y][3], t[y][0], t[y][1], t[y][2], t[y][3]);
      sum = 0;
      for (int x = 0; x < 4; x++) begin
        had4(t[0][x], t[1][x], t[2][x], t[3][x], c0, c1, c2, c3);
        sum += (c0 < 0 ? -c0 : c0) + (c1 < 0 ? -c1 : c1)
             + (c2 < 0 ? -c2 : c2) + (c3 < 0 ? -c3 : c3);
      end
      satd_n[m] = 13'((sum + 1) >>> 1);
    end
  end

  // Lowest SATD of this pass among the valid lanes; the first (lowest mode) wins a tie.
  always_comb begin
    pass_min  = '1;
    pass_mode = '0;
    pass_any  = 1'b0;
    for (int m = 0; m < LANES; m++) begin
      if (lane_valid[m] && (!pass_any || satd_n[m] < pass_min)) begin
        pass_min  = satd_n[m];
        pass_mode = mode_base + 6'(m);
        pass_any  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && row != 2'd3)
      for (int m = 0; m < LANES; m++)
        for (int x = 0; x < 4; x++)
          res_q[row][m][x] <= res_t'(int'(pred[m*4 + x]) - int'(src[x]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      satd_valid <= 1'b0;
      satd       <= '{default: '0};
      best_valid <= 1'b0;
      best_mode  <= '0;
      best_satd  <= '0;
      run_satd   <= '0;
      run_mode   <= '0;
      run_any    <= 1'b0;
    end else begin
      satd_valid <= in_valid && row == 2'd3;
      best_valid <= 1'b0;
      if (in_valid && row == 2'd3) begin
        automatic logic        keep_run;
        automatic logic [12:0] b_satd;
        automatic logic [5:0]  b_mode;
        automatic logic        b_any;
        satd     <= satd_n;
        keep_run = run_any && mode_base != 6'd0 && (!pass_any || run_satd <= pass_min);
        b_satd   = keep_run ? run_satd : pass_min;
        b_mode   = keep_run ? run_mode : pass_mode;
        b_any    = keep_run || pass_any;
        run_satd <= b_satd;
        run_mode <= b_mode;
        run_any  <= b_any;
        if (int'(mode_base) + LANES > 34) begin
          best_valid <= b_any;
          best_mode  <= b_mode;
          best_satd  <= b_satd;
        end
      end
    end
  end

endmodule
