// intra_encoder_top: two-CTU pipelined HEVC intra encoder front with texture based
// CU/PU pre-selection.
//
// Stage 1 decides, from the source texture of a 64x64 CTU alone, which CU/PU
// candidates the RDO stage will try: 64x64 CUs are never tried; for each 32x32 CB
// either the 32x32 or the 16x16 CU mode is kept, and each 8x8 CU keeps either the 8x8
// or the 4x4 PU mode. Stage 2 then needs only one candidate per engine, so a
// large-block RDO engine (32x32/16x16) and a small-block RDO engine (8x8/4x4) can run
// in parallel and share a single reconfigurable predictor.
//
// What is here:
//   * stage 1: a 64x64 CTU buffer and a sequencer that feeds its four 32x32 CBs, in
//     z-order, to pre_mode_filter and collects the decisions into one directive;
//   * the stage 1 / stage 2 boundary: a directive register. Stage 1 goes on with the
//     next CTU while stage 2 holds the directive of the previous one; it stalls only
//     when a new directive is ready before the old one was taken;
//   * stage 2: pred_arbiter, intra_predictor and, behind the predictor, the SATD
//     rough mode decision of the small-block engine's 4x4 PUs (satd_rmd). The rest of
//     the two RDO engines and the reconstruction datapath are outside this module:
//     their prediction requests come in on the pred_* ports, the predictor's rows
//     go out on pred_*, and the rough decision's results on rmd_*.
//
// Interface:
//   ctu_row_valid/ready, ctu_row : 64 rows of 64 luma samples, top row first; qp is
//                                  sampled with the first row.
//   coef_*                       : model memory write port of the filter (idle only).
//   dir_valid/dir_ready          : directive of one CTU: dir_cu_split[b] for CB b
//                                  (1 = 16x16 CUs), dir_pu_split[b][n] for its 8x8 CU n
//                                  (1 = 4x4 PUs), both in z-order, and dir_qp.
//   pred_*                       : predictor requests of the two engines and its
//                                  output rows, tagged 0 (large) or 1 (small).
//   rmd_*                        : rough mode decision of the small engine's 4x4 PUs:
//                                  rmd_src is the PU's source row, given with the
//                                  engine's request; SATD per mode and the best mode
//                                  come out one cycle after the predictor's row 3.
// Timing: 64 load cycles, then 4 x (32 + 2049 + 1) cycles of filtering per CTU.
module intra_encoder_top
  import pmf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [5:0]         qp,

  input  logic               ctu_row_valid,
  output logic               ctu_row_ready,
  input  logic [PIX_W-1:0]   ctu_row [64],

  input  logic               coef_we,
  input  logic [1:0]         coef_level,
  input  logic               coef_sel_a,
  input  logic [MODEL_W+9:0] coef_addr,
  input  logic [COEF_W-1:0]  coef_data,

  output logic               dir_valid,
  input  logic               dir_ready,
  output logic [3:0]         dir_cu_split,
  output logic [15:0]        dir_pu_split [4],
  output logic [5:0]         dir_qp,

  input  logic [1:0]         pred_req,      // [0] large-block engine, [1] small-block engine
  output logic [1:0]         pred_gnt,
  input  logic [2:0]         pred_log2n     [2],
  input  logic [5:0]         pred_mode_base [2],
  input  logic [4:0]         pred_row       [2],
  input  logic [PIX_W-1:0]   pred_ref_top   [2][64],
  input  logic [PIX_W-1:0]   pred_ref_left  [2][64],
  input  logic [PIX_W-1:0]   pred_ref_corner[2],
  output logic               pred_out_valid,
  output logic [0:0]         pred_out_tag,
  output logic [PIX_W-1:0]   pred_out [128],
  output logic [31:0]        pred_lane_valid,

  input  logic [PIX_W-1:0]   rmd_src [4],   // small engine: source row of its 4x4 PU
  output logic               rmd_satd_valid,
  output logic [12:0]        rmd_satd [32],
  output logic               rmd_best_valid,
  output logic [5:0]         rmd_best_mode,
  output logic [12:0]        rmd_best_satd
);

  // ================================================================ stage 1
  typedef enum logic [2:0] {T_LOAD, T_FEED, T_WAIT, T_PUSH} tstate_e;
  tstate_e tstate;

  logic [PIX_W-1:0] ctu [64][64];
  logic [5:0]       load_row;
  logic [5:0]       qp_ctu;
  logic [1:0]       cb_idx;
  logic [4:0]       feed_row;
  logic [3:0]       work_cu;
  logic [15:0]      work_pu [4];

  logic             f_row_valid, f_row_ready, f_out_valid, f_out_ready, f_cu;
  logic [PIX_W-1:0] f_row [CB_N];
  logic [15:0]      f_pu;
  logic [RD_W-1:0]  f_rd_whole, f_rd_split;

  // CB b of the CTU sits at column (b & 1) * 32, row (b >> 1) * 32.
  always_comb begin
    for (int x = 0; x < CB_N; x++)
      f_row[x] = ctu[{cb_idx[1], feed_row}][{cb_idx[0], 5'(x)}];
  end

  assign f_row_valid   = (tstate == T_FEED);
  assign f_out_ready   = (tstate == T_WAIT);
  assign ctu_row_ready = (tstate == T_LOAD);

  pre_mode_filter u_filter (
    .clk(clk), .rst_n(rst_n), .qp(qp_ctu),
    .row_valid(f_row_valid), .row_ready(f_row_ready), .row_pix(f_row),
    .coef_we(coef_we), .coef_level(coef_level), .coef_sel_a(coef_sel_a),
    .coef_addr(coef_addr), .coef_data(coef_data),
    .out_valid(f_out_valid), .out_ready(f_out_ready), .cu_split(f_cu), .pu_split(f_pu),
    .rd_whole(f_rd_whole), .rd_split(f_rd_split)
  );

  logic unused_rd;
  assign unused_rd = ^{f_rd_whole, f_rd_split};

  always_ff @(posedge clk) begin
    if (tstate == T_LOAD && ctu_row_valid) ctu[load_row] <= ctu_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate       <= T_LOAD;
      load_row     <= '0;
      qp_ctu       <= '0;
      cb_idx       <= '0;
      feed_row     <= '0;
      work_cu      <= '0;
      work_pu      <= '{default: '0};
      dir_valid    <= 1'b0;
      dir_cu_split <= '0;
      dir_pu_split <= '{default: '0};
      dir_qp       <= '0;
    end else begin
      if (dir_valid && dir_ready) dir_valid <= 1'b0;
      case (tstate)
        T_LOAD: begin
          if (ctu_row_valid) begin
            if (load_row == 6'd0) qp_ctu <= qp;
            load_row <= load_row + 6'd1;
            if (load_row == 6'd63) begin
              tstate   <= T_FEED;
              cb_idx   <= '0;
              feed_row <= '0;
            end
          end
        end
        T_FEED: begin
          if (f_row_ready) begin
            feed_row <= feed_row + 5'd1;
            if (feed_row == 5'(CB_N - 1)) tstate <= T_WAIT;
          end
        end
        T_WAIT: begin
          if (f_out_valid) begin
            work_cu[cb_idx] <= f_cu;
            work_pu[cb_idx] <= f_pu;
            cb_idx          <= cb_idx + 2'd1;
            feed_row        <= '0;
            tstate          <= (cb_idx == 2'd3) ? T_PUSH : T_FEED;
          end
        end
        default: begin  // T_PUSH: hand the directive to stage 2
          if (!dir_valid || dir_ready) begin
            dir_valid    <= 1'b1;
            dir_cu_split <= work_cu;
            dir_pu_split <= work_pu;
            dir_qp       <= qp_ctu;
            tstate       <= T_LOAD;
            load_row     <= '0;
          end
        end
      endcase
    end
  end

  // A directive is not replaced before stage 2 has taken it.
  a_dir_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dir_valid && !dir_ready |=> dir_valid && $stable(dir_cu_split));

  // ================================================================ stage 2
  logic             p_valid;
  logic [2:0]       p_log2n;
  logic [5:0]       p_mode_base;
  logic [4:0]       p_row;
  logic [0:0]       p_tag;
  logic [PIX_W-1:0] p_ref_top  [64];
  logic [PIX_W-1:0] p_ref_left [64];
  logic [PIX_W-1:0] p_ref_corner;

  pred_arbiter u_arb (
    .clk(clk), .rst_n(rst_n), .req(pred_req), .gnt(pred_gnt),
    .log2n(pred_log2n), .mode_base(pred_mode_base), .row(pred_row),
    .ref_top(pred_ref_top), .ref_left(pred_ref_left), .ref_corner(pred_ref_corner),
    .p_valid(p_valid), .p_log2n(p_log2n), .p_mode_base(p_mode_base), .p_row(p_row),
    .p_tag(p_tag), .p_ref_top(p_ref_top), .p_ref_left(p_ref_left),
    .p_ref_corner(p_ref_corner)
  );

  intra_predictor u_pred (
    .clk(clk), .rst_n(rst_n), .in_valid(p_valid), .log2n(p_log2n),
    .mode_base(p_mode_base), .row(p_row), .tag(p_tag),
    .ref_top(p_ref_top), .ref_left(p_ref_left), .ref_corner(p_ref_corner),
    .out_valid(pred_out_valid), .out_tag(pred_out_tag), .pred(pred_out),
    .lane_valid(pred_lane_valid)
  );

  // The predictor answers one cycle after a grant; keep the request's size, modes,
  // row and (small engine only) source row for its answer.
  logic [2:0]       q_log2n;
  logic [5:0]       q_mode_base;
  logic [1:0]       q_row;
  logic [PIX_W-1:0] q_src [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_log2n     <= '0;
      q_mode_base <= '0;
      q_row       <= '0;
      q_src       <= '{default: '0};
    end else if (p_valid) begin
      q_log2n     <= p_log2n;
      q_mode_base <= p_mode_base;
      q_row       <= p_row[1:0];
      if (p_tag == 1'b1) q_src <= rmd_src;
    end
  end

  logic rmd_in_valid;
  assign rmd_in_valid = pred_out_valid && pred_out_tag == 1'b1 && q_log2n == 3'd2;

  satd_rmd u_rmd (
    .clk(clk), .rst_n(rst_n), .in_valid(rmd_in_valid), .mode_base(q_mode_base),
    .row(q_row), .pred(pred_out), .lane_valid(pred_lane_valid), .src(q_src),
    .satd_valid(rmd_satd_valid), .satd(rmd_satd), .best_valid(rmd_best_valid),
    .best_mode(rmd_best_mode), .best_satd(rmd_best_satd)
  );

endmodule
