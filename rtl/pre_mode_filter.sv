// pre_mode_filter: texture based CU/PU filter for one 32x32 coding block.
//
// Before the RDO stage runs, this unit looks only at the source pixels of a 32x32
// luma CB and decides
//   * cu_split: whether the large-block RDO engine should try the CB as one 32x32 CU
//     (0) or as four 16x16 CUs (1);
//   * pu_split[n]: whether the 8x8 CU n (z-order) should be tried with one 8x8 PU (0)
//     or with four 4x4 PUs (1).
// Both decisions compare the estimated cost of a block coded whole with the estimated
// cost of its four quarters plus 105/64 of side information (split_decision).
//
// How it works. The CB is loaded row by row into a pixel buffer, then scanned twice,
// one pixel per cycle, in z-order, so that every 4x4, 8x8, 16x16 and the 32x32 block
// ends on a known pixel index.
//   1. Analysis pass (1024 cycles). edge_unit gives each pixel's edge strength and
//      direction. Direction histograms and maximum strengths are accumulated for
//      the current 4x4 block; when a block ends, its histogram is classified
//      (hist_classifier) and folded into the enclosing larger block. The class of
//      every 4x4 (64), 8x8 (16), 16x16 (4) and the 32x32 block is stored.
//   2. Estimation pass (1024 cycles plus one). Edge strength is recomputed; for each
//      of the four block sizes the pixel's model is looked up by the class of the
//      block it lies in and its position k inside that block (model_coef_mem, one
//      per size, synchronous read), then rd_cost_est turns it into an R + D cost.
//      Per-size accumulators close at block ends and feed split_decision.
// One CB takes 32 load cycles + 1024 + 1025 cycles + 1 to raise out_valid.
//
// Pixels outside the CB are not used: the 3x3 window is clamped to the CB border.
// The method computes edges "on every pixel" without saying what happens at the
// border; clamping is this design's choice, as are the z-order single-pixel schedule,
// the two passes and the fixed-point formats of pmf_pkg.
//
// Interface:
//   row_valid/row_ready/row_pix : 32 rows of 32 pixels, top row first. Loading the
//                                 first row samples qp.
//   coef_*                      : write port of the four model memories; coef_level
//                                 selects N = 4 << coef_level, coef_sel_a the a table.
//                                 Write only while the unit is idle (row_ready high).
//   out_valid/out_ready         : results are held from out_valid until accepted.
//   rd_whole/rd_split           : 32x32 costs, Q.8, for observation.
module pre_mode_filter
  import pmf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [5:0]             qp,

  input  logic                   row_valid,
  output logic                   row_ready,
  input  logic [PIX_W-1:0]       row_pix [CB_N],

  input  logic                   coef_we,
  input  logic [1:0]             coef_level,
  input  logic                   coef_sel_a,
  input  logic [MODEL_W+9:0]     coef_addr,
  input  logic [COEF_W-1:0]      coef_data,

  output logic                   out_valid,
  input  logic                   out_ready,
  output logic                   cu_split,
  output logic [15:0]            pu_split,
  output logic [RD_W-1:0]        rd_whole,
  output logic [RD_W-1:0]        rd_split
);

  typedef enum logic [1:0] {S_LOAD, S_ANALYZE, S_ESTIMATE, S_DONE} state_e;
  state_e state;

  logic [PIX_W-1:0] cb [CB_N][CB_N];
  logic [4:0]       load_row;
  logic [5:0]       qp_q;
  logic [9:0]       t;          // z-order pixel index of the current pass
  logic             est_v;      // estimation pipeline stage B holds a pixel
  logic [9:0]       t_q;
  logic [ES_W-1:0]  es_q;

  // ---------------------------------------------------------------- pixel window
  logic [4:0] px, py;
  logic [PIX_W-1:0] win [3][3];
  logic signed [GRAD_W-1:0] eh, ev;
  logic [ES_W-1:0] es;
  logic [5:0] dir_bin;
  logic has_edge;

  // z-order: even index bits form x, odd bits form y.
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      px[i] = t[2*i];
      py[i] = t[2*i+1];
    end
  end

  always_comb begin
    int rr, cc;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        rr = int'(py) + r - 1;
        cc = int'(px) + c - 1;
        if (rr < 0) rr = 0;
        if (rr > CB_N - 1) rr = CB_N - 1;
        if (cc < 0) cc = 0;
        if (cc > CB_N - 1) cc = CB_N - 1;
        win[r][c] = cb[rr][cc];
      end
    end
  end

  edge_unit u_edge (
    .win(win), .eh(eh), .ev(ev), .es(es), .dir_bin(dir_bin), .has_edge(has_edge)
  );

  logic unused_grad;
  assign unused_grad = ^{eh, ev};

  // ---------------------------------------------------------------- analysis pass
  logic [HIST_W-1:0] hist  [NUM_LEVELS][NUM_BINS];
  logic [HIST_W-1:0] hist_n[NUM_LEVELS][NUM_BINS];
  logic [ES_W-1:0]   mx    [NUM_LEVELS];
  logic [ES_W-1:0]   mx_n  [NUM_LEVELS];
  logic              close [NUM_LEVELS];
  cb_class_t         cls_n [NUM_LEVELS];
  logic [5:0]        main_bin [NUM_LEVELS];

  cb_class_t class4  [64];
  cb_class_t class8  [16];
  cb_class_t class16 [4];
  cb_class_t class32;

  // Block ends of the pass-1 index t.
  always_comb begin
    close[0] = &t[3:0];
    close[1] = &t[5:0];
    close[2] = &t[7:0];
    close[3] = &t[9:0];
  end

  // Running histograms including the current pixel; a level's sum folds in the
  // finished sub-block on the cycle that sub-block ends.
  always_comb begin
    for (int b = 0; b < NUM_BINS; b++)
      hist_n[0][b] = hist[0][b] + HIST_W'(has_edge && (int'(dir_bin) == b));
    mx_n[0] = (es > mx[0]) ? es : mx[0];
    for (int l = 1; l < NUM_LEVELS; l++) begin
      for (int b = 0; b < NUM_BINS; b++)
        hist_n[l][b] = close[l-1] ? hist[l][b] + hist_n[l-1][b] : hist[l][b];
      mx_n[l] = (close[l-1] && mx_n[l-1] > mx[l]) ? mx_n[l-1] : mx[l];
    end
  end

  for (genvar l = 0; l < NUM_LEVELS; l++) begin : g_cls
    hist_classifier #(.LOG2N(l + 2)) u_cls (
      .hist(hist_n[l]), .max_es(mx_n[l]), .cls(cls_n[l]), .main_bin(main_bin[l])
    );
  end

  logic unused_main;
  assign unused_main = ^{main_bin[0], main_bin[1], main_bin[2], main_bin[3]};

  always_ff @(posedge clk) begin
    if (state == S_ANALYZE) begin
      for (int l = 0; l < NUM_LEVELS; l++) begin
        hist[l] <= close[l] ? '{default: '0} : hist_n[l];
        mx[l]   <= close[l] ? '0 : mx_n[l];
      end
      if (close[0]) class4[t[9:4]]  <= cls_n[0];
      if (close[1]) class8[t[9:6]]  <= cls_n[1];
      if (close[2]) class16[t[9:8]] <= cls_n[2];
      if (close[3]) class32         <= cls_n[3];
    end else if (state == S_LOAD) begin
      for (int l = 0; l < NUM_LEVELS; l++) begin
        hist[l] <= '{default: '0};
        mx[l]   <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- estimation pass
  logic [QS2_W-1:0] qs2;
  qs2_lut u_qs2 (.qp(qp_q), .qs2(qs2));

  logic [MODEL_W-1:0] model [NUM_LEVELS];
  always_comb begin
    model[0] = model_index(class4[t[9:4]]);
    model[1] = model_index(class8[t[9:6]]);
    model[2] = model_index(class16[t[9:8]]);
    model[3] = model_index(class32);
  end

  logic [COEF_W-1:0] b_q [NUM_LEVELS];
  logic [COEF_W-1:0] a_q [NUM_LEVELS];
  logic [RD_W-1:0]   cost [NUM_LEVELS];
  logic              est_v_last;  // every pixel of the pass has been issued
  logic              rd_en;
  assign rd_en = (state == S_ESTIMATE) && !est_v_last;

  for (genvar l = 0; l < NUM_LEVELS; l++) begin : g_lvl
    localparam int unsigned LOG2N = l + 2;
    logic [MODEL_W+2*LOG2N-1:0] b_addr;
    logic [MODEL_W+2*LOG2N-1:0] w_addr;
    logic [LOG2N-1:0] kx, ky;
    logic [PE_W-1:0] pe;
    logic [2:0] band;
    logic wd;

    assign kx     = px[LOG2N-1:0];
    assign ky     = py[LOG2N-1:0];
    assign b_addr = {model[l], ky, kx};
    assign w_addr = coef_addr[MODEL_W+2*LOG2N-1:0];

    model_coef_mem #(.LOG2N(LOG2N)) u_mem (
      .clk(clk),
      .we(coef_we && (coef_level == 2'(l)) && (state == S_LOAD)),
      .sel_a(coef_sel_a), .waddr(w_addr), .wdata(coef_data),
      .rd_en(rd_en), .rd_b_addr(b_addr), .rd_a_addr(model[l]),
      .b_q(b_q[l]), .a_q(a_q[l])
    );

    rd_cost_est #(.LEVEL(l)) u_est (
      .es(es_q), .a(a_q[l]), .b(b_q[l]), .qs2(qs2),
      .pe(pe), .band(band), .omega_d(wd), .cost(cost[l])
    );

    logic unused_est;
    assign unused_est = ^{pe, band, wd};
  end

  // Accumulators of stage B, indexed by the registered pixel index t_q.
  logic [RD_W-1:0] acc [NUM_LEVELS];
  logic [RD_W-1:0] blk [NUM_LEVELS];   // block total including this pixel
  logic [RD_W-1:0] sq8, sq32, sq8_n, sq32_n;
  logic            qclose [NUM_LEVELS];
  logic [RD_W-1:0] rd8_split, rd32_split;
  logic            split8, split32;

  always_comb begin
    qclose[0] = &t_q[3:0];
    qclose[1] = &t_q[5:0];
    qclose[2] = &t_q[7:0];
    qclose[3] = &t_q[9:0];
    for (int l = 0; l < NUM_LEVELS; l++) blk[l] = acc[l] + cost[l];
    sq8_n  = qclose[0] ? sq8 + blk[0] : sq8;
    sq32_n = qclose[2] ? sq32 + blk[2] : sq32;
  end

  split_decision u_split8 (
    .rd_whole(blk[1]), .rd_quarters(sq8_n), .rd_split(rd8_split), .split(split8)
  );
  split_decision u_split32 (
    .rd_whole(blk[3]), .rd_quarters(sq32_n), .rd_split(rd32_split), .split(split32)
  );

  logic unused_split8;
  assign unused_split8 = ^rd8_split;

  // ---------------------------------------------------------------- control
  assign row_ready = (state == S_LOAD);
  assign out_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      load_row   <= '0;
      qp_q       <= '0;
      t          <= '0;
      est_v      <= 1'b0;
      est_v_last <= 1'b0;
      t_q        <= '0;
      es_q       <= '0;
      for (int l = 0; l < NUM_LEVELS; l++) acc[l] <= '0;
      sq8        <= '0;
      sq32       <= '0;
      cu_split   <= 1'b0;
      pu_split   <= '0;
      rd_whole   <= '0;
      rd_split   <= '0;
    end else begin
      case (state)
        S_LOAD: begin
          if (row_valid) begin
            if (load_row == 5'd0) qp_q <= qp;
            load_row <= load_row + 5'd1;
            if (load_row == 5'(CB_N - 1)) begin
              state <= S_ANALYZE;
              t     <= '0;
            end
          end
        end
        S_ANALYZE: begin
          t <= t + 10'd1;
          if (close[3]) begin
            state      <= S_ESTIMATE;
            est_v      <= 1'b0;
            est_v_last <= 1'b0;
            for (int l = 0; l < NUM_LEVELS; l++) acc[l] <= '0;
            sq8        <= '0;
            sq32       <= '0;
          end
        end
        S_ESTIMATE: begin
          // stage A: issue pixel t
          est_v <= !est_v_last;
          t_q   <= t;
          es_q  <= es;
          if (!est_v_last) begin
            t <= t + 10'd1;
            if (&t) est_v_last <= 1'b1;
          end
          // stage B: accumulate pixel t_q
          if (est_v) begin
            for (int l = 0; l < NUM_LEVELS; l++) acc[l] <= qclose[l] ? '0 : blk[l];
            sq8  <= qclose[1] ? '0 : sq8_n;
            sq32 <= qclose[3] ? '0 : sq32_n;
            if (qclose[1]) pu_split[t_q[9:6]] <= split8;
            if (qclose[3]) begin
              cu_split <= split32;
              rd_whole <= blk[3];
              rd_split <= rd32_split;
              state    <= S_DONE;
            end
          end
        end
        default: begin  // S_DONE
          if (out_ready) begin
            state    <= S_LOAD;
            load_row <= '0;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && row_valid) cb[load_row] <= row_pix;
  end

  // Model memories may only be rewritten while the unit is idle.
  property p_coef_idle;
    @(posedge clk) disable iff (!rst_n) coef_we |-> state == S_LOAD;
  endproperty
  a_coef_idle: assert property (p_coef_idle);

  // Results stay stable until accepted.
  property p_out_stable;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(cu_split) && $stable(pu_split);
  endproperty
  a_out_stable: assert property (p_out_stable);

endmodule
