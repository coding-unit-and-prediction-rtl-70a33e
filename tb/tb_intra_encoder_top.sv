// tb_intra_encoder_top: end-to-end run of the encoder front at its default sizes.
//
// Fills the model memories, then streams four 64x64 CTUs of mixed texture. Each
// CTU's directive (CU mode per 32x32 CB, PU mode per 8x8 CU) is compared with the
// reference model run on the four CBs, and the time from the last CTU row to the
// directive is checked (4 x 2082 + 1 cycles). The directive of CTU 0 is held back
// long enough that stage 1 finishes CTU 1 and has to stall. Throughout, two
// simulated RDO engines ask for predictions with flat reference samples of
// different values; every returned sample must equal its engine's value, and the
// tags must match the grants. The small engine also sends a random source row with
// each request; every SATD and best mode of the rough decision of its 4x4 requests
// is checked against a reference Hadamard product. Counted mechanisms, each of which
// must occur: 32x32 and 16x16 CU choices, 8x8 and 4x4 PU choices, a directive stall,
// contested and uncontested predictor grants for both engines, and rough decisions
// with a reported best mode.
module tb_intra_encoder_top;
  import pmf_pkg::*;
  import pmf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] qp, dir_qp;
  logic ctu_row_valid, ctu_row_ready;
  logic [7:0] ctu_row [64];
  logic coef_we, coef_sel_a;
  logic [1:0] coef_level;
  logic [15:0] coef_addr, coef_data;
  logic dir_valid, dir_ready;
  logic [3:0] dir_cu_split;
  logic [15:0] dir_pu_split [4];
  logic [1:0] pred_req, pred_gnt;
  logic [2:0] pred_log2n [2];
  logic [5:0] pred_mode_base [2];
  logic [4:0] pred_row [2];
  logic [7:0] pred_ref_top [2][64], pred_ref_left [2][64], pred_ref_corner [2];
  logic pred_out_valid;
  logic [0:0] pred_out_tag;
  logic [7:0] pred_out [128];
  logic [31:0] pred_lane_valid;
  logic [7:0] rmd_src [4];
  logic rmd_satd_valid, rmd_best_valid;
  logic [12:0] rmd_satd [32], rmd_best_satd;
  logic [5:0] rmd_best_mode;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_cu32 = 0, n_cu16 = 0, n_pu8 = 0, n_pu4 = 0, n_stall = 0;
  int n_contested = 0, n_lone = 0, n_gnt [2], n_rows [2];
  int n_rmd = 0, n_rmd_best = 0;
  bit engines_on = 0;

  intra_encoder_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 300000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ------------------------------------------------------------ simulated RDO engines
  localparam int FLAT [2] = '{77, 150};
  logic [0:0] exp_tag_q;
  logic       exp_valid_q;
  logic [2:0] pred_log2n_q [2];

  // Reference of the rough mode decision. The small engine's predictions are flat,
  // so every mode of a 4x4 PU has the SATD of (FLAT[1] - source); the best mode of a
  // pass is its lowest valid one. src_q mirrors the source rows the unit has seen.
  int  src_q [4][4];
  bit  src_known [4];
  bit  rmd_exp_valid, rmd_exp_check, rmd_exp_best;
  int  rmd_exp_satd, rmd_exp_bmode, rmd_exp_bsatd, rmd_exp_lanes;
  bit  d_exp_valid, d_exp_check, d_exp_best;
  int  d_exp_satd, d_exp_bmode, d_exp_bsatd, d_exp_lanes;
  int  run_satd, run_mode;
  bit  run_any = 0, run_ok = 0, rmd_exp_bok = 0, d_exp_bok = 0;

  localparam int H [4][4] = '{'{1, 1, 1, 1}, '{1, -1, 1, -1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}};

  function automatic int flat_satd();
    int t [4][4], c, sum;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += H[i][k] * (FLAT[1] - src_q[k][j]);
      end
    sum = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        c = 0;
        for (int k = 0; k < 4; k++) c += t[i][k] * H[j][k];
        sum += c < 0 ? -c : c;
      end
    return (sum + 1) >> 1;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      // check what was granted on the last edge
      checks++;
      if (pred_out_valid != exp_valid_q || (exp_valid_q && pred_out_tag != exp_tag_q)) begin
        failures++; $display("predictor output/tag mismatch");
      end
      if (pred_out_valid) begin
        n_rows[pred_out_tag]++;
        for (int s = 0; s < 128; s++) begin
          int lane;
          lane = s >> pred_log2n_q[pred_out_tag];
          if (pred_lane_valid[lane]) begin
            checks++;
            if (int'(pred_out[s]) != FLAT[pred_out_tag]) begin
              failures++; $display("engine %0d sample %0d = %0d", pred_out_tag, s, pred_out[s]);
            end
          end
        end
      end
      checks++;
      if (rmd_satd_valid != d_exp_valid || (d_exp_valid && rmd_best_valid != d_exp_best)) begin
        failures++; $display("rough decision valid flags wrong");
      end
      if (d_exp_valid && d_exp_check) begin
        n_rmd++;
        for (int m = 0; m < d_exp_lanes; m++) begin
          checks++;
          if (int'(rmd_satd[m]) != d_exp_satd) begin
            failures++; $display("rmd satd[%0d] = %0d, expected %0d", m, rmd_satd[m], d_exp_satd);
          end
        end
        if (d_exp_best && d_exp_bok) begin
          n_rmd_best++;
          checks++;
          if (int'(rmd_best_mode) != d_exp_bmode || int'(rmd_best_satd) != d_exp_bsatd) begin
            failures++;
            $display("rmd best %0d/%0d, expected %0d/%0d", rmd_best_mode, rmd_best_satd,
                     d_exp_bmode, d_exp_bsatd);
          end
        end
      end
      // the unit answers two cycles after a request: one in the predictor, one in it
      d_exp_valid = rmd_exp_valid; d_exp_check = rmd_exp_check; d_exp_best = rmd_exp_best;
      d_exp_satd = rmd_exp_satd; d_exp_bmode = rmd_exp_bmode; d_exp_bsatd = rmd_exp_bsatd;
      d_exp_lanes = rmd_exp_lanes; d_exp_bok = rmd_exp_bok;
      // new requests
      pred_req = engines_on ? 2'($urandom) : 2'b00;
      // a hash of the cycle count, so the CTU generator's random stream is not disturbed
      for (int x = 0; x < 4; x++) rmd_src[x] = 8'((cycles * 2654435761 + x * 40503) >> 13);
      for (int e = 0; e < 2; e++) begin
        pred_log2n[e] = 3'($urandom_range(2, 5));
        pred_mode_base[e] = 6'($urandom_range(0, 34));
        pred_row[e] = 5'($urandom_range(0, (1 << pred_log2n[e]) - 1));
      end
      #1;
      exp_valid_q = |pred_req;
      exp_tag_q = pred_gnt[1];
      if (pred_req == 2'b11) n_contested++;
      else if (pred_req != 0) n_lone++;
      if (pred_gnt[0]) n_gnt[0]++;
      if (pred_gnt[1]) n_gnt[1]++;
      if (|pred_req) pred_log2n_q[pred_gnt[1]] = pred_log2n[pred_gnt[1]];
      rmd_exp_valid = 0;
      if (pred_gnt[1] && pred_log2n[1] == 3'd2) begin
        int r, mb;
        r  = int'(pred_row[1]);
        mb = int'(pred_mode_base[1]);
        for (int x = 0; x < 4; x++) src_q[r][x] = int'(rmd_src[x]);
        src_known[r] = 1;
        if (r == 3) begin
          bit keep;
          rmd_exp_valid = 1;
          rmd_exp_check = src_known[0] && src_known[1] && src_known[2];
          rmd_exp_satd  = flat_satd();
          rmd_exp_lanes = (35 - mb < 32) ? 35 - mb : 32;
          keep = run_any && mb != 0 && run_satd <= rmd_exp_satd;
          if (!keep) begin run_satd = rmd_exp_satd; run_mode = mb; end
          // a PU started before all source rows were known is not checked
          run_ok = (mb == 0) ? rmd_exp_check : run_ok && rmd_exp_check;
          run_any = 1;
          rmd_exp_best  = (mb + 32 > 34);
          rmd_exp_bok   = run_ok;
          rmd_exp_bmode = run_mode;
          rmd_exp_bsatd = run_satd;
        end
      end
    end
  end

  // ------------------------------------------------------------ CTU generation
  int ctu_pix [64][64];
  int ctus [4][64][64];

  task automatic make_ctu(int seed);
    real ang;
    int v, kind;
    for (int b = 0; b < 4; b++) begin
      kind = (seed * 4 + b) % 6;
      ang = $urandom_range(0, 359) * 3.14159265 / 180.0;
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          case (kind)
            0: v = 120 + $urandom_range(0, 2);
            1: v = $urandom_range(0, 255);
            2: v = 128 + $rtoi(100.0 * $sin((x * $cos(ang) + y * $sin(ang)) / 3.0));
            3: v = ((x * $cos(ang) + y * $sin(ang)) > 16.0) ? 220 : 30;
            4: v = (((x >> 1) ^ (y >> 1)) & 1) ? 200 : 60;
            default: v = (x < 16 && y < 16) ? 128 : (x >= 16 && y < 16) ? $urandom_range(0, 255)
                         : (y >= 16 && x < 16) ? (((x + y) & 4) ? 250 : 10) : 90 + (x >> 2);
          endcase
          ctu_pix[(b >> 1) * 32 + y][(b & 1) * 32 + x] = clampi(v, 0, 255);
        end
    end
  endtask

  task automatic check_directive(int q);
    int cbp [32][32];
    longint unsigned rd32, rds;
    bit cu;
    bit [15:0] pu;
    checks++;
    if (dir_qp != 6'(q)) begin failures++; $display("dir_qp"); end
    for (int b = 0; b < 4; b++) begin
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) cbp[y][x] = ctu_pix[(b >> 1) * 32 + y][(b & 1) * 32 + x];
      ref_cb_decide(cbp, q, rd32, rds, cu, pu);
      checks += 2;
      if (dir_cu_split[b] != cu) begin failures++; $display("CB %0d cu_split mismatch", b); end
      if (dir_pu_split[b] != pu) begin
        failures++; $display("CB %0d pu_split %b expected %b", b, dir_pu_split[b], pu);
      end
      if (cu) n_cu16++; else n_cu32++;
      for (int z = 0; z < 16; z++) if (pu[z]) n_pu4++; else n_pu8++;
    end
  endtask

  task automatic send_ctu(int q);
    qp = 6'(q);
    for (int y = 0; y < 64; y++) begin
      ctu_row_valid = 1;
      for (int x = 0; x < 64; x++) ctu_row[x] = 8'(ctu_pix[y][x]);
      while (!ctu_row_ready) @(negedge clk);
      @(negedge clk);
    end
    ctu_row_valid = 0;
  endtask

  always @(posedge clk) if (dut.tstate == 3'd3 && dir_valid && !dir_ready) n_stall++;

  initial begin
    int qps [4] = '{22, 27, 32, 37};
    longint t0;
    ctu_row_valid = 0; dir_ready = 0; coef_we = 0; coef_level = 0; coef_sel_a = 0;
    coef_addr = 0; coef_data = 0; qp = 0; pred_req = 0; exp_valid_q = 0; exp_tag_q = 0;
    for (int x = 0; x < 64; x++) ctu_row[x] = 0;
    rmd_exp_valid = 0; rmd_exp_check = 0; rmd_exp_best = 0; d_exp_valid = 0;
    for (int x = 0; x < 4; x++) begin rmd_src[x] = 0; src_known[x] = 0; end
    for (int e = 0; e < 2; e++) begin
      pred_log2n[e] = 2; pred_mode_base[e] = 0; pred_row[e] = 0; pred_log2n_q[e] = 2;
      pred_ref_corner[e] = 8'(FLAT[e]);
      for (int i = 0; i < 64; i++) begin
        pred_ref_top[e][i] = 8'(FLAT[e]);
        pred_ref_left[e][i] = 8'(FLAT[e]);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // model parameters
    for (int l = 0; l < 4; l++) begin
      int n2;
      n2 = 16 << (2 * l);
      for (int m = 0; m < NUM_MODELS; m++) begin
        for (int k = 0; k < n2; k++) begin
          coef_we = 1; coef_level = 2'(l); coef_sel_a = 0;
          coef_addr = 16'(m * n2 + k); coef_data = 16'(ref_coef_b(l, m, k));
          @(negedge clk);
        end
        coef_we = 1; coef_level = 2'(l); coef_sel_a = 1;
        coef_addr = 16'(m); coef_data = 16'(ref_coef_a(l, m));
        @(negedge clk);
      end
    end
    coef_we = 0;
    engines_on = 1;

    for (int c = 0; c < 4; c++) begin
      make_ctu(c);
      ctus[c] = ctu_pix;
    end
    // CTU 0, whose directive is held back; CTU 1 runs meanwhile and must stall.
    ctu_pix = ctus[0];
    send_ctu(qps[0]);
    t0 = cycles;
    while (!dir_valid) @(negedge clk);
    checks++;
    if (cycles - t0 != 4 * 2082 + 1) begin
      failures++; $display("CTU latency %0d, expected %0d", cycles - t0, 4 * 2082 + 1);
    end
    ctu_pix = ctus[1];
    send_ctu(qps[1]);
    repeat (9000) @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      if (c >= 2) begin
        ctu_pix = ctus[c];
        send_ctu(qps[c]);
      end
      while (!dir_valid) @(negedge clk);
      ctu_pix = ctus[c];
      check_directive(qps[c]);
      dir_ready = 1;
      @(negedge clk);
      dir_ready = 0;
    end
    engines_on = 0;
    repeat (3) @(negedge clk);

    $display("cu32=%0d cu16=%0d pu8=%0d pu4=%0d stall_cycles=%0d contested=%0d lone=%0d gnt=%0d/%0d rows=%0d/%0d rmd=%0d/%0d",
             n_cu32, n_cu16, n_pu8, n_pu4, n_stall, n_contested, n_lone, n_gnt[0], n_gnt[1],
             n_rows[0], n_rows[1], n_rmd, n_rmd_best);
    checks += 9;
    if (n_rmd == 0 || n_rmd_best == 0) begin failures++; $display("no rough mode decision"); end
    if (n_cu32 == 0) begin failures++; $display("32x32 CU never chosen"); end
    if (n_cu16 == 0) begin failures++; $display("16x16 CU never chosen"); end
    if (n_pu8 == 0) begin failures++; $display("8x8 PU never chosen"); end
    if (n_pu4 == 0) begin failures++; $display("4x4 PU never chosen"); end
    if (n_stall == 0) begin failures++; $display("no directive stall"); end
    if (n_contested == 0) begin failures++; $display("no contested grant"); end
    if (n_lone == 0) begin failures++; $display("no lone grant"); end
    if (n_gnt[0] == 0 || n_gnt[1] == 0) begin failures++; $display("an engine never served"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
