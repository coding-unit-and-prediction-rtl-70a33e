// tb_intra_predictor: checks every sample the predictor produces against an HEVC
// intra prediction written the way the standard states it (reference array with
// projected negative part, filtering decision, per-block sample loops).
// All four sizes, every mode group (L = 128/N modes per request) and every row are
// run with random and with smooth reference samples; the output must appear one
// cycle after the request, one request per cycle.
module tb_intra_predictor;
  import pmf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [2:0] log2n;
  logic [5:0] mode_base;
  logic [4:0] row;
  logic [0:0] tag, out_tag;
  logic [7:0] ref_top [64], ref_left [64], ref_corner;
  logic [7:0] pred [128];
  logic [31:0] lane_valid;
  int checks = 0, failures = 0, cycles = 0;

  intra_predictor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int ang [35];
  int exp_blk [35][32][32];   // [mode][y][x]

  function automatic int inv_ang(int a);
    case (a)
      -2: return -4096; -5: return -1638; -9: return -910; -13: return -630;
      -17: return -482; -21: return -390; -26: return -315; default: return -256;
    endcase
  endfunction

  // Full-block HEVC prediction of every mode for the current references.
  task automatic predict_all(int n, int l2);
    int p_top [64], p_left [64], p_c;
    int f_top [64], f_left [64], f_c;
    int t [64], l [64], c, refa [-40:80];
    int dcv, s, iidx, ifact, a, thr, md, fl;
    p_c = ref_corner;
    for (int i = 0; i < 2 * n; i++) begin p_top[i] = ref_top[i]; p_left[i] = ref_left[i]; end
    f_c = (p_left[0] + 2 * p_c + p_top[0] + 2) >> 2;
    for (int i = 0; i < 2 * n - 1; i++) begin
      f_top[i]  = ((i == 0 ? p_c : p_top[i-1]) + 2 * p_top[i] + p_top[i+1] + 2) >> 2;
      f_left[i] = ((i == 0 ? p_c : p_left[i-1]) + 2 * p_left[i] + p_left[i+1] + 2) >> 2;
    end
    f_top[2*n-1] = p_top[2*n-1];
    f_left[2*n-1] = p_left[2*n-1];
    thr = (n == 8) ? 7 : (n == 16) ? 1 : 0;
    s = 0;
    for (int i = 0; i < n; i++) s += p_top[i] + p_left[i];
    dcv = (s + n) >> (l2 + 1);
    for (int m = 0; m < 35; m++) begin
      md = (m - 26 < 0 ? 26 - m : m - 26);
      if ((m - 10 < 0 ? 10 - m : m - 10) < md) md = (m - 10 < 0 ? 10 - m : m - 10);
      fl = (m != 1 && n != 4 && md > thr);
      for (int i = 0; i < 2 * n; i++) begin
        t[i] = fl ? f_top[i] : p_top[i];
        l[i] = fl ? f_left[i] : p_left[i];
      end
      c = fl ? f_c : p_c;
      if (m == 0) begin
        for (int y = 0; y < n; y++)
          for (int x = 0; x < n; x++)
            exp_blk[m][y][x] = ((n - 1 - x) * l[y] + (x + 1) * t[n] + (n - 1 - y) * t[x]
                                + (y + 1) * l[n] + n) >> (l2 + 1);
      end else if (m == 1) begin
        for (int y = 0; y < n; y++)
          for (int x = 0; x < n; x++) exp_blk[m][y][x] = dcv;
        if (n < 32) begin
          exp_blk[m][0][0] = (p_left[0] + 2 * dcv + p_top[0] + 2) >> 2;
          for (int x = 1; x < n; x++) exp_blk[m][0][x] = (p_top[x] + 3 * dcv + 2) >> 2;
          for (int y = 1; y < n; y++) exp_blk[m][y][0] = (p_left[y] + 3 * dcv + 2) >> 2;
        end
      end else begin
        bit vert;
        int mainv [64], sidev [64];
        vert = (m >= 18);
        a = ang[m];
        for (int i = 0; i < 2 * n; i++) begin
          mainv[i] = vert ? t[i] : l[i];
          sidev[i] = vert ? l[i] : t[i];
        end
        refa[0] = c;
        for (int x = 1; x <= n; x++) refa[x] = mainv[x-1];
        if (a < 0) begin
          if (((n * a) >>> 5) < -1)
            for (int x = (n * a) >>> 5; x <= -1; x++)
              refa[x] = sidev[-1 + ((x * inv_ang(a) + 128) >>> 8)];
        end else begin
          for (int x = n + 1; x <= 2 * n; x++) refa[x] = mainv[x-1];
        end
        for (int y = 0; y < n; y++)
          for (int x = 0; x < n; x++) begin
            int u, v, val;
            u = vert ? x : y;   // position along the reference
            v = vert ? y : x;   // distance from it
            iidx  = ((v + 1) * a) >>> 5;
            ifact = ((v + 1) * a) & 31;
            if (ifact != 0)
              val = ((32 - ifact) * refa[u + iidx + 1] + ifact * refa[u + iidx + 2] + 16) >> 5;
            else
              val = refa[u + iidx + 1];
            exp_blk[m][y][x] = val;
          end
        if (m == 26 && n < 32)
          for (int y = 0; y < n; y++) begin
            int v;
            v = p_top[0] + ((p_left[y] - p_c) >>> 1);
            exp_blk[m][y][0] = v < 0 ? 0 : (v > 255 ? 255 : v);
          end
        if (m == 10 && n < 32)
          for (int x = 0; x < n; x++) begin
            int v;
            v = p_left[0] + ((p_top[x] - p_c) >>> 1);
            exp_blk[m][0][x] = v < 0 ? 0 : (v > 255 ? 255 : v);
          end
      end
    end
  endtask

  initial begin
    int a_tab [33] = '{32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26,
                       -32, -26, -21, -17, -13, -9, -5, -2, 0, 2, 5, 9, 13, 17, 21, 26, 32};
    int n, lanes, exp_rows;
    int mb_q, row_q, n_q;
    int got_rows;
    ang[0] = 0; ang[1] = 0;
    for (int m = 2; m < 35; m++) ang[m] = a_tab[m - 2];
    in_valid = 0; log2n = 2; mode_base = 0; row = 0; tag = 0;
    for (int i = 0; i < 64; i++) begin ref_top[i] = 0; ref_left[i] = 0; end
    ref_corner = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    got_rows = 0;
    exp_rows = 0;
    for (int trial = 0; trial < 8; trial++) begin
      for (int l2 = 2; l2 <= 5; l2++) begin
        n = 1 << l2;
        lanes = 128 / n;
        for (int i = 0; i < 64; i++) begin
          ref_top[i]  = (trial % 2) ? 8'($urandom) : 8'(100 + 40 * $sin(i * 0.2 + trial));
          ref_left[i] = (trial % 2) ? 8'($urandom) : 8'(90 + 50 * $cos(i * 0.15 + trial));
        end
        ref_corner = 8'($urandom);
        predict_all(n, l2);
        log2n = 3'(l2);
        for (int mb = 0; mb < 35; mb += lanes) begin
          for (int y = 0; y < n; y++) begin
            in_valid = 1; mode_base = 6'(mb); row = 5'(y); tag = 1'(y);
            @(negedge clk);
            exp_rows++;
            // the request issued one cycle ago is now on the output
            checks++;
            if (!out_valid || out_tag != 1'(y)) begin failures++; $display("no output"); end
            for (int ln = 0; ln < lanes; ln++) begin
              checks++;
              if (lane_valid[ln] != (mb + ln <= 34)) begin failures++; $display("lane_valid"); end
              if (mb + ln <= 34)
                for (int x = 0; x < n; x++) begin
                  checks++;
                  if (int'(pred[ln * n + x]) != exp_blk[mb + ln][y][x]) begin
                    failures++;
                    if (failures < 20)
                      $display("N=%0d mode=%0d x=%0d y=%0d got %0d expected %0d", n, mb + ln,
                               x, y, pred[ln * n + x], exp_blk[mb + ln][y][x]);
                  end
                end
            end
            got_rows++;
          end
        end
        in_valid = 0;
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("out_valid without request"); end
      end
    end
    checks++;
    if (got_rows != exp_rows) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
