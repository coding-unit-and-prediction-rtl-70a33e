// pmf_ref_pkg: reference model of the pre-mode filter, for the testbenches.
//
// Written straight from the method, without the hardware's structure: raster loops
// instead of the z-order scan, real-valued slope and weight arithmetic where it does
// not change the result, and Table I as real rate weights. The fixed-point rounding
// the hardware defines (Q.8 values, Q.12 coefficients, truncation after each product)
// is reproduced so that results can be compared bit for bit.
package pmf_ref_pkg;

  // Rate weight w_r of the cost model, row = PE/Qs^2 band, column = N of 4, 8, 16, 32.
  function automatic real ref_wr(int log2n, int band);
    real w4 [8]  = '{0.0, 0.125, 0.25, 0.5, 1.0, 1.0, 1.0, 1.0};
    real w8 [8]  = '{0.0, 0.5, 1.0, 4.0, 16.0, 32.0, 32.0, 32.0};
    real w16 [8] = '{0.0, 0.125, 0.25, 0.5, 1.0, 2.0, 4.0, 16.0};
    real w32 [8] = '{0.0, 0.0, 0.5, 2.0, 8.0, 32.0, 64.0, 128.0};
    case (log2n)
      2: return w4[band];
      3: return w8[band];
      4: return w16[band];
      default: return w32[band];
    endcase
  endfunction

  // Band of PE/Qs^2 by real division: edges at 1/8, 1/4, ..., 8.
  function automatic int ref_band(longint unsigned pe, longint unsigned qs2);
    real r;
    int  b;
    r = real'(pe) / real'(qs2);
    b = 0;
    if (r >= 0.125) b = 1;
    if (r >= 0.25)  b = 2;
    if (r >= 0.5)   b = 3;
    if (r >= 1.0)   b = 4;
    if (r >= 2.0)   b = 5;
    if (r >= 4.0)   b = 6;
    if (r >= 8.0)   b = 7;
    return b;
  endfunction

  // Fixed-point Qs^2 (Q.8) the hardware uses.
  function automatic longint unsigned ref_qs2_fx(int qp);
    int q2 [6] = '{100, 127, 163, 203, 256, 324};
    return longint'(q2[qp % 6]) << (2 * (qp / 6));
  endfunction

  // Nearest angular mode (returned as mode - 2) of an edge with Sobel gradient (gx, gy).
  function automatic int ref_dir_bin(int gx, int gy);
    int  ah [17] = '{32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26, -32};
    real ux, uy, r, best, d;
    int  bi;
    ux = -real'(gy);
    uy = real'(gx);
    bi = 0;
    if (ux == 0.0 && uy == 0.0) return 0;
    if ((uy < 0 ? -uy : uy) <= (ux < 0 ? -ux : ux)) begin
      r = -32.0 * uy / ux;
      best = 1.0e9;
      for (int i = 0; i < 17; i++) begin
        d = (r - ah[i]) < 0 ? ah[i] - r : r - ah[i];
        if (d < best) begin best = d; bi = i; end
      end
      return bi;
    end else begin
      r = -32.0 * ux / uy;
      best = 1.0e9;
      // vertical family: modes 18..34 with A = -32 .. 32
      for (int i = 0; i < 17; i++) begin
        d = (r + ah[i]) < 0 ? -ah[i] - r : r + ah[i];
        if (d < best) begin best = d; bi = i; end
      end
      return 16 + bi;
    end
  endfunction

  typedef struct {
    int homog;
    int dir;
    int strength;
    int main_bin;
  } ref_class_t;

  function automatic ref_class_t ref_classify(int hist [33], longint maxes, int log2n);
    ref_class_t c;
    int best, mode;
    real sigma, total;
    longint th [6] = '{256, 1024, 4096, 16384, 65536, 262144};
    best = 0;
    for (int i = 1; i < 33; i++) if (hist[i] > hist[best]) best = i;
    sigma = 0.0;
    total = 0.0;
    for (int i = 0; i < 33; i++) begin
      total += hist[i];
      if (i >= best - 2 && i <= best + 2) sigma += hist[i];
    end
    c.homog = (total > 0.0 && sigma / total > 1.0 - 0.1 * log2n) ? 1 : 0;
    mode = best + 2;
    if (mode >= 7 && mode <= 13) c.dir = 0;
    else if (mode >= 23 && mode <= 29) c.dir = 1;
    else if (mode >= 14 && mode <= 22) c.dir = 2;
    else c.dir = 3;
    c.strength = 0;
    for (int i = 0; i < 6; i++) if (maxes >= th[i]) c.strength = i + 1;
    c.main_bin = best;
    return c;
  endfunction

  function automatic int ref_model(ref_class_t c);
    return c.homog * 28 + c.dir * 7 + c.strength;
  endfunction

  // Deterministic model parameters used by the testbenches (Q.12).
  function automatic int ref_coef_b(int level, int model, int k);
    int unsigned h;
    h = 32'(level * 7919 + model * 104729 + k * 2654435761);
    h = h ^ (h >> 13);
    h = h * 32'd1103515245;
    return 2 + int'((h >> 16) % (32'd24 << level)) + k / 8;
  endfunction

  function automatic int ref_coef_a(int level, int model);
    return 200 + ((level * 37 + model * 91) % 900);
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Decisions and 32x32 costs of one CB, computed in raster order.
  task automatic ref_cb_decide(input int pix [32][32], input int q,
                               output longint unsigned exp_rd32,
                               output longint unsigned exp_rd_split32,
                               output bit exp_cu, output bit [15:0] exp_pu);
    int gx [32][32], gy [32][32], bin [32][32];
    longint es [32][32];
    longint unsigned rd [4][8][8];   // [level][block row][block col]
    longint unsigned qs2, sum, pe, a, b, rate, w8;
    int n, nb, h [33], model, bd;
    longint mx;
    ref_class_t c;
    qs2 = ref_qs2_fx(q);
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        int p [3][3];
        for (int r = 0; r < 3; r++)
          for (int cc = 0; cc < 3; cc++)
            p[r][cc] = pix[clampi(y + r - 1, 0, 31)][clampi(x + cc - 1, 0, 31)];
        gx[y][x] = p[0][2] + 2 * p[1][2] + p[2][2] - p[0][0] - 2 * p[1][0] - p[2][0];
        gy[y][x] = p[2][0] + 2 * p[2][1] + p[2][2] - p[0][0] - 2 * p[0][1] - p[0][2];
        es[y][x] = longint'(gx[y][x]) * gx[y][x] + longint'(gy[y][x]) * gy[y][x];
        bin[y][x] = ref_dir_bin(gx[y][x], gy[y][x]);
      end
    for (int l = 0; l < 4; l++) begin
      n  = 4 << l;
      nb = 32 / n;
      for (int by = 0; by < nb; by++)
        for (int bx = 0; bx < nb; bx++) begin
          for (int k = 0; k < 33; k++) h[k] = 0;
          mx = 0;
          for (int y = by * n; y < by * n + n; y++)
            for (int x = bx * n; x < bx * n + n; x++) begin
              if (es[y][x] >= 16) h[bin[y][x]]++;
              if (es[y][x] > mx) mx = es[y][x];
            end
          c     = ref_classify(h, mx, l + 2);
          model = ref_model(c);
          sum   = 0;
          for (int y = 0; y < n; y++)
            for (int x = 0; x < n; x++) begin
              a    = longint'(ref_coef_a(l, model));
              b    = longint'(ref_coef_b(l, model, y * n + x));
              pe   = ((a * qs2) >> 12) + ((b * longint'(es[by * n + y][bx * n + x])) >> 4);
              bd   = ref_band(pe, qs2);
              w8   = longint'($rtoi(ref_wr(l + 2, bd) * 8.0));
              rate = (7 * w8 * pe) >> 9;
              sum += rate + ((real'(pe) > real'(qs2) / 16.0) ? pe : 0);
            end
          rd[l][by][bx] = sum;
        end
    end
    // 8x8 PU decisions, indexed in z-order
    for (int z = 0; z < 16; z++) begin
      int bx, by;
      longint unsigned q4;
      bx = (z & 1) | ((z >> 1) & 2);
      by = ((z >> 1) & 1) | ((z >> 2) & 2);
      q4 = rd[0][2*by][2*bx] + rd[0][2*by][2*bx+1] + rd[0][2*by+1][2*bx] + rd[0][2*by+1][2*bx+1];
      exp_pu[z] = real'(rd[1][by][bx]) / 256.0 > real'(q4) / 256.0 + 3.0 * 7.0 / 64.0 * 5.0;
    end
    exp_rd32       = rd[3][0][0];
    exp_rd_split32 = rd[2][0][0] + rd[2][0][1] + rd[2][1][0] + rd[2][1][1] + 420;
    exp_cu = real'(exp_rd32) / 256.0 >
             real'(rd[2][0][0] + rd[2][0][1] + rd[2][1][0] + rd[2][1][1]) / 256.0 + 105.0 / 64.0;
  endtask

endpackage
