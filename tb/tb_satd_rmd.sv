// tb_satd_rmd: self-checking test of the 4x4 SATD rough mode decision.
//
// Random 4x4 PUs are sent as the predictor would send them: two passes of four rows
// (mode_base 0 and 32), 32 lanes of random predictions per row, with lane_valid set
// for modes up to 34. Some PUs use predictions close to the source so that SATDs are
// small and ties happen. The reference SATD is computed as a plain matrix product
// H * D * H^T with the Hadamard matrix written out, and the expected best mode is the
// lowest mode of minimal SATD over the 35 modes. Rows of a pass are also sent out of
// order and with idle cycles in between, since the unit keys its store on `row`.
// Checks: satd_valid timing and every lane's SATD after each pass, and best_valid,
// best_mode, best_satd after the second pass.
module tb_satd_rmd;
  import pmf_pkg::*;

  localparam int L = 32;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [5:0] mode_base;
  logic [1:0] row;
  logic [7:0] pred [L*4];
  logic [L-1:0] lane_valid;
  logic [7:0] src [4];
  logic satd_valid, best_valid;
  logic [12:0] satd [L];
  logic [5:0] best_mode;
  logic [12:0] best_satd;

  int checks = 0, failures = 0;
  int cycles = 0;

  satd_rmd dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int H [4][4] = '{'{1, 1, 1, 1}, '{1, -1, 1, -1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}};

  int s_pix [4][4];
  int p_pix [35][4][4];

  function automatic int ref_satd(int mode);
    int d [4][4], t [4][4], c, sum;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) d[y][x] = p_pix[mode][y][x] - s_pix[y][x];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += H[i][k] * d[k][j];
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

  task automatic send_pass(int base);
    int order [4] = '{0, 1, 2, 3};
    // rows 0..2 in a random order, row 3 last
    for (int i = 2; i > 0; i--) begin
      int j, tmp;
      j = $urandom_range(0, i);
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
    for (int r = 0; r < 4; r++) begin
      int y;
      y = order[r];
      in_valid  = 1;
      mode_base = 6'(base);
      row       = 2'(y);
      for (int x = 0; x < 4; x++) src[x] = 8'(s_pix[y][x]);
      for (int m = 0; m < L; m++) begin
        lane_valid[m] = (base + m <= 34);
        for (int x = 0; x < 4; x++)
          pred[m*4 + x] = (base + m <= 34) ? 8'(p_pix[base + m][y][x]) : 8'($urandom);
      end
      @(posedge clk); #1;
      in_valid = 0;
      if (satd_valid !== (y == 3)) begin
        failures++; $display("satd_valid wrong after row %0d", y);
      end
      checks++;
      if (y != 3 && $urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    int near, best, bmode, v;
    in_valid = 0; mode_base = 0; row = 0; lane_valid = '0;
    for (int i = 0; i < L*4; i++) pred[i] = 0;
    for (int i = 0; i < 4; i++) src[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int pu = 0; pu < 400; pu++) begin
      near = $urandom_range(0, 2);
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) s_pix[y][x] = (pu % 50 == 7) ? 255 * (x & 1) : $urandom_range(0, 255);
      for (int m = 0; m < 35; m++)
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            if (pu % 50 == 7) p_pix[m][y][x] = 255 * ((x + 1) & 1);   // worst case
            else if (near == 0) p_pix[m][y][x] = $urandom_range(0, 255);
            else p_pix[m][y][x] = clampi(s_pix[y][x] + $urandom_range(0, 2 * near) - near);
      best = 1 << 30; bmode = 0;
      for (int m = 0; m < 35; m++) begin
        v = ref_satd(m);
        if (v < best) begin best = v; bmode = m; end
      end
      for (int base = 0; base < 35; base += L) begin
        send_pass(base);
        for (int m = 0; m < L; m++)
          if (base + m <= 34) begin
            checks++;
            if (int'(satd[m]) != ref_satd(base + m)) begin
              failures++;
              $display("pu %0d mode %0d satd %0d expected %0d", pu, base + m, satd[m], ref_satd(base + m));
            end
          end
        checks++;
        if (best_valid !== (base + L > 34)) begin
          failures++; $display("pu %0d best_valid wrong after pass %0d", pu, base);
        end
      end
      checks++;
      if (int'(best_mode) != bmode || int'(best_satd) != best) begin
        failures++;
        $display("pu %0d best %0d/%0d expected %0d/%0d", pu, best_mode, best_satd, bmode, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

endmodule
