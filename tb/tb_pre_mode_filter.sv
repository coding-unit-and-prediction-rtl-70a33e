// tb_pre_mode_filter: end-to-end check of the texture based CU/PU filter on one
// 32x32 CB at a time.
//
// The model memories are filled with the deterministic parameters of pmf_ref_pkg.
// Each test CB (flat, noisy, directional stripes, steps, fine checkerboards, mixed
// quadrants) is loaded with random gaps on the row handshake; the testbench then
// recomputes, in raster order, every pixel's Sobel edge, the class of every 4x4,
// 8x8, 16x16 and 32x32 block, each pixel's cost at every size and the block sums,
// and compares the 32x32 costs and all 17 decisions bit for bit. The number of
// cycles from the last row to out_valid must be 2049 (two 1024-pixel passes plus
// the one-cycle memory read), and results must hold while out_ready is low.
// Both outcomes of the CU and of the PU decision must occur.
module tb_pre_mode_filter;
  import pmf_pkg::*;
  import pmf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] qp;
  logic row_valid, row_ready;
  logic [PIX_W-1:0] row_pix [CB_N];
  logic coef_we, coef_sel_a, out_valid, out_ready, cu_split;
  logic [1:0] coef_level;
  logic [MODEL_W+9:0] coef_addr;
  logic [COEF_W-1:0] coef_data;
  logic [15:0] pu_split;
  logic [RD_W-1:0] rd_whole, rd_split;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int seen_cu [2], seen_pu [2];

  pre_mode_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 400000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int pix [32][32];


  // ------------------------------------------------------------ reference model
  longint unsigned exp_rd32, exp_rd_split32;
  bit exp_cu;
  bit [15:0] exp_pu;

  task automatic reference(int q);
    ref_cb_decide(pix, q, exp_rd32, exp_rd_split32, exp_cu, exp_pu);
  endtask

  // ------------------------------------------------------------ stimulus
  task automatic make_cb(int kind);
    int v, s;
    real ang;
    ang = $urandom_range(0, 359) * 3.14159265 / 180.0;
    s   = $urandom_range(1, 6);
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        case (kind % 7)
          0: v = 120 + $urandom_range(0, 2);
          1: v = $urandom_range(0, 255);
          2: v = 128 + $rtoi(100.0 * $sin((x * $cos(ang) + y * $sin(ang)) / s));
          3: v = ((x * $cos(ang) + y * $sin(ang)) > 16.0) ? 220 : 30;
          4: v = (((x >> 1) ^ (y >> 1)) & 1) ? 200 : 60;
          5: v = (x < 16 && y < 16) ? 128 : (x >= 16 && y < 16) ? $urandom_range(0, 255)
                 : (y >= 16 && x < 16) ? ((x + y) & 4 ? 250 : 10) : 90 + (x >> 2);
          default: v = 128 + $rtoi(20.0 * $sin(x * 0.4) + 20.0 * $cos(y * 0.3)) + $urandom_range(0, 8);
        endcase
        pix[y][x] = clampi(v, 0, 255);
      end
  endtask

  task automatic load_coefs();
    for (int l = 0; l < 4; l++) begin
      int n2;
      n2 = 16 << (2 * l);
      for (int m = 0; m < NUM_MODELS; m++) begin
        for (int k = 0; k < n2; k++) begin
          coef_we = 1; coef_level = 2'(l); coef_sel_a = 0;
          coef_addr = 16'(m * n2 + k);
          coef_data = COEF_W'(ref_coef_b(l, m, k));
          @(negedge clk);
        end
        coef_we = 1; coef_level = 2'(l); coef_sel_a = 1;
        coef_addr = 16'(m);
        coef_data = COEF_W'(ref_coef_a(l, m));
        @(negedge clk);
      end
    end
    coef_we = 0;
  endtask

  task automatic run_cb(int q);
    longint t_last;
    int hold;
    qp = 6'(q);
    for (int y = 0; y < 32; y++) begin
      row_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      row_valid = 1;
      for (int x = 0; x < 32; x++) row_pix[x] = PIX_W'(pix[y][x]);
      while (!row_ready) @(negedge clk);
      @(negedge clk);
    end
    row_valid = 0;
    t_last = cycles;
    reference(q);
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycles - t_last != 2049) begin
      failures++;
      $display("latency %0d, expected 2049", cycles - t_last);
    end
    hold = $urandom_range(0, 3);
    repeat (hold) @(negedge clk);
    checks += 4;
    if (!out_valid) begin failures++; $display("out_valid dropped"); end
    if (rd_whole != exp_rd32) begin
      failures++; $display("RD32 %0d expected %0d", rd_whole, exp_rd32);
    end
    if (rd_split != exp_rd_split32) begin
      failures++; $display("RD split %0d expected %0d", rd_split, exp_rd_split32);
    end
    if (cu_split != exp_cu) begin failures++; $display("cu_split mismatch"); end
    if (pu_split != exp_pu) begin
      failures++; $display("pu_split %b expected %b", pu_split, exp_pu);
    end
    seen_cu[cu_split]++;
    for (int z = 0; z < 16; z++) seen_pu[pu_split[z]]++;
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    int qps [8] = '{22, 27, 32, 37, 22, 37, 4, 51};
    row_valid = 0; out_ready = 0; coef_we = 0; coef_level = 0; coef_sel_a = 0;
    coef_addr = 0; coef_data = 0; qp = 0;
    for (int x = 0; x < 32; x++) row_pix[x] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs();
    for (int i = 0; i < 14; i++) begin
      make_cb(i);
      run_cb(qps[i % 8]);
    end
    checks += 2;
    if (seen_cu[0] == 0 || seen_cu[1] == 0) begin
      failures++; $display("CU decision only one way: %0d/%0d", seen_cu[0], seen_cu[1]);
    end
    if (seen_pu[0] == 0 || seen_pu[1] == 0) begin
      failures++; $display("PU decision only one way: %0d/%0d", seen_pu[0], seen_pu[1]);
    end
    $display("cu 32/16: %0d/%0d  pu 8/4: %0d/%0d", seen_cu[0], seen_cu[1], seen_pu[0], seen_pu[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
