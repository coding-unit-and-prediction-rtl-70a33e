// tb_pred_arbiter: random request patterns from the two engines. Checks that a
// lone request is granted at once, that contested cycles alternate between the
// engines, and that the granted engine's fields and references are forwarded.
module tb_pred_arbiter;
  import pmf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] req, gnt;
  logic [2:0] log2n [2];
  logic [5:0] mode_base [2];
  logic [4:0] row [2];
  logic [7:0] ref_top [2][64], ref_left [2][64], ref_corner [2];
  logic p_valid;
  logic [2:0] p_log2n;
  logic [5:0] p_mode_base;
  logic [4:0] p_row;
  logic [0:0] p_tag;
  logic [7:0] p_ref_top [64], p_ref_left [64], p_ref_corner;
  int checks = 0, failures = 0, cycles = 0;
  int contested = 0, lone = 0;

  pred_arbiter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    int next_winner, w;
    req = 0;
    for (int e = 0; e < 2; e++) begin
      log2n[e] = 0; mode_base[e] = 0; row[e] = 0; ref_corner[e] = 0;
      for (int i = 0; i < 64; i++) begin ref_top[e][i] = 0; ref_left[e][i] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    next_winner = 1;   // the small-block engine wins the first contested cycle
    for (int k = 0; k < 5000; k++) begin
      req = 2'($urandom);
      for (int e = 0; e < 2; e++) begin
        log2n[e] = 3'($urandom_range(2, 5));
        mode_base[e] = 6'($urandom_range(0, 34));
        row[e] = 5'($urandom);
        ref_corner[e] = 8'($urandom);
        for (int i = 0; i < 64; i++) begin
          ref_top[e][i] = 8'($urandom);
          ref_left[e][i] = 8'($urandom);
        end
      end
      #1;
      if (req == 2'b11) begin w = next_winner; next_winner = 1 - w; contested++; end
      else if (req == 2'b10) begin w = 1; lone++; end
      else if (req == 2'b01) begin w = 0; lone++; end
      else w = -1;
      checks += 2;
      if (w < 0) begin
        if (gnt != 0 || p_valid) begin failures++; $display("grant without request"); end
      end else begin
        if (gnt != (2'b01 << w) || !p_valid || p_tag != 1'(w)) begin
          failures++; $display("req=%b gnt=%b expected winner %0d", req, gnt, w);
        end
        checks++;
        if (p_log2n != log2n[w] || p_mode_base != mode_base[w] || p_row != row[w] ||
            p_ref_top != ref_top[w] || p_ref_left != ref_left[w] ||
            p_ref_corner != ref_corner[w]) begin
          failures++; $display("fields of engine %0d not forwarded", w);
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (contested == 0) failures++;
    if (lone == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
