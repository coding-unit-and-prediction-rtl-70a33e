// tb_edge_unit: Sobel gradients, edge strength and nearest-angle direction of random
// and directed 3x3 windows, against integer Sobel sums and a real-valued slope
// comparison. Every one of the 33 direction cells must be hit.
module tb_edge_unit;
  import pmf_pkg::*;
  import pmf_ref_pkg::*;

  logic [PIX_W-1:0]         win [3][3];
  logic signed [GRAD_W-1:0] eh, ev;
  logic [ES_W-1:0]          es;
  logic [5:0]               dir_bin;
  logic                     has_edge;
  int checks = 0, failures = 0;
  int bin_seen [33];

  edge_unit dut (.win(win), .eh(eh), .ev(ev), .es(es), .dir_bin(dir_bin), .has_edge(has_edge));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_win();
    int gx, gy, e, db;
    #1;
    gx = 0;
    gy = 0;
    for (int r = 0; r < 3; r++) begin
      gx += (r == 1 ? 2 : 1) * (int'(win[r][2]) - int'(win[r][0]));
    end
    for (int c = 0; c < 3; c++) begin
      gy += (c == 1 ? 2 : 1) * (int'(win[2][c]) - int'(win[0][c]));
    end
    e  = gx * gx + gy * gy;
    db = ref_dir_bin(gx, gy);
    checks += 4;
    if (int'(eh) != gx || int'(ev) != gy) begin
      failures++;
      $display("gradient %0d,%0d expected %0d,%0d", eh, ev, gx, gy);
    end
    if (int'(es) != e) begin failures++; $display("es %0d expected %0d", es, e); end
    if (has_edge != (e >= 16)) begin failures++; $display("has_edge wrong"); end
    if (e != 0 && int'(dir_bin) != db) begin
      failures++;
      $display("gx=%0d gy=%0d dir_bin=%0d expected %0d", gx, gy, dir_bin, db);
    end
    if (e != 0) bin_seen[dir_bin]++;
  endtask

  initial begin
    real ang;
    int  base, amp;
    // random windows
    for (int i = 0; i < 20000; i++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] = 8'($urandom);
      check_win();
    end
    // linear ramps in many directions
    for (int i = 0; i < 720; i++) begin
      ang  = 3.14159265 * i / 360.0;
      base = 128;
      amp  = 40;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          win[r][c] = 8'(base + $rtoi(amp * ($cos(ang) * (c - 1) + $sin(ang) * (r - 1))));
      check_win();
    end
    // extreme steps
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[r][c] = (c == 2) ? 8'd255 : 8'd0;
    check_win();
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[r][c] = (r + c >= 2) ? 8'd255 : 8'd0;
    check_win();
    for (int k = 0; k < 33; k++) begin
      checks++;
      if (bin_seen[k] == 0) begin failures++; $display("direction cell %0d never hit", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
