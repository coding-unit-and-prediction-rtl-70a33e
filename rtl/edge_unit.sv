// edge_unit: edge gradient, edge strength and edge direction of one pixel.
//
// A 3x3 Sobel operator on the pixel's neighbourhood gives the horizontal and
// vertical gradients eh and ev; the edge strength is ES = eh^2 + ev^2. The edge runs
// perpendicular to the gradient, along (-ev, eh), and is quantized to the nearest of
// the 33 HEVC angular prediction directions (modes 2..34), so that a block's pixels
// can be collected into a 33-cell direction histogram. Modes 2..18 are the
// horizontal family, with displacement A per column; modes 18..34 the vertical
// family, with displacement A per row; A runs over the standard table
// {32,26,21,17,13,9,5,2,0,-2,...,-32}. The nearest angle is found by comparing the
// edge slope with the midpoints between table entries, cross-multiplied so no
// division is needed.
// The Sobel kernel and the nearest-angle rule are this design's choice: the method
// only asks for the edge strength and direction of every pixel.
//
// Interface: win[r][c] is the 3x3 window (row 0 on top, column 0 on the left) with
// the pixel at win[1][1]. Outputs eh, ev, es, dir_bin (mode - 2, 0..32) and
// has_edge, which is set when es >= EDGE_MIN_ES. Purely combinational.
module edge_unit
  import pmf_pkg::*;
(
  input  logic [PIX_W-1:0]         win [3][3],
  output logic signed [GRAD_W-1:0] eh,
  output logic signed [GRAD_W-1:0] ev,
  output logic [ES_W-1:0]          es,
  output logic [5:0]               dir_bin,
  output logic                     has_edge
);

  // Sums of neighbouring entries of the angle table: A[j] + A[j+1].
  localparam int HSUM [16] = '{58, 47, 38, 30, 22, 14, 7, 2, -2, -7, -14, -22, -30, -38, -47, -58};
  localparam int VSUM [16] = '{-58, -47, -38, -30, -22, -14, -7, -2, 2, 7, 14, 22, 30, 38, 47, 58};

  function automatic int px(logic [PIX_W-1:0] v);
    return int'(v);
  endfunction

  int gx, gy, ux, uy, aux, auy, cnt;

  always_comb begin
    gx = (px(win[0][2]) + 2 * px(win[1][2]) + px(win[2][2]))
       - (px(win[0][0]) + 2 * px(win[1][0]) + px(win[2][0]));
    gy = (px(win[2][0]) + 2 * px(win[2][1]) + px(win[2][2]))
       - (px(win[0][0]) + 2 * px(win[0][1]) + px(win[0][2]));
    eh = GRAD_W'(gx);
    ev = GRAD_W'(gy);
    es = ES_W'(gx * gx + gy * gy);
    has_edge = es >= EDGE_MIN_ES;

    // Edge direction vector; the sign is irrelevant for a line.
    ux  = -gy;
    uy  = gx;
    aux = (ux < 0) ? -ux : ux;
    auy = (uy < 0) ? -uy : uy;
    cnt = 0;
    if (auy <= aux) begin
      // Horizontal family: slope r = -32*uy/ux, normalized so ux > 0.
      if (ux < 0) begin
        ux = -ux;
        uy = -uy;
      end
      for (int j = 0; j < 16; j++)
        if (-64 * uy < HSUM[j] * ux) cnt = cnt + 1;
      dir_bin = 6'(cnt);            // mode 2 + cnt
    end else begin
      // Vertical family: r = -32*ux/uy, normalized so uy > 0.
      if (uy < 0) begin
        ux = -ux;
        uy = -uy;
      end
      for (int j = 0; j < 16; j++)
        if (-64 * ux > VSUM[j] * uy) cnt = cnt + 1;
      dir_bin = 6'(16 + cnt);       // mode 18 + cnt
    end
  end

endmodule
