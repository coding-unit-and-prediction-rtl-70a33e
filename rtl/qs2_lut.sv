// qs2_lut: squared quantization step Qs^2 for a given QP.
//
// The estimated prediction error power carries a term a * Qs^2 for the quantization
// noise, and the rate and distortion weights compare PE against Qs^2. With
// Qs = 2^(QP/6) * Q[QP%6] and Q = {0.625, 0.7031, 0.7969, 0.8906, 1, 1.125}, the
// square is Q[QP%6]^2 shifted left by 2*(QP/6). The six squares are rounded to
// Q.8 (100, 127, 163, 203, 256, 324), which is this design's fixed-point choice.
//
// Interface: qp (0..51) in, qs2 out as unsigned Q.8. Purely combinational.
module qs2_lut
  import pmf_pkg::*;
(
  input  logic [5:0]       qp,
  output logic [QS2_W-1:0] qs2
);

  logic [3:0] qp_div6;
  logic [2:0] qp_mod6;
  logic [8:0] q2;

  always_comb begin
    qp_div6 = 4'(qp / 6'd6);
    qp_mod6 = 3'(qp % 6'd6);
    case (qp_mod6)
      3'd0:    q2 = 9'd100;
      3'd1:    q2 = 9'd127;
      3'd2:    q2 = 9'd163;
      3'd3:    q2 = 9'd203;
      3'd4:    q2 = 9'd256;
      default: q2 = 9'd324;
    endcase
    qs2 = QS2_W'(q2) << (2 * qp_div6);
  end

endmodule
