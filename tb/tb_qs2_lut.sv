// tb_qs2_lut: checks Qs^2 for every QP 0..51 against Qs = 2^(QP/6) * Q[QP%6]
// computed in real arithmetic, within the rounding of the Q.8 table.
module tb_qs2_lut;
  import pmf_pkg::*;

  logic [5:0]       qp;
  logic [QS2_W-1:0] qs2;
  int checks = 0, failures = 0;
  real qtab [6] = '{0.625, 0.7031, 0.7969, 0.8906, 1.0, 1.125};

  qs2_lut dut (.qp(qp), .qs2(qs2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real qs, ref_v, tol, err;
    for (int q = 0; q <= 51; q++) begin
      qp = 6'(q);
      #1;
      qs    = (2.0 ** (q / 6)) * qtab[q % 6];
      ref_v = qs * qs * 256.0;
      tol   = 0.5 * (4.0 ** (q / 6)) + 0.01;
      err   = real'(qs2) - ref_v;
      if (err < 0) err = -err;
      checks++;
      if (err > tol) begin
        failures++;
        $display("qp=%0d qs2=%0d expected %f", q, qs2, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
