// tb_rd_cost_est: checks PE = a*Qs^2 + b*ES and the cost R + D for all four block
// sizes against a real-valued evaluation of the cost model with Table I.
module tb_rd_cost_est;
  import pmf_pkg::*;
  import pmf_ref_pkg::*;

  logic [ES_W-1:0]   es;
  logic [COEF_W-1:0] a, b;
  logic [QS2_W-1:0]  qs2;
  logic [PE_W-1:0]   pe   [4];
  logic [2:0]        band [4];
  logic              wd   [4];
  logic [RD_W-1:0]   cost [4];
  int checks = 0, failures = 0;
  int band_seen [4][8];

  for (genvar l = 0; l < 4; l++) begin : g_dut
    rd_cost_est #(.LEVEL(l)) dut (.es(es), .a(a), .b(b), .qs2(qs2),
      .pe(pe[l]), .band(band[l]), .omega_d(wd[l]), .cost(cost[l]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pe_r, qs2_r, pe_d, exp_cost, err;
    int  bd, qp;
    for (int i = 0; i < 4000; i++) begin
      qp  = $urandom_range(0, 51);
      qs2 = QS2_W'(ref_qs2_fx(qp));
      es  = ES_W'($urandom_range(0, 2080800) >> $urandom_range(0, 20));
      a   = COEF_W'($urandom_range(0, 4095));
      b   = COEF_W'($urandom_range(0, 2000) >> $urandom_range(0, 10));
      #1;
      qs2_r = real'(qs2) / 256.0;
      pe_r  = (real'(a) / 4096.0) * qs2_r + (real'(b) / 4096.0) * real'(es);
      for (int l = 0; l < 4; l++) begin
        pe_d = real'(pe[l]) / 256.0;
        err = pe_d - pe_r;
        if (err < 0) err = -err;
        checks++;
        if (err > 2.0 / 256.0) begin
          failures++;
          $display("lvl %0d pe=%f expected %f", l, pe_d, pe_r);
        end
        bd = ref_band(pe[l], qs2);
        band_seen[l][bd]++;
        exp_cost = 7.0 * ref_wr(l + 2, bd) * pe_d / 64.0 + ((pe_d > qs2_r / 16.0) ? pe_d : 0.0);
        err = real'(cost[l]) / 256.0 - exp_cost;
        if (err < 0) err = -err;
        checks++;
        if (err > 2.0 / 256.0) begin
          failures++;
          $display("lvl %0d es=%0d a=%0d b=%0d qs2=%0d cost=%f expected %f", l, es, a, b,
                   qs2, real'(cost[l]) / 256.0, exp_cost);
        end
      end
    end
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (band_seen[l][k] == 0) begin
          failures++;
          $display("band %0d of level %0d never exercised", k, l);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
