// tb_hist_classifier: random peaked and flat histograms for all four block sizes,
// checked against a real-valued evaluation of the three class rules. Every
// direction category, both homogeneity outcomes and all seven strength groups
// must occur.
module tb_hist_classifier;
  import pmf_pkg::*;
  import pmf_ref_pkg::*;

  logic [HIST_W-1:0] hist [NUM_BINS];
  logic [ES_W-1:0]   max_es;
  cb_class_t         cls [4];
  logic [5:0]        main_bin [4];
  int checks = 0, failures = 0;
  int seen_dir [4], seen_homog [2], seen_str [7];

  for (genvar l = 0; l < 4; l++) begin : g_dut
    hist_classifier #(.LOG2N(l + 2)) dut (.hist(hist), .max_es(max_es), .cls(cls[l]),
                                          .main_bin(main_bin[l]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h [33];
    int peak, spread;
    ref_class_t rc;
    for (int i = 0; i < 5000; i++) begin
      peak   = $urandom_range(0, 32);
      spread = $urandom_range(0, 60);
      for (int k = 0; k < 33; k++) begin
        h[k] = $urandom_range(0, spread);
        if (k >= peak - 2 && k <= peak + 2) h[k] += $urandom_range(0, 200);
        if (i % 97 == 0) h[k] = 0;
        hist[k] = HIST_W'(h[k]);
      end
      max_es = ES_W'($urandom_range(0, 2080800) >> $urandom_range(0, 14));
      #1;
      for (int l = 0; l < 4; l++) begin
        rc = ref_classify(h, longint'(max_es), l + 2);
        checks += 4;
        if (int'(cls[l].homog) != rc.homog) begin
          failures++; $display("homog mismatch lvl %0d", l);
        end
        if (int'(cls[l].dir) != rc.dir) begin
          failures++; $display("dir mismatch lvl %0d", l);
        end
        if (int'(cls[l].strength) != rc.strength) begin
          failures++; $display("strength mismatch lvl %0d", l);
        end
        if (int'(main_bin[l]) != rc.main_bin) begin
          failures++; $display("main bin mismatch lvl %0d", l);
        end
        seen_dir[rc.dir]++;
        seen_homog[rc.homog]++;
        seen_str[rc.strength]++;
      end
    end
    for (int k = 0; k < 4; k++) begin checks++; if (seen_dir[k] == 0) failures++; end
    for (int k = 0; k < 2; k++) begin checks++; if (seen_homog[k] == 0) failures++; end
    for (int k = 0; k < 7; k++) begin checks++; if (seen_str[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
