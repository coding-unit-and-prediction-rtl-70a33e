// hist_classifier: texture class of one coding block.
//
// Each block is sorted into one of 56 classes, each with its own linear model:
//   * prominent angle direction: the histogram cell with the largest count is the
//     main direction; modes 7..13 are D0 (horizontal-like), 23..29 D1
//     (vertical-like), 14..22 D2 (-45 degree-like), the rest D3. Ties go to the
//     lower mode (this design's choice).
//   * directional homogeneity: with sigma the sum of the main cell and its four
//     neighbours (two on each side) and Sigma the sum of all cells, the block is
//     homogeneous when sigma/Sigma > 1 - 0.1*log2(N), evaluated as
//     10*sigma > (10 - log2 N) * Sigma. Neighbours beyond modes 2 and 34 are left
//     out, and a block with no edge pixels (Sigma = 0) is non-homogeneous; both are
//     this design's choices.
//   * strength group M0..M6: the number of thresholds STRENGTH_TH that the block's
//     maximum edge strength reaches.
//
// Interface: LOG2N sets the block size. hist[i] counts the pixels whose edge runs
// along mode i + 2; max_es is the block's largest edge strength. The outputs are the
// class and the main histogram cell. Purely combinational.
module hist_classifier
  import pmf_pkg::*;
#(
  parameter int unsigned LOG2N = 2
) (
  input  logic [HIST_W-1:0] hist [NUM_BINS],
  input  logic [ES_W-1:0]   max_es,
  output cb_class_t         cls,
  output logic [5:0]        main_bin
);

  logic [HIST_W-1:0] best;
  logic [HIST_W+3:0] sigma, total;
  int                mode;

  always_comb begin
    best     = hist[0];
    main_bin = 6'd0;
    for (int i = 1; i < NUM_BINS; i++) begin
      if (hist[i] > best) begin
        best     = hist[i];
        main_bin = 6'(i);
      end
    end

    sigma = '0;
    total = '0;
    for (int i = 0; i < NUM_BINS; i++) begin
      total = total + (HIST_W+4)'(hist[i]);
      if ((i + 2 >= int'(main_bin)) && (i <= int'(main_bin) + 2))
        sigma = sigma + (HIST_W+4)'(hist[i]);
    end
    cls.homog = (32'(sigma) * 10) > (32'(total) * (10 - LOG2N));

    mode = int'(main_bin) + 2;
    if (mode >= 7 && mode <= 13)       cls.dir = DIR_D0;
    else if (mode >= 23 && mode <= 29) cls.dir = DIR_D1;
    else if (mode >= 14 && mode <= 22) cls.dir = DIR_D2;
    else                               cls.dir = DIR_D3;

    cls.strength = 3'd0;
    for (int i = 0; i < NUM_STRENGTH - 1; i++)
      if (max_es >= STRENGTH_TH[i]) cls.strength = 3'(i + 1);
  end

endmodule
