// rd_cost_est: per-pixel RD cost estimate for one block size.
//
// The prediction error power of a pixel is modelled as PE = a * Qs^2 + b_k * ES_k,
// with ES_k the pixel's edge strength and a, b_k the parameters of the block's class.
// From PE the rate and distortion estimates follow:
//   R = 7 * w_r * PE / 64, with w_r taken from the size's row of the weight table at
//       the band of PE/Qs^2 (band edges 1/8, 1/4, ..., 8);
//   D = PE if PE > Qs^2 / 16, else 0.
// The pixel's cost is R + D; block costs are sums of these.
// Band comparisons use shifts of Qs^2, so no division is needed. All values are
// unsigned Q.8 (FRAC fraction bits) except a and b, which are Q.12; products are
// truncated back to Q.8.
//
// Interface: LEVEL selects the block size N = 4 << LEVEL. Inputs es (integer edge
// strength), a, b (model parameters), qs2 (Q.8). Outputs pe, the band, w_d, and
// cost = R + D. Purely combinational.
module rd_cost_est
  import pmf_pkg::*;
#(
  parameter int unsigned LEVEL = 0
) (
  input  logic [ES_W-1:0]   es,
  input  logic [COEF_W-1:0] a,
  input  logic [COEF_W-1:0] b,
  input  logic [QS2_W-1:0]  qs2,
  output logic [PE_W-1:0]   pe,
  output logic [2:0]        band,
  output logic              omega_d,
  output logic [RD_W-1:0]   cost
);

  logic [PE_W-1:0] qn_term, es_term, qs2_w;
  logic [PE_W+3:0] pe_x, qs2_x;
  logic [10:0]     w8;
  logic [RD_W-1:0] rate;

  always_comb begin
    qs2_w   = PE_W'(qs2);
    qn_term = (PE_W'(a) * qs2_w) >> COEF_FRAC;
    es_term = (PE_W'(b) * PE_W'(es)) >> (COEF_FRAC - FRAC);
    pe      = qn_term + es_term;
    pe_x    = (PE_W+4)'(pe);
    qs2_x   = (PE_W+4)'(qs2);

    // Band edges compared exactly: PE >= Qs^2 * 2^e is PE << -e >= Qs^2 for e < 0.
    band = 3'd0;
    if ((pe_x << 3) >= qs2_x) band = 3'd1;
    if ((pe_x << 2) >= qs2_x) band = 3'd2;
    if ((pe_x << 1) >= qs2_x) band = 3'd3;
    if (pe_x >= qs2_x)        band = 3'd4;
    if (pe_x >= (qs2_x << 1)) band = 3'd5;
    if (pe_x >= (qs2_x << 2)) band = 3'd6;
    if (pe_x >= (qs2_x << 3)) band = 3'd7;

    w8      = omega_r8(2'(LEVEL), band);
    rate    = (RD_W'(7) * RD_W'(w8) * RD_W'(pe)) >> 9;  // 7 * (w8/8) * PE / 64
    omega_d = (pe_x << 4) > qs2_x;
    cost    = rate + (omega_d ? RD_W'(pe) : '0);
  end

endmodule
