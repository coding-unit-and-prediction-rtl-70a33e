// pred_arbiter: shares the one intra predictor between the two RDO engines.
//
// The large-block engine (32x32/16x16 CUs) and the small-block engine (8x8/4x4 PUs)
// each present a prediction request: block size, first mode of the group, row, and
// their reference samples. The small-block engine does not need the predictor while
// it estimates RD costs, so the two can take turns. When both ask in the same cycle
// the grant alternates (round robin); a lone request is granted at once. The granted
// request is forwarded with tag = requester (0 large, 1 small), so the returning
// rows can be steered back. How the turns are arbitrated is this design's choice:
// the method only says the engines use the predictor alternately.
//
// Interface: req[i]/gnt[i] per engine (a request is taken in the cycle gnt is high),
// the per-engine request fields, and the merged request towards the predictor.
// Grants are combinational; the round-robin pointer moves on each contested grant.
module pred_arbiter
  import pmf_pkg::*;
#(
  parameter int unsigned MAX_N = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       req,
  output logic [1:0]       gnt,
  input  logic [2:0]       log2n     [2],
  input  logic [5:0]       mode_base [2],
  input  logic [4:0]       row       [2],
  input  logic [PIX_W-1:0] ref_top   [2][2*MAX_N],
  input  logic [PIX_W-1:0] ref_left  [2][2*MAX_N],
  input  logic [PIX_W-1:0] ref_corner[2],
  output logic             p_valid,
  output logic [2:0]       p_log2n,
  output logic [5:0]       p_mode_base,
  output logic [4:0]       p_row,
  output logic [0:0]       p_tag,
  output logic [PIX_W-1:0] p_ref_top  [2*MAX_N],
  output logic [PIX_W-1:0] p_ref_left [2*MAX_N],
  output logic [PIX_W-1:0] p_ref_corner
);

  logic prio;   // requester that wins the next contested cycle
  logic sel;

  always_comb begin
    if (req == 2'b11)      sel = prio;
    else if (req[1])       sel = 1'b1;
    else                   sel = 1'b0;
    gnt          = '0;
    gnt[sel]     = |req;
    p_valid      = |req;
    p_tag        = sel;
    p_log2n      = log2n[sel];
    p_mode_base  = mode_base[sel];
    p_row        = row[sel];
    p_ref_top    = ref_top[sel];
    p_ref_left   = ref_left[sel];
    p_ref_corner = ref_corner[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              prio <= 1'b1;
    else if (req == 2'b11)   prio <= ~sel;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_no_idle_grant: assert property (@(posedge clk) disable iff (!rst_n) (req == 2'b00) |-> (gnt == 2'b00));

endmodule
