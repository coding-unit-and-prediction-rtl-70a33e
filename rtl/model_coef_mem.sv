// model_coef_mem: parameter memory of the linear prediction-error models of one
// block size.
//
// For an N x N block of class c the estimated error power of pixel k is
// a(c) * Qs^2 + b_k(c) * ES_k. The parameters are learned off line, so the memory is
// loaded through a write port before encoding. It holds NUM_MODELS * N^2 values of
// b_k, addressed {model, k} with k = row * N + column inside the block, and
// NUM_MODELS values of a. Both are unsigned with COEF_FRAC fraction bits.
//
// Interface: one write port (we, sel_a selects the a table, waddr, wdata) and one
// read port that returns b at rd_b_addr and a at rd_a_addr one cycle after
// rd_en (synchronous read, as an SRAM macro would). The outputs hold when rd_en is low.
module model_coef_mem
  import pmf_pkg::*;
#(
  parameter int unsigned LOG2N = 3
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic                         sel_a,
  input  logic [MODEL_W+2*LOG2N-1:0]   waddr,
  input  logic [COEF_W-1:0]            wdata,
  input  logic                         rd_en,
  input  logic [MODEL_W+2*LOG2N-1:0]   rd_b_addr,
  input  logic [MODEL_W-1:0]           rd_a_addr,
  output logic [COEF_W-1:0]            b_q,
  output logic [COEF_W-1:0]            a_q
);

  localparam int unsigned B_DEPTH = NUM_MODELS << (2 * LOG2N);

  logic [COEF_W-1:0] b_mem [B_DEPTH];
  logic [COEF_W-1:0] a_mem [NUM_MODELS];

  always_ff @(posedge clk) begin
    if (we && !sel_a && (32'(waddr) < B_DEPTH)) b_mem[waddr] <= wdata;
    if (we && sel_a && (32'(waddr) < NUM_MODELS)) a_mem[waddr[MODEL_W-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      b_q <= (32'(rd_b_addr) < B_DEPTH) ? b_mem[rd_b_addr] : '0;
      a_q <= (32'(rd_a_addr) < NUM_MODELS) ? a_mem[rd_a_addr] : '0;
    end
  end

endmodule
