// tb_model_coef_mem: fills both tables of an 8x8-size model memory, then reads back
// random addresses and checks the one-cycle read latency and that the output holds
// while rd_en is low.
module tb_model_coef_mem;
  import pmf_pkg::*;

  localparam int LOG2N = 3;
  localparam int AW = MODEL_W + 2 * LOG2N;
  localparam int DEPTH = NUM_MODELS << (2 * LOG2N);

  logic clk = 1'b0;
  logic we, sel_a, rd_en;
  logic [AW-1:0] waddr, rd_b_addr;
  logic [MODEL_W-1:0] rd_a_addr;
  logic [COEF_W-1:0] wdata, b_q, a_q;
  logic [COEF_W-1:0] shadow_b [DEPTH];
  logic [COEF_W-1:0] shadow_a [NUM_MODELS];
  int checks = 0, failures = 0, cycles = 0;

  model_coef_mem #(.LOG2N(LOG2N)) dut (.clk(clk), .we(we), .sel_a(sel_a), .waddr(waddr),
    .wdata(wdata), .rd_en(rd_en), .rd_b_addr(rd_b_addr), .rd_a_addr(rd_a_addr),
    .b_q(b_q), .a_q(a_q));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    logic [COEF_W-1:0] hb, ha;
    we = 0; sel_a = 0; rd_en = 0; waddr = '0; wdata = '0; rd_b_addr = '0; rd_a_addr = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; sel_a = 0; waddr = AW'(i); wdata = COEF_W'($urandom);
      shadow_b[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < NUM_MODELS; i++) begin
      we = 1; sel_a = 1; waddr = AW'(i); wdata = COEF_W'($urandom);
      shadow_a[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      rd_en = 1;
      rd_b_addr = AW'($urandom_range(0, DEPTH - 1));
      rd_a_addr = MODEL_W'($urandom_range(0, NUM_MODELS - 1));
      @(negedge clk);
      checks += 2;
      if (b_q !== shadow_b[rd_b_addr]) begin failures++; $display("b mismatch at %0d", rd_b_addr); end
      if (a_q !== shadow_a[rd_a_addr]) begin failures++; $display("a mismatch at %0d", rd_a_addr); end
      // hold check
      hb = b_q; ha = a_q;
      rd_en = 0;
      rd_b_addr = rd_b_addr + 1'b1;
      @(negedge clk);
      checks++;
      if (b_q !== hb || a_q !== ha) begin failures++; $display("output did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
