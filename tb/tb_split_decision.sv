// tb_split_decision: random and boundary checks of the whole-versus-split rule
// RD_N > sum of quarters + 3*7/64*(4+1).
module tb_split_decision;
  import pmf_pkg::*;

  logic [RD_W-1:0] rd_whole, rd_quarters, rd_split;
  logic            split;
  int checks = 0, failures = 0;

  split_decision dut (.rd_whole(rd_whole), .rd_quarters(rd_quarters),
                      .rd_split(rd_split), .split(split));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(longint unsigned w, longint unsigned q);
    real overhead, exp_split_r;
    bit  exp_split;
    rd_whole    = w;
    rd_quarters = q;
    #1;
    overhead    = 3.0 * 7.0 / 64.0 * (4.0 + 1.0);
    exp_split_r = real'(q) / 256.0 + overhead;
    exp_split   = (real'(w) / 256.0) > exp_split_r;
    checks += 2;
    if (split !== exp_split) begin
      failures++;
      $display("w=%0d q=%0d split=%0b expected %0b", w, q, split, exp_split);
    end
    if (rd_split != q + 420) begin
      failures++;
      $display("rd_split=%0d expected %0d", rd_split, q + 420);
    end
  endtask

  initial begin
    longint unsigned q;
    for (int i = 0; i < 2000; i++) begin
      q = {$urandom, $urandom} >> ($urandom_range(20, 40));
      check_one(q + 64'($urandom_range(0, 840)), q);
    end
    check_one(1000 + 420, 1000);  // tie: keep whole
    check_one(1000 + 421, 1000);
    check_one(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
