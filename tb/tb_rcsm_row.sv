// tb_rcsm_row: exhaustive check of one controlled-subtract-multiplex row at
// W = 6 (the widest row of the 8-bit array): for all 4096 pairs (a, b) the
// quotient bit must be (a >= b), the difference a - b modulo 64, the remainder
// a - b when a >= b and a otherwise, and the garbage lines and final borrow must
// match the SRG/Feynman definitions worked out bit by bit from integer borrows.
module tb_rcsm_row;
  localparam int unsigned W = 6;
  logic [W-1:0] a, b, r, d, g5, g6;
  logic u, bo;
  int checks = 0, failures = 0;
  int accepted = 0, restored = 0;

  rcsm_row #(.W(W)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d u=%b r=%0d d=%0d", what, a, b, u, r, d);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib;
    logic [W-1:0] diff;
    logic [W-1:0] bin, exp_g5, exp_g6;
    for (ia = 0; ia < 2**W; ia++) begin
      for (ib = 0; ib < 2**W; ib++) begin
        a = W'(ia);
        b = W'(ib);
        #1;
        diff = W'(ia - ib);
        // borrow into bit i is set when the low i bits of a are below those of b
        for (int i = 0; i < W; i++)
          bin[i] = (ia % (1 << i)) < (ib % (1 << i));
        exp_g5 = a ^ bin;
        exp_g6 = a ^ b;
        check(u == (ia >= ib), "quotient bit");
        check(bo == (ia < ib), "borrow out");
        check(d == diff, "difference");
        check(r == (ia >= ib ? diff : a), "remainder");
        check(g5 == exp_g5 && g6 == exp_g6, "garbage");
        if (u) accepted++; else restored++;
      end
    end
    check(accepted > 0 && restored > 0, "both mux paths used");
    $display("rows accepted=%0d restored=%0d", accepted, restored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
