// tb_srg_gate: exhaustive check of the Saimur Rahman Gate.
// All 16 input patterns are applied. With w4 = 0 the borrow and difference are
// compared with the gate's truth table (typed in below) and with plain integer
// subtraction w1 - w2 - w3; for every pattern the garbage outputs are compared
// with their XOR definitions, and the 16 output patterns must all differ
// (reversibility).
module tb_srg_gate;
  logic w1, w2, w3, w4, w5, w6, w7, w8;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  // truth table rows for w4 = 0, indexed by {w1,w2,w3}: {w7, w8}
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b11, 2'b11, 2'b10,
                                       2'b01, 2'b00, 2'b00, 2'b11};

  srg_gate dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: in=%b%b%b%b out=%b%b%b%b", what, w1, w2, w3, w4, w5, w6, w7, w8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diff;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {w1, w2, w3, w4} = 4'(i);
      #1;
      check(w5 == (w1 ^ w3), "w5");
      check(w6 == (w1 ^ w2), "w6");
      if (!w4) begin
        check({w7, w8} == TABLE[i >> 1], "truth table");
        diff = int'(w1) - int'(w2) - int'(w3);
        check(w7 == (diff < 0), "borrow");
        check(w8 == diff[0], "difference");
      end else begin
        check(w8 == ~(w1 ^ w2 ^ w3), "w8 with w4=1");
      end
      check(!seen[{w5, w6, w7, w8}], "reversible");
      seen[{w5, w6, w7, w8}] = 1'b1;
    end
    check(&seen, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
