// tb_binary_sqrt: end-to-end test of the square-root array at its default size
// (8-bit radicand, 4-bit root).
// 1. The ten radicand/root pairs of the reference simulation run
//    (36->6, 129->11, 9->3, 99->9, 13->3, 141->11, 101->10, 18->4, 1->1, 13->3).
// 2. Two fixed-point examples with the radicand read as 4.4 bits and the root as
//    2.2 bits: 1101.0000 -> 11.10 and 0010.0011 -> 01.01.
// 3. All 256 radicands against floor(sqrt(p)) found by an independent search
//    (largest r with r*r <= p).
// Each row of the array either accepts its trial subtraction (root bit 1, the
// difference is passed on) or restores (root bit 0, the input is passed on);
// both events are counted for every row and a row that never shows one of them
// counts as a failure.
module tb_binary_sqrt;
  logic [7:0] p;
  logic [3:0] u;
  int checks = 0, failures = 0;
  int accepted [4], restored [4];

  binary_sqrt dut (.p(p), .u(u));

  function automatic int ref_sqrt(int x);
    int r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  task automatic apply(input int x, input int expected, input string what);
    p = 8'(x);
    #1;
    checks++;
    if (u != 4'(expected)) begin
      failures++;
      $display("FAIL %s: p=%0d u=%0d expected %0d", what, x, u, expected);
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
    static int vec_p [10] = '{36, 129, 9, 99, 13, 141, 101, 18, 1, 13};
    static int vec_u [10] = '{ 6,  11, 3,  9,  3,  11,  10,  4, 1,  3};
    foreach (accepted[i]) begin accepted[i] = 0; restored[i] = 0; end

    foreach (vec_p[i]) apply(vec_p[i], vec_u[i], "reference run");

    apply(int'(8'b1101_0000), int'(4'b11_10), "fixed point 13.0");
    apply(int'(8'b0010_0011), int'(4'b01_01), "fixed point 2.1875");

    for (int x = 0; x < 256; x++) begin
      apply(x, ref_sqrt(x), "exhaustive");
      for (int k = 0; k < 4; k++)
        if (u[3-k]) accepted[k]++; else restored[k]++;
    end

    for (int k = 0; k < 4; k++) begin
      $display("row %0d: accepted=%0d restored=%0d", k, accepted[k], restored[k]);
      checks++;
      if (accepted[k] == 0 || restored[k] == 0) begin
        failures++;
        $display("FAIL row %0d did not exercise both paths", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
