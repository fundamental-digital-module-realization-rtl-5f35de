// tb_rt_mux: exhaustive check of the RT multiplexer: y must equal di when the
// quotient bit u is 1 and a when it is 0, for all 8 input patterns.
module tb_rt_mux;
  logic a, di, u, y;
  int checks = 0, failures = 0;

  rt_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, di, u} = 3'(i);
      #1;
      checks++;
      if (y != (u ? di : a)) begin
        failures++;
        $display("FAIL a=%b di=%b u=%b y=%b", a, di, u, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
