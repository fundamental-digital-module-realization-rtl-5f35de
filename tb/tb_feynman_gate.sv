// tb_feynman_gate: exhaustive check of the Feynman gate (P = A, Q = A xor B)
// over its 4 input patterns, including the inverter use (B = 1 gives Q = ~A).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks += 2;
      if (p != a) begin failures++; $display("FAIL p a=%b b=%b p=%b", a, b, p); end
      if (q != (a != b)) begin failures++; $display("FAIL q a=%b b=%b q=%b", a, b, q); end
      if (b) begin
        checks++;
        if (q != !a) begin failures++; $display("FAIL inverter a=%b q=%b", a, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
