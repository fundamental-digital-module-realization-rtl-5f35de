// tb_binary_sqrt_wide: the array generated at larger sizes. A 16-bit instance
// is checked on all 65536 radicands and a 32-bit instance on 20000 random ones
// plus the extremes, each against floor(sqrt(p)) found by an independent
// integer search.
module tb_binary_sqrt_wide;
  logic [15:0] p16;
  logic [7:0]  u16;
  logic [31:0] p32;
  logic [15:0] u32;
  int checks = 0, failures = 0;

  binary_sqrt #(.SIZE(16)) dut16 (.p(p16), .u(u16));
  binary_sqrt #(.SIZE(32)) dut32 (.p(p32), .u(u32));

  // bitwise search for the largest r with r*r <= x
  function automatic longint ref_sqrt(longint x, int bits);
    longint r = 0;
    for (int i = bits - 1; i >= 0; i--)
      if ((r + (64'd1 << i)) * (r + (64'd1 << i)) <= x) r += (64'd1 << i);
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, e;
    p32 = '0;
    for (int i = 0; i < 65536; i++) begin
      p16 = 16'(i);
      #1;
      checks++;
      e = ref_sqrt(longint'(i), 8);
      if (longint'(u16) != e) begin
        failures++;
        if (failures < 20) $display("FAIL 16-bit p=%0d u=%0d expected %0d", i, u16, e);
      end
    end
    for (int i = 0; i < 20002; i++) begin
      if (i == 0) x = 0;
      else if (i == 1) x = 64'hFFFF_FFFF;
      else x = longint'($urandom);
      p32 = 32'(x);
      #1;
      checks++;
      e = ref_sqrt(x, 16);
      if (longint'(u32) != e) begin
        failures++;
        if (failures < 20) $display("FAIL 32-bit p=%0d u=%0d expected %0d", x, u32, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
