// Self-checking testbench for ys_f, the Yavadunam squarer.
// Applies every input of its range 0xF0..0xFF and compares with in * in.
// 0xF0 is the case whose deficiency square (0x100) overflows into the high
// byte; 0xFF -> 0xFE01 is the worked example.
module tb_ys_f;
  import vedic_pkg::*;

  byte_t in;
  prod_t out;
  int checks = 0, failures = 0;

  ys_f dut (.in(in), .out(out));

  initial begin
    in = 8'hFF; #1;
    checks++;
    if (out !== 16'hFE01) begin
      failures++;
      $display("FAIL worked example: out=%04h", out);
    end
    for (int i = 8'hF0; i <= 8'hFF; i++) begin
      in = byte_t'(i); #1;
      checks++;
      if (out !== prod_t'(i * i)) begin
        failures++;
        $display("FAIL in=%02h out=%04h expected=%04h", i, out, i * i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
