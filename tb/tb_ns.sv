// Self-checking testbench for ns, the Nikhilam multiplier by 0xFF.
// Sweeps all 256 inputs. For inputs 1..255 the output must equal in * 255;
// for input 0 the described rule (decrement, XOR with 0xFF) gives 0xFF00,
// which is checked as such because the block is defined by that rule.
// The worked example 0x23 -> 0x22DD is checked on its own as well.
module tb_ns;
  import vedic_pkg::*;

  byte_t in;
  prod_t out;
  int checks = 0, failures = 0;

  ns dut (.in(in), .out(out));

  task automatic check(input prod_t expected, input string what);
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL %s: in=%02h out=%04h expected=%04h", what, in, out, expected);
    end
  endtask

  initial begin
    in = 8'h23; #1;
    check(16'h22DD, "worked example");
    for (int i = 0; i < 256; i++) begin
      in = byte_t'(i); #1;
      if (i == 0) check(16'hFF00, "zero input wraps");
      else        check(prod_t'(i * 255), "product");
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
