// Self-checking testbench for fast_mult, the table squarer for 0..16.
// Every legal index is applied and the output compared with i * i worked
// out by the testbench.
module tb_fast_mult;
  import vedic_pkg::*;

  defic_t in;
  dsq_t   out;
  int checks = 0, failures = 0;

  fast_mult dut (.in(in), .out(out));

  initial begin
    for (int i = 0; i <= 16; i++) begin
      in = defic_t'(i); #1;
      checks++;
      if (int'(out) != i * i) begin
        failures++;
        $display("FAIL in=%0d out=%0d expected=%0d", i, out, i * i);
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
