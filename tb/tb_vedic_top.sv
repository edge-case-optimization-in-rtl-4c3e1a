// End-to-end testbench for vedic_top, at its only (default) size.
//
// Sweeps all 65,536 operand pairs twice with the general multiplier model
// attached to the external port:
//   pass 0: the model returns the true product. Every p must equal a * b,
//           the path flags must be one-hot and must name the unit the
//           selection rules pick (worked out here from a and b), and the
//           operands must reach the external multiplier unchanged.
//   pass 1: the model's product is deliberately corrupted (inverted). p must
//           still be right wherever a Vedic unit or the zero bypass is
//           selected, which shows those units really compute the product,
//           and must follow the corrupted value on the general path.
// Each mechanism (zero bypass, Yavadunam square, Nikhilam on a, Nikhilam
// on b, general multiplier) is counted, and one that never occurs counts
// as a failure. The combinational result is sampled 1 time unit after the
// operands change.
module tb_vedic_top;
  import vedic_pkg::*;

  typedef enum int {P_ZERO, P_YS, P_NS_B, P_NS_A, P_GEN, P_COUNT} path_e;

  byte_t a, b, mult_a, mult_b;
  prod_t p, model_p, mult_p;
  logic  path_zero, path_ys, path_ns_b, path_ns_a, path_general;
  logic  corrupt;
  int checks = 0, failures = 0;
  int seen [P_COUNT];

  vedic_top dut (
    .a, .b, .p,
    .mult_a, .mult_b, .mult_p,
    .path_zero, .path_ys, .path_ns_b, .path_ns_a, .path_general
  );

  mult_gen_0 ip (.A(mult_a), .B(mult_b), .P(model_p));
  assign mult_p = corrupt ? ~model_p : model_p;

  function automatic path_e expected_path(byte_t x, byte_t y);
    if (x == 0 || y == 0)                 return P_ZERO;
    if (x == y && x >= 8'hF0)             return P_YS;
    if (x == 8'hFF)                       return P_NS_B;
    if (y == 8'hFF)                       return P_NS_A;
    return P_GEN;
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 20)
      $display("FAIL %s: a=%02h b=%02h p=%04h corrupt=%0b", what, a, b, p, corrupt);
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int pass = 0; pass < 2; pass++) begin
      corrupt = (pass == 1);
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          path_e exp_path;
          prod_t exp_p;
          logic [4:0] flags;
          a = byte_t'(i);
          b = byte_t'(j);
          #1;
          exp_path = expected_path(a, b);
          exp_p = prod_t'(i * j);
          if (corrupt && exp_path == P_GEN) exp_p = ~exp_p;
          flags = {path_zero, path_ys, path_ns_b, path_ns_a, path_general};

          checks++;
          if (p !== exp_p) fail($sformatf("product, expected %04h", exp_p));
          checks++;
          if (!$onehot(flags)) fail("path flags not one-hot");
          checks++;
          if (flags !== (5'b10000 >> int'(exp_path))) fail($sformatf("path %s", exp_path.name()));
          if (pass == 0) begin
            checks++;
            if (mult_a !== a || mult_b !== b) fail("operands to external multiplier");
            seen[exp_path]++;
          end
        end
      end
    end
    for (int k = 0; k < P_COUNT; k++) begin
      $display("mechanism %s occurred %0d times", path_e'(k), seen[k]);
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", path_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
