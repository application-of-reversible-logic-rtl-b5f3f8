// tb_ripple_reversible: exhaustive check of the 4-bit HNG ripple-carry adder
// against integer addition, all 512 combinations of a, b and cin.
module tb_ripple_reversible;
  logic [3:0] a, b, sum;
  logic       cin, co;
  int checks = 0, failures = 0;

  ripple_reversible dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int expected;
      {cin, a, b} = 9'(v);
      #1;
      expected = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({co, sum} !== 5'(expected)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d, got %0d", a, b, cin, expected, {co, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
