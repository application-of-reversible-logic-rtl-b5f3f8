// tb_hng_gate: exhaustive check of the HNG gate against its truth table,
// worked out arithmetically: R is the parity of a, b, c and S is the carry of
// a + b + c, complemented when d = 1.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  hng_gate dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {a, b, c, d} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== logic'(total % 2) || s !== logic'((total >= 2) != d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
