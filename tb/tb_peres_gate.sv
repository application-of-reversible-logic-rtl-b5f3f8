// tb_peres_gate: exhaustive check of the Peres gate; with C = 0 it must be a
// half adder (Q = sum, R = carry of a + b).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  peres_gate dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if (p !== a || q !== logic'(total % 2) || r !== logic'((total / 2) != int'(c))) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
