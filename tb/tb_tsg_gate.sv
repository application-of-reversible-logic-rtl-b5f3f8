// tb_tsg_gate: exhaustive check of the TSG gate. For C = 0 the sum and carry
// outputs are compared with a + b + d; for all inputs Q, R and S are compared
// with the gate equations evaluated case by case.
module tb_tsg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  tsg_gate dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eq, er, es;
      {a, b, c, d} = 4'(v);
      #1;
      // Q is b when a and c are both 0, otherwise its complement
      eq = (!a && !c) ? b : !b;
      er = eq != d;
      es = (eq && d) != ((a && b) != c);
      checks++;
      if (p !== a || q !== eq || r !== er || s !== es) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      if (!c) begin
        automatic int total = int'(a) + int'(b) + int'(d);
        checks++;
        if (r !== logic'(total % 2) || s !== logic'(total / 2)) begin
          failures++;
          $display("FAIL full adder a=%b b=%b d=%b sum=%b carry=%b", a, b, d, r, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
