// tb_fredkin_gate: exhaustive check of the Fredkin gate: B and C are swapped
// when A = 1 and passed straight when A = 0; the number of ones is preserved.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  fredkin_gate dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] expected;
      {a, b, c} = 3'(v);
      #1;
      expected = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== expected || $countones({p, q, r}) != $countones({a, b, c})) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
