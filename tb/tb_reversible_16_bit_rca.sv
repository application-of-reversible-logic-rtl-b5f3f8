// tb_reversible_16_bit_rca: the 16-bit reversible adder against integer
// addition: corner cases (all carries rippling, zero, maximum) and 20000
// random operand pairs.
module tb_reversible_16_bit_rca;
  logic [15:0] a, b, sum;
  logic        cin, co;
  int checks = 0, failures = 0;

  reversible_16_bit_rca dut (.*);

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic ci);
    longint expected;
    a = x; b = y; cin = ci;
    #1;
    expected = longint'(x) + longint'(y) + longint'(ci);
    checks++;
    if ({co, sum} !== 17'(expected)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d = %0d, got %0d", x, y, ci, expected, {co, sum});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h0fff, 16'h0001, 1'b0);
    for (int n = 0; n < 20000; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
