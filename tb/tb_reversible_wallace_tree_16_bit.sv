// tb_reversible_wallace_tree_16_bit: the 16x16 multiplier against integer
// multiplication: corner operands (0, 1, 255, 256, 65535 and mixes) and 30000
// random pairs.
module tb_reversible_wallace_tree_16_bit;
  logic [15:0] a, b;
  logic [31:0] product;
  int checks = 0, failures = 0;

  reversible_wallace_tree_16_bit dut (.*);

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    longint expected;
    a = x; b = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (longint'(product) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", x, y, expected, product);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] corners[7] = '{16'd0, 16'd1, 16'd255, 16'd256, 16'hff00, 16'h00ff, 16'hffff};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int n = 0; n < 30000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
