// tb_reversible_wallace_tree: exhaustive check of the 8x8 reversible Wallace
// tree multiplier, all 65536 operand pairs against integer multiplication.
module tb_reversible_wallace_tree;
  logic [7:0]  a, b;
  logic [15:0] product;
  int checks = 0, failures = 0;

  reversible_wallace_tree dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (int'(product) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", x, y, x * y, product);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
