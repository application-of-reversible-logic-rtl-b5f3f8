// tb_ff_unit: the 3-bit state register must present at q, for a whole cycle,
// the word d held at the last rising edge of clk.
module tb_ff_unit;
  logic       clk = 0;
  logic [2:0] d, q, model;
  int checks = 0, failures = 0;

  ff_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      d = 3'($urandom);
      @(posedge clk);
      model = d;
      #1 d = ~d;
      #3 begin
        checks++;
        if (q !== model) begin
          failures++;
          $display("FAIL q=%b expected %b", q, model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
