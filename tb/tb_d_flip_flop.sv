// tb_d_flip_flop: q must take the value d had at each rising clk edge and keep
// it through the cycle although d toggles while clk is high and while it is
// low; q_bar must be ~q.
module tb_d_flip_flop;
  logic clk = 0, d, q, q_bar;
  logic model;
  int checks = 0, failures = 0;
  int cycles = 0;

  d_flip_flop dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    for (int n = 0; n < 2000; n++) begin
      logic v;
      v = 1'($urandom);
      // set d in the low phase, then flip it after the edge and again
      d = v;
      @(posedge clk);
      model = v;
      #1 d = !v;
      #2 begin
        checks++;
        if (q !== model || q_bar !== !model) begin
          failures++;
          $display("FAIL cycle %0d q=%b q_bar=%b expected %b", n, q, q_bar, model);
        end
      end
      @(negedge clk);
      d = 1'($urandom);
      #2 begin
        checks++;
        if (q !== model) begin
          failures++;
          $display("FAIL hold in low phase, cycle %0d q=%b expected %b", n, q, model);
        end
      end
      cycles++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
