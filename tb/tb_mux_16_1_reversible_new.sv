// tb_mux_16_1_reversible_new: for 300 random data words, every select value
// must route exactly bit i[s] to y.
module tb_mux_16_1_reversible_new;
  logic [15:0] i;
  logic [3:0]  s;
  logic        y;
  int checks = 0, failures = 0;

  mux_16_1_reversible_new dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [15:0] word;
      word = (n == 0) ? 16'h0001 : (n == 1) ? 16'hfffe : 16'($urandom);
      for (int sel = 0; sel < 16; sel++) begin
        i = word; s = 4'(sel);
        #1;
        checks++;
        if (y !== word[sel]) begin
          failures++;
          $display("FAIL i=%h s=%0d y=%b", word, sel, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
