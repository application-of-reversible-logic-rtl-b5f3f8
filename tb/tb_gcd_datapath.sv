// tb_gcd_datapath: load, swap and subtract operations on the 8-bit datapath,
// checking X and the flags against a model pair of registers; 2000 random
// legal operations (subtract only when X >= Y).
module tb_gcd_datapath;
  logic       clk = 0;
  logic [7:0] a_in, b_in, x;
  logic       ld, swap, sub, y_zero, x_lt_y;
  logic [7:0] mx, my;
  int checks = 0, failures = 0;

  gcd_datapath dut (.*);

  always #5 clk = ~clk;

  task automatic check_state(input string what);
    checks++;
    if (x !== mx || y_zero !== (my == 0) || x_lt_y !== (mx < my)) begin
      failures++;
      $display("FAIL %s: x=%0d yz=%b lt=%b model x=%0d y=%0d", what, x, y_zero, x_lt_y, mx, my);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; swap = 0; sub = 0; a_in = 0; b_in = 0;
    for (int n = 0; n < 2000; n++) begin
      int op;
      @(negedge clk);
      op = (n % 16 == 0) ? 0 : int'($urandom_range(3));
      ld = 0; swap = 0; sub = 0;
      if (op == 0) begin
        ld = 1; a_in = 8'($urandom); b_in = 8'($urandom);
        if (n % 3 == 0) b_in = 0;
      end else if (op == 1) swap = 1;
      else if (op == 2 && !(mx < my)) sub = 1;
      @(posedge clk);
      if (ld) begin mx = a_in; my = b_in; end
      else if (swap) begin automatic logic [7:0] t = mx; mx = my; my = t; end
      else if (sub) mx = mx - my;
      #1 check_state(ld ? "load" : swap ? "swap" : sub ? "sub" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
