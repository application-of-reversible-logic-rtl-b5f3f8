// tb_gcd_processor: 400 GCD runs (corner pairs with zeros, equal and coprime
// operands, then random pairs). Each result is compared with Euclid's
// algorithm by remainder, and the number of cycles from start to done with a
// count of the subtract-compare-swap steps worked out in the testbench.
module tb_gcd_processor;
  logic       clk = 0, rst, start, done;
  logic [7:0] a_in, b_in, gcd;
  int checks = 0, failures = 0;

  gcd_processor dut (.*);

  always #5 clk = ~clk;

  function automatic int euclid(input int x, input int y);
    while (y != 0) begin
      automatic int t = x % y;
      x = y; y = t;
    end
    return x;
  endfunction

  // cycles from the edge that samples start to the edge that enters DONE:
  // LOAD, TEST, then per step SWAP+SUB+TEST or SUB+TEST, ending in DONE
  function automatic int expected_cycles(input int x, input int y);
    int n = 2;
    while (y != 0) begin
      if (x < y) begin
        automatic int t = x; x = y; y = t;
        n += 1;
      end
      x = x - y;
      n += 2;
    end
    return n + 1;
  endfunction

  task automatic run(input logic [7:0] x, input logic [7:0] y);
    int cycles = 0;
    @(negedge clk);
    a_in = x; b_in = y; start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done || cycles == 1) begin
      @(posedge clk);
      cycles++;
      #1;
      if (cycles > 2000) break;
    end
    checks++;
    if (int'(gcd) != euclid(int'(x), int'(y))) begin
      failures++;
      $display("FAIL gcd(%0d,%0d) = %0d, got %0d", x, y, euclid(int'(x), int'(y)), gcd);
    end
    checks++;
    if (cycles != expected_cycles(int'(x), int'(y))) begin
      failures++;
      $display("FAIL gcd(%0d,%0d) took %0d cycles, expected %0d", x, y, cycles,
               expected_cycles(int'(x), int'(y)));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; a_in = 0; b_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    run(48, 18); run(18, 48); run(0, 0); run(0, 7); run(7, 0); run(13, 13);
    run(255, 1); run(1, 255); run(255, 254); run(128, 96);
    for (int n = 0; n < 390; n++) run(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
