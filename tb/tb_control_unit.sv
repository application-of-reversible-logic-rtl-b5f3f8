// tb_control_unit: drives the GCD control unit's status inputs by script and
// checks the controls after every rising edge: reset to idle, start -> ld,
// a compare that swaps, one that subtracts, Y == 0 -> done held until the next
// start, and a synchronous reset from the middle of a run.
module tb_control_unit;
  import gcd_pkg::*;
  logic clk = 0, rst, start, y_zero, x_lt_y;
  logic ld, swap, sub, done;
  gcd_state_e state;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // apply inputs in the low phase, then check the controls after the edge
  task automatic cycle(input logic r, input logic st, input logic yz, input logic lt,
                       input logic [3:0] expected, input string what);
    @(negedge clk);
    rst = r; start = st; y_zero = yz; x_lt_y = lt;
    @(posedge clk);
    #1;
    checks++;
    if ({ld, swap, sub, done} !== expected) begin
      failures++;
      $display("FAIL %s: controls=%b expected %b (state %0d)", what, {ld, swap, sub, done},
               expected, state);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cycle(1, 0, 0, 0, 4'b0000, "reset");
    cycle(0, 0, 0, 0, 4'b0000, "idle without start");
    cycle(0, 1, 0, 0, 4'b1000, "start -> load");
    cycle(0, 0, 0, 1, 4'b0000, "load -> test");
    cycle(0, 0, 0, 1, 4'b0100, "test, X<Y -> swap");
    cycle(0, 0, 0, 0, 4'b0010, "swap -> sub");
    cycle(0, 0, 0, 0, 4'b0000, "sub -> test");
    cycle(0, 0, 0, 0, 4'b0010, "test, X>=Y -> sub");
    cycle(0, 0, 1, 0, 4'b0000, "sub -> test");
    cycle(0, 0, 1, 0, 4'b0001, "test, Y==0 -> done");
    cycle(0, 0, 0, 1, 4'b0001, "done holds");
    cycle(0, 1, 0, 0, 4'b1000, "restart from done");
    cycle(0, 0, 0, 0, 4'b0000, "load -> test");
    cycle(1, 0, 0, 0, 4'b0000, "reset mid-run");
    cycle(0, 0, 0, 0, 4'b0000, "idle after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
