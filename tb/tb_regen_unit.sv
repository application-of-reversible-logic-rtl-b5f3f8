// tb_regen_unit: every state code against every combination of rst, start,
// y_zero and x_lt_y, compared with the transition table of the GCD controller
// written out here as nested conditions.
module tb_regen_unit;
  import gcd_pkg::*;
  logic rst, start, y_zero, x_lt_y;
  gcd_state_e state, next_state;
  int checks = 0, failures = 0;

  regen_unit dut (.*);

  function automatic logic [2:0] reference(input logic [2:0] s, input logic r, input logic st,
                                           input logic yz, input logic lt);
    if (r) return 3'd0;
    if (s == 3'd0) return st ? 3'd1 : 3'd0;          // idle
    if (s == 3'd1) return 3'd2;                       // load -> test
    if (s == 3'd2) begin                              // test
      if (yz) return 3'd5;
      return lt ? 3'd3 : 3'd4;
    end
    if (s == 3'd3) return 3'd4;                       // swap -> sub
    if (s == 3'd4) return 3'd2;                       // sub -> test
    if (s == 3'd5) return st ? 3'd1 : 3'd5;           // done
    return 3'd0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic [2:0] code;
      {code, rst, start, y_zero, x_lt_y} = 7'(v);
      state = gcd_state_e'(code);
      #1;
      checks++;
      if (3'(next_state) !== reference(code, rst, start, y_zero, x_lt_y)) begin
        failures++;
        $display("FAIL state=%0d rst=%b start=%b yz=%b lt=%b -> %0d", code, rst, start,
                 y_zero, x_lt_y, next_state);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
