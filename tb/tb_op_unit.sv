// tb_op_unit: each of the six states must raise exactly its own control
// (none in IDLE).
module tb_op_unit;
  import gcd_pkg::*;
  gcd_state_e state;
  logic ld, swap, sub, done;
  int checks = 0, failures = 0;

  op_unit dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] expected [6] = '{4'b0000, 4'b1000, 4'b0000, 4'b0100, 4'b0010, 4'b0001};
    for (int s = 0; s < 6; s++) begin
      state = gcd_state_e'(s);
      #1;
      checks++;
      if ({ld, swap, sub, done} !== expected[s]) begin
        failures++;
        $display("FAIL state=%0d controls=%b expected %b", s, {ld, swap, sub, done}, expected[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
