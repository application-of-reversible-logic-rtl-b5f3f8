// tb_fredkin_gate_d_latch: the latch must follow d while en is high and hold
// the last value while en is low, whatever d does; q_bar is always ~q.
// A model bit updated only while en is high is the reference.
module tb_fredkin_gate_d_latch;
  logic en, d, q, q_bar;
  logic model;
  int checks = 0, failures = 0;

  fredkin_gate_d_latch dut (.*);

  task automatic step(input logic e, input logic v);
    en = e; d = v;
    #1;
    if (e) model = v;
    checks++;
    if (q !== model || q_bar !== !model) begin
      failures++;
      $display("FAIL en=%b d=%b q=%b q_bar=%b expected %b", e, v, q, q_bar, model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(1, 0); step(1, 1); step(0, 1); step(0, 0); step(0, 1);
    step(1, 0); step(0, 1); step(0, 0); step(1, 1); step(0, 0);
    for (int n = 0; n < 2000; n++) step(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
