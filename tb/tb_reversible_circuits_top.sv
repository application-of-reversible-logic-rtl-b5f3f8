// tb_reversible_circuits_top: end-to-end test of the top at its default
// parameters. Every circuit is exercised through the top's own ports against
// independently computed results: adder sums (with and without carry-out),
// 16x16 products, mux selections, the D flip-flop, and GCD runs. It counts how
// often each mechanism occurred (adder carry-out, multiplier product above 16
// bits, every mux select value, flip-flop hold while d toggles, GCD swap, GCD
// subtract, GCD Y == 0 at load, restart from DONE, synchronous reset) and
// counts a failure for any that never happened.
module tb_reversible_circuits_top;
  logic [15:0] add_a, add_b, add_sum;
  logic        add_cin, add_co;
  logic [15:0] mul_a, mul_b;
  logic [31:0] mul_product;
  logic [15:0] mux_i;
  logic [3:0]  mux_s;
  logic        mux_y;
  logic        clk = 0, dff_d, dff_q, dff_q_bar;
  logic        rst, gcd_start, gcd_done;
  logic [7:0]  gcd_a, gcd_b, gcd_result;

  int checks = 0, failures = 0;
  int n_carry = 0, n_wide_product = 0, n_dff_hold = 0;
  int n_swap = 0, n_sub = 0, n_yzero_load = 0, n_restart = 0, n_reset = 0;
  int mux_sel_seen [16];

  reversible_circuits_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters from the GCD controls, observed through the hierarchy
  always @(posedge clk) begin
    if (dut.u_gcd.swap) n_swap++;
    if (dut.u_gcd.sub)  n_sub++;
  end

  function automatic int euclid(input int x, input int y);
    while (y != 0) begin
      automatic int t = x % y;
      x = y; y = t;
    end
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic gcd_run(input logic [7:0] x, input logic [7:0] y);
    int guard = 0;
    if (gcd_done) n_restart++;
    if (y == 0) n_yzero_load++;
    @(negedge clk);
    gcd_a = x; gcd_b = y; gcd_start = 1;
    @(negedge clk);
    gcd_start = 0;
    while (!gcd_done && guard < 2000) begin
      @(negedge clk);
      guard++;
    end
    check(int'(gcd_result) == euclid(int'(x), int'(y)),
          $sformatf("gcd(%0d,%0d) = %0d, got %0d", x, y, euclid(int'(x), int'(y)), gcd_result));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; gcd_start = 0; gcd_a = 0; gcd_b = 0; dff_d = 0;
    add_a = 0; add_b = 0; add_cin = 0; mul_a = 0; mul_b = 0; mux_i = 0; mux_s = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // combinational circuits, 3000 random vectors
    for (int n = 0; n < 3000; n++) begin
      longint sum_ref, prod_ref;
      add_a = 16'($urandom); add_b = 16'($urandom); add_cin = 1'($urandom);
      mul_a = 16'($urandom); mul_b = 16'($urandom);
      mux_i = 16'($urandom); mux_s = 4'($urandom);
      #1;
      sum_ref  = longint'(add_a) + longint'(add_b) + longint'(add_cin);
      prod_ref = longint'(mul_a) * longint'(mul_b);
      check({add_co, add_sum} == 17'(sum_ref), "adder");
      check(longint'(mul_product) == prod_ref, "multiplier");
      check(mux_y == mux_i[mux_s], "mux");
      if (add_co) n_carry++;
      if (prod_ref >= 65536) n_wide_product++;
      mux_sel_seen[mux_s]++;
    end

    // D flip-flop: d sampled at rising edges, held while d toggles
    for (int n = 0; n < 200; n++) begin
      logic v;
      @(negedge clk);
      v = 1'($urandom);
      dff_d = v;
      @(posedge clk);
      #1 dff_d = !v;
      #2 check(dff_q == v && dff_q_bar == !v, "dff after edge");
      @(negedge clk);
      #1 check(dff_q == v, "dff hold");
      n_dff_hold++;
    end

    // GCD processor
    gcd_run(48, 18);
    gcd_run(9, 0);
    gcd_run(21, 56);
    for (int n = 0; n < 100; n++) gcd_run(8'($urandom), 8'($urandom));
    // synchronous reset from the middle of a run, then a clean run
    @(negedge clk);
    gcd_a = 200; gcd_b = 3; gcd_start = 1;
    @(negedge clk) gcd_start = 0;
    repeat (5) @(negedge clk);
    rst = 1;
    @(negedge clk) rst = 0;
    check(!gcd_done && dut.u_gcd.u_ctrl.state == gcd_pkg::S_IDLE, "reset to idle");
    n_reset++;
    gcd_run(100, 75);

    check(n_carry > 0, "adder carry-out never happened");
    check(n_wide_product > 0, "no product above 16 bits");
    for (int s = 0; s < 16; s++) check(mux_sel_seen[s] > 0, $sformatf("mux select %0d never used", s));
    check(n_dff_hold > 0, "flip-flop hold never tested");
    check(n_swap > 0, "GCD swap never happened");
    check(n_sub > 0, "GCD subtract never happened");
    check(n_yzero_load > 0, "GCD with Y == 0 never run");
    check(n_restart > 0, "GCD restart from DONE never happened");
    check(n_reset > 0, "GCD reset never happened");
    $display("mechanisms: carry=%0d wide_product=%0d dff_hold=%0d swap=%0d sub=%0d yzero=%0d restart=%0d reset=%0d",
             n_carry, n_wide_product, n_dff_hold, n_swap, n_sub, n_yzero_load, n_restart, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
