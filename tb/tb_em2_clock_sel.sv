// tb_em2_clock_sel: runs the three clock sources at different periods
// (single-ended 10 ns, differential 14 ns, PLL 6 ns), steps the select
// through 0, 1, 2, 3, 0 and measures the output period after each switch.
// A switch requested while the output is high must not end that high phase
// early: the output stays on the old source until its falling edge.
module tb_em2_clock_sel;
  logic rst_n = 0, clk_se = 0, clk_diff = 0, clk_pll = 0, clk_out;
  logic [1:0] sel = 2'd0;
  always #5 clk_se   = ~clk_se;
  always #7 clk_diff = ~clk_diff;
  always #3 clk_pll  = ~clk_pll;

  em2_clock_sel dut (.*);

  int checks = 0, failures = 0;
  int edges = 0;
  time t_rise;
  always @(posedge clk_out) edges++;

  task automatic measure(int expect_ns);
    int e0, per;
    #200;                 // let the switch settle
    e0 = edges;
    #840;                 // a multiple of 10, 14 and 6 ns
    per = 840 / (edges - e0);
    checks++;
    if (per != expect_ns) begin
      failures++; $display("FAIL sel %0d: period %0d ns expected %0d", sel, per, expect_ns);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    measure(10);
    sel = 2'd1; measure(14);
    sel = 2'd2; measure(6);
    sel = 2'd3; measure(6);
    // request single-ended while the PLL output is high
    @(posedge clk_out);
    t_rise = $time;
    #1;
    sel = 2'd0;
    @(negedge clk_out);
    checks++;
    if ($time - t_rise != 3) begin
      failures++; $display("FAIL high phase after the request lasted %0t, expected one PLL half period", $time - t_rise);
    end
    measure(10);
    // reset returns to the single-ended input
    sel = 2'd2; measure(6);
    rst_n = 0; #20;
    rst_n = 1; measure(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
