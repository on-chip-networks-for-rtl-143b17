// tb_ban_arbiter: checks the link split chosen from the two pressures.
// Expected splits are NLINK * pa / (pa + pb) rounded, clamped to 1..NLINK-1
// when both sides wait, all links to the only waiting side, unchanged when
// neither waits; with PERIOD = 3 the split may change only every third cycle.
module tb_ban_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] pa, pb;
  logic [2:0] n1, n3;
  logic [3:0] d1, d3;

  ban_arbiter #(.NLINK(4), .PMAX(8), .PERIOD(1)) u1 (.clk, .rst_n, .press_a(pa), .press_b(pb), .n_ab(n1), .dir(d1));
  ban_arbiter #(.NLINK(4), .PMAX(8), .PERIOD(3)) u3 (.clk, .rst_n, .press_a(pa), .press_b(pb), .n_ab(n3), .dir(d3));

  int checks = 0, failures = 0;

  function automatic int model(int a, int b, int prev);
    real r;
    int k;
    if (a == 0 && b == 0) return prev;
    if (b == 0) return 4;
    if (a == 0) return 0;
    r = 4.0 * a / (a + b);
    k = int'($floor(r + 0.5));
    if (k < 1) k = 1;
    if (k > 3) k = 3;
    return k;
  endfunction

  task automatic apply(int a, int b);
    int prev, e;
    prev = int'(n1);
    pa = 4'(a); pb = 4'(b);
    @(posedge clk); #1;
    e = model(a, b, prev);
    checks++;
    if (int'(n1) != e) begin failures++; $display("FAIL pa=%0d pb=%0d n_ab=%0d expected %0d", a, b, n1, e); end
    checks++;
    if (d1 != 4'((1 << int'(n1)) - 1)) begin failures++; $display("FAIL dir %b for n_ab %0d", d1, n1); end
  endtask

  initial begin
    pa = 0; pb = 0;
    @(posedge clk); #1;
    checks++; if (n1 != 2) begin failures++; $display("FAIL reset split %0d", n1); end
    rst_n = 1;
    apply(8, 1);          // the four-link example: three and one
    apply(0, 3);
    apply(0, 0);          // keep
    apply(2, 2);
    apply(1, 7);
    apply(5, 0);
    apply(0, 0);
    for (int i = 0; i < 200; i++) apply($urandom_range(8), $urandom_range(8));

    // PERIOD = 3: n3 changes at most once every three cycles
    begin
      int changes, last, since;
      changes = 0; last = int'(n3); since = 3;
      for (int i = 0; i < 60; i++) begin
        pa = (i % 2) ? 4'd8 : 4'd0; pb = (i % 2) ? 4'd0 : 4'd8;
        @(posedge clk); #1;
        since++;
        if (int'(n3) != last) begin
          checks++;
          if (since < 3) begin failures++; $display("FAIL period-3 arbiter changed after %0d cycles", since); end
          changes++; since = 0; last = int'(n3);
        end
      end
      checks++;
      if (changes == 0) begin failures++; $display("FAIL period-3 arbiter never changed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
