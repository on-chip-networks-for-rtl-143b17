// tb_negedge_retimer: the retimer must clear on reset, keep its output
// unchanged across a rising clock edge (the hold-time guarantee) and take
// the input value at the following falling edge, so a value launched at one
// rising edge is available to the receiver at the next one.
module tb_negedge_retimer;
  localparam int W = 16;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [W-1:0] d = '0, q;

  negedge_retimer #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] old;

  initial begin
    d = 16'hffff;
    #1 rst_n = 0;
    #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    @(posedge clk); @(posedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL changed during reset"); end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      old = q;
      d <= W'($urandom);          // launched at the rising edge
      #1;
      checks++;
      if (q !== old) begin failures++; $display("FAIL output moved at the rising edge"); end
      @(negedge clk); #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL q %h expected %h after the falling edge", q, d); end
    end
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
