// tb_prng: checks the router random source against an independent bit-level
// model of the same feedback polynomial (x^32 + x^22 + x^2 + x + 1, Galois
// form), that a zero seed is replaced by 1, that the state is never zero and
// that no state repeats within the first 200000 steps.
module tb_prng;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] seed, rnd;

  prng dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model;
  bit seen[logic [31:0]];

  // shift right; when the bit shifted out is 1, flip taps 31, 21, 1 and 0
  function automatic logic [31:0] step(logic [31:0] s);
    logic out;
    logic [31:0] n;
    out = s[0];
    n = {1'b0, s[31:1]};
    if (out) begin n[31] = ~n[31]; n[21] = ~n[21]; n[1] = ~n[1]; n[0] = ~n[0]; end
    return n;
  endfunction

  initial begin
    seed = 32'd0;
    #1 rst_n = 0;
    @(posedge clk); #1;
    checks++; if (rnd !== 32'd1) begin failures++; $display("FAIL zero seed gives %h", rnd); end
    seed = 32'hdead_beef;
    @(posedge clk); #1;
    checks++; if (rnd !== 32'hdead_beef) begin failures++; $display("FAIL seed not loaded: %h", rnd); end
    rst_n = 1;
    model = 32'hdead_beef;
    for (int i = 0; i < 200000; i++) begin
      @(posedge clk); #1;
      model = step(model);
      checks++;
      if (rnd !== model || rnd == 0 || seen.exists(rnd)) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d: %h expected %h", i, rnd, model);
      end
      seen[rnd] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
