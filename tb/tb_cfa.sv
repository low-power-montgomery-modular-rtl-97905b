// Testbench of the configurable full-adder cell cfa.
//
// Exhaustive over all 32 input combinations. Full-adder mode (alpha = 1) must
// give a + b + c = s + 2*co; half-adder mode (alpha = 0) must give
// a + b = c1_out*2 + (a^b) and (a^b) + c1_in = s + 2*co, ignoring c. The
// expected values are computed with integer additions. A watchdog ends the run.
module tb_cfa;
  logic clk = 1'b0;
  logic a, b, c, alpha, c1_in, c1_out, s, co;
  int checks = 0, failures = 0;

  cfa dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int unsigned sum, exp_s, exp_co;
    for (int v = 0; v < 32; v++) begin
      {alpha, a, b, c, c1_in} = 5'(v);
      @(posedge clk);
      if (alpha) sum = int'(a) + int'(b) + int'(c);
      else       sum = int'(a ^ b) + int'(c1_in);
      exp_s  = sum % 2;
      exp_co = sum / 2;
      checks++;
      if (s != exp_s[0] || co != exp_co[0]) begin
        failures++;
        $display("FAIL sum/carry: alpha=%b a=%b b=%b c=%b c1_in=%b -> s=%b co=%b", alpha, a, b, c, c1_in, s, co);
      end
      checks++;
      if (c1_out != (a & b)) begin
        failures++;
        $display("FAIL c1_out: a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
