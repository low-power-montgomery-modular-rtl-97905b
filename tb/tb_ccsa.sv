// Testbench of the configurable carry-save adder row ccsa (W = 64).
//
// Random words (kept below 2^(W-1) so no sum reaches 2^W) plus directed
// all-ones carry chains. In full-adder mode s + 2*co must equal ss + sc + x; in
// two-half-adder mode s + 2*co must equal ss + sc whatever x is, and the carry
// of ss = 2^j - 1, sc = 1 must have moved two places in one pass. Expected values
// use ordinary binary addition. A watchdog ends the run.
module tb_ccsa;
  localparam int unsigned W = 64;
  logic clk = 1'b0;
  logic [W-1:0] ss, sc, x, s, co;
  logic alpha;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom} >> 1;
  endfunction

  task automatic apply(logic [W-1:0] vss, logic [W-1:0] vsc, logic [W-1:0] vx, logic m);
    logic [W+1:0] expv, got;
    ss = vss; sc = vsc; x = vx; alpha = m;
    @(posedge clk);
    expv = (W+2)'(vss) + (W+2)'(vsc) + (m ? (W+2)'(vx) : '0);
    got  = (W+2)'(s) + ((W+2)'(co) << 1);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL alpha=%b ss=%h sc=%h x=%h: s=%h co=%h", m, vss, vsc, vx, s, co);
    end
  endtask

  initial begin : stim
    for (int t = 0; t < 2000; t++) apply(rnd(), rnd(), rnd(), t[0]);
    // a carry chain: in 2H mode both half-adder stages act in one pass
    for (int j = 2; j < W - 1; j++) begin
      apply((W'(1) << j) - 1, W'(1), rnd(), 1'b0);
      checks++;
      if (co != W'(2) || s != (W'(1) << j) - 4) begin
        failures++;
        $display("FAIL chain j=%0d: s=%h co=%h", j, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
