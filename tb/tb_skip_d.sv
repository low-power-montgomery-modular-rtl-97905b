// Testbench of the skip detector skip_d.
//
// Exhaustive over all 2^13 combinations of the low three bits of SS, SC, x and
// A(i+1), A(i+2), B0, en. The expected outputs are worked out bit by bit with
// integer additions: each column j of the carry-save adder gives
// ss_j + sc_j + x_j = s_j + 2*c_j; the next state's low bits are
// SS' = s >> 1, SC' = c; q(i+1) is the parity of SS'_0 + SC'_0 + A(i+1)*B0;
// iteration i+1 is skipped when en = 1 and A(i+1) = q(i+1) = SS'_0 = 0; then
// q^ = parity of SS'_1 + SC'_1 + A(i+2)*B0 and A^ = A(i+2), else q^ = q(i+1),
// A^ = A(i+1). The run also checks that skips and non-skips both occurred.
// A watchdog ends the run.
module tb_skip_d;
  logic clk = 1'b0;
  logic [2:0] ss_lo, sc_lo, x_lo;
  logic a1, a2, b0, en, skip, q_hat, a_hat;
  int checks = 0, failures = 0, nskip = 0;

  skip_d dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int col, s[3], c[3], ss1[2], sc1[2], q1, q2, e_skip, e_q, e_a;
    for (int v = 0; v < 8192; v++) begin
      {ss_lo, sc_lo, x_lo, a1, a2, b0, en} = 13'(v);
      #1;
      for (int j = 0; j < 3; j++) begin
        col  = int'(ss_lo[j]) + int'(sc_lo[j]) + int'(x_lo[j]);
        s[j] = col % 2;
        c[j] = col / 2;
      end
      ss1[0] = s[1]; ss1[1] = s[2];
      sc1[0] = c[0]; sc1[1] = c[1];
      q1 = (ss1[0] + sc1[0] + int'(a1) * int'(b0)) % 2;
      q2 = (ss1[1] + sc1[1] + int'(a2) * int'(b0)) % 2;
      e_skip = (en && !a1 && q1 == 0 && ss1[0] == 0) ? 1 : 0;
      e_q = e_skip ? q2 : q1;
      e_a = e_skip ? int'(a2) : int'(a1);
      checks++;
      if (int'(skip) != e_skip || int'(q_hat) != e_q || int'(a_hat) != e_a) begin
        failures++;
        $display("FAIL ss=%b sc=%b x=%b a1=%b a2=%b b0=%b en=%b: skip=%b q^=%b A^=%b",
                 ss_lo, sc_lo, x_lo, a1, a2, b0, en, skip, q_hat, a_hat);
      end
      if (skip) nskip++;
      if (v % 8 == 0) @(posedge clk);
    end
    checks++;
    if (nskip == 0 || nskip == 8192) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
