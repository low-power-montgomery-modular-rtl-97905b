// Testbench of the control part mm_ctrl (K = 16).
//
// A small environment stands in for the datapath: Zero_D reports SC = 0 after
// a chosen number of half-adder passes in the precomputation and in the
// conversion, and Skip_D asks for a random skip whenever skipping is enabled.
// For each run the testbench follows the iteration index itself (+1, or +2 on
// a skip) and checks: the number of precompute passes, that pre_done comes
// once, the number of iterations and that the loop ends after iteration K+1
// (or after K when K+1 is skipped), that alpha is high exactly in the loop,
// that skipping is never enabled for a nonexistent iteration, the number of
// conversion passes (one extra when a skip is pending and SC is already zero),
// the done pulse and busy. A watchdog ends the run.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int unsigned K = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic sc_zero, skip_nx, skip_r = 1'b0;
  ctl_t ctl;
  logic busy, done;
  int   checks = 0, failures = 0;

  int   zero_left = 0, conv_target = 0;
  logic skip_rand = 1'b0;
  int   n_pre, n_pre_done, n_loop, n_conv, n_finish, n_done, n_alpha_bad, n_en_bad, n_last;
  int   idx, exp_loop, n_skip_total = 0, n_pend_total = 0;
  bit   in_loop, ended;

  mm_ctrl #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  assign sc_zero = (zero_left == 0);
  assign skip_nx = skip_rand & ctl.skip_en;

  // environment and observers
  always @(posedge clk) begin
    if (ctl.load)      in_loop <= 1'b0;
    if (ctl.pre_step)  begin n_pre++; zero_left <= zero_left - 1; end
    if (ctl.pre_done)  begin n_pre_done++; zero_left <= conv_target; idx = 0; end
    if (ctl.alpha != ctl.loop_step) n_alpha_bad++;
    if (ctl.loop_step) begin
      n_loop++;
      if (ctl.skip_en != (idx <= int'(K))) n_en_bad++;
      if (ctl.loop_last != (idx == int'(K) + 1 || (idx == int'(K) && skip_nx))) n_last++;
      if (skip_nx) n_skip_total++;
      idx += skip_nx ? 2 : 1;
      skip_r <= skip_nx;
      if (ctl.loop_last && skip_nx) n_pend_total++;
    end
    if (ctl.conv_step) begin
      n_conv++;
      skip_r <= 1'b0;
      if (zero_left > 0) zero_left <= zero_left - 1;
    end
    if (ctl.finish) n_finish++;
    if (done) n_done++;
    skip_rand <= 1'($urandom % 3 == 0);
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int pre_passes, int conv_passes);
    int cyc;
    n_pre = 0; n_pre_done = 0; n_loop = 0; n_conv = 0; n_finish = 0; n_done = 0;
    n_alpha_bad = 0; n_en_bad = 0; n_last = 0;
    @(negedge clk);
    zero_left = pre_passes;
    conv_target = conv_passes;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check("busy after start", busy);
    cyc = 0;
    while (!done && cyc < 10 * K) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check($sformatf("pre passes %0d exp %0d", n_pre, pre_passes), n_pre == pre_passes);
    check("one pre_done", n_pre_done == 1);
    check($sformatf("loop ended at index %0d", idx), idx == int'(K) + 2);
    check("alpha only in loop", n_alpha_bad == 0);
    check("skip enable", n_en_bad == 0);
    check("loop_last", n_last == 0);
    check("one finish", n_finish == 1);
    check("one done pulse", n_done == 1);
    check("idle after done", !busy);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int cp, pend_before;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("idle after reset", !busy && !done);
    for (int t = 0; t < 300; t++) begin
      cp = int'($urandom % 5);
      pend_before = n_pend_total;
      run(int'($urandom % 6), cp);
      // a pending skip with SC already zero still needs one conversion pass
      if (n_pend_total != pend_before && cp == 0)
        check($sformatf("conv passes %0d exp 1", n_conv), n_conv == 1);
      else
        check($sformatf("conv passes %0d exp %0d", n_conv, cp), n_conv == cp);
    end
    check("skips seen", n_skip_total > 0);
    check("skip pending into conversion seen", n_pend_total > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
