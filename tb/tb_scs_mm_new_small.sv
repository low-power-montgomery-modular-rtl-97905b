// End-to-end testbench of the carry-save Montgomery multiplier, at a small operand size (K = 8) with many random products.
//
// Runs directed and random multiplications (A, B < 2N, N odd), plus chained
// products where each result is fed back as the next operand. Each result is
// compared with the plain binary Montgomery recurrence and checked to satisfy
// S * 2^(K+2) = A * B (mod N) and S < 2N. The number of clock cycles from the
// start edge to done is compared with a word-level model of the carry-save
// schedule. The mechanisms of the design are counted and each must occur:
// B+N half-adder passes, full-adder iterations with each of the four x
// selections, skipped iterations, a skip of the last iteration pending into the
// conversion, and conversion passes. A watchdog ends the run if done never comes.
module tb_scs_mm_new_small;
  import mm_ref_pkg::*;

  localparam int unsigned K = 8;
  localparam int NRAND = 3000;
  typedef mm_ref#(K) ref_t;
  typedef ref_t::wide_t wide_t;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K:0]   a, b;
  logic [K-1:0] n;
  logic         busy, done;
  logic [K:0]   s;

  int checks = 0, failures = 0;
  int cnt_pre = 0, cnt_iter = 0, cnt_skip = 0, cnt_conv = 0, cnt_skip_last = 0;
  int cnt_sel[4] = '{0, 0, 0, 0};
  int n_ops = 0, lat_sum = 0, lat_max = 0, pre_sum = 0, loop_sum = 0, conv_sum = 0;

  scs_mm_new #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  // mechanism counters, from the datapath strobes
  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.pre_step)  cnt_pre++;
    if (dut.ctl.conv_step) cnt_conv++;
    if (dut.ctl.loop_step) begin
      cnt_iter++;
      cnt_sel[{dut.ah_r, dut.qh_r}]++;
      if (dut.skip_nx) cnt_skip++;
      if (dut.skip_nx && dut.ctl.loop_last) cnt_skip_last++;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(wide_t av, wide_t bv, wide_t nv, output wide_t res);
    wide_t exp_s;
    int pre, loop, conv, skips, lat;
    bit sl;
    exp_s = ref_t::mont(av, bv, nv);
    ref_t::cycles(av, bv, nv, pre, loop, conv, skips, sl);
    @(negedge clk);
    a = av[K:0]; b = bv[K:0]; n = nv[K-1:0];
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      #1 lat++;
    end while (!done && lat < 20 * K + 100);
    res = wide_t'(s);
    n_ops++; lat_sum += lat; if (lat > lat_max) lat_max = lat;
    pre_sum += pre; loop_sum += loop; conv_sum += conv;
    check($sformatf("value A=%h B=%h N=%h got %h exp %h", av, bv, nv, res, exp_s), res == exp_s);
    check("congruence", ref_t::congruent(res, av, bv, nv));
    check("result below 2N", res < 2 * nv);
    check($sformatf("latency got %0d exp %0d", lat, pre + loop + conv), lat == pre + loop + conv);
    check("busy low at done", !busy);
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    wide_t nv, av, bv, r;
    a = '0; b = '0; n = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed corner cases
    nv = (wide_t'(1) << K) - 1;                 // largest odd K-bit modulus
    run_one(2 * nv - 1, 2 * nv - 1, nv, r);     // largest operands
    run_one('0, 2 * nv - 1, nv, r);             // A = 0: every iteration skippable
    run_one(2 * nv - 1, '0, nv, r);             // B = 0
    run_one(wide_t'(1), wide_t'(1), nv, r);
    nv = (wide_t'(1) << (K - 1)) | 1;           // smallest modulus with the top bit set
    run_one(2 * nv - 1, 2 * nv - 1, nv, r);
    run_one(wide_t'(1) << (K - 1), nv + 1, nv, r);
    // random products
    for (int t = 0; t < NRAND; t++) begin
      nv = ref_t::rand_modulus();
      av = ref_t::rand_below(2 * nv);
      bv = ref_t::rand_below(2 * nv);
      if (t % 4 == 1) av = av >> (K / 2);       // sparse A: long runs of skips
      run_one(av, bv, nv, r);
    end
    // chained products: results reused as operands without reduction
    nv = ref_t::rand_modulus();
    av = ref_t::rand_below(2 * nv);
    bv = ref_t::rand_below(2 * nv);
    for (int t = 0; t < 4; t++) begin
      run_one(av, bv, nv, r);
      bv = r;
    end
    // every mechanism must have happened
    check("B+N half-adder passes seen", cnt_pre > 0);
    check("full-adder iterations seen", cnt_iter > 0);
    check("x = 0 selected", cnt_sel[0] > 0);
    check("x = N selected", cnt_sel[1] > 0);
    check("x = B selected", cnt_sel[2] > 0);
    check("x = D selected", cnt_sel[3] > 0);
    check("skipped iterations seen", cnt_skip > 0);
    check("skip of the last iteration seen", cnt_skip_last > 0);
    check("conversion passes seen", cnt_conv > 0);
    $display("mechanisms: pre=%0d iter=%0d skip=%0d skip_last=%0d conv=%0d sel=%0d/%0d/%0d/%0d",
             cnt_pre, cnt_iter, cnt_skip, cnt_skip_last, cnt_conv,
             cnt_sel[0], cnt_sel[1], cnt_sel[2], cnt_sel[3]);
    $display("cycles per product: mean %0d max %0d (precompute %0d, iterations %0d, conversion %0d on average)",
             lat_sum / n_ops, lat_max, pre_sum / n_ops, loop_sum / n_ops, conv_sum / n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
