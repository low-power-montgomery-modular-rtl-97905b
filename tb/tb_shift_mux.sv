// Testbench of the skip shift multiplexer shift_mux, at W = 50 (as M1/M2) and
// at W = 3 (as M4/M5). With sel = 0 the output is the low W bits of the
// input, with sel = 1 the input divided by two. A watchdog ends the run.
module tb_shift_mux;
  localparam int unsigned W = 50;
  logic clk = 1'b0;
  logic [W:0]   v;
  logic [W-1:0] y;
  logic [3:0]   v3;
  logic [2:0]   y3;
  logic         sel;
  int checks = 0, failures = 0;

  shift_mux #(.W(W)) dut (.v(v), .sel(sel), .y(y));
  shift_mux #(.W(3)) dut3 (.v(v3), .sel(sel), .y(y3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int t = 0; t < 500; t++) begin
      v   = (W+1)'({$urandom, $urandom});
      v3  = 4'($urandom);
      sel = t[0];
      @(posedge clk);
      checks++;
      if (y != W'(sel ? v / 2 : v % ((W+1)'(1) << W))) begin
        failures++;
        $display("FAIL wide sel=%b v=%h y=%h", sel, v, y);
      end
      checks++;
      if (y3 != 3'(sel ? v3 / 2 : v3 % 8)) begin
        failures++;
        $display("FAIL narrow sel=%b v=%h y=%h", sel, v3, y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
