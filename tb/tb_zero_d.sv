// Testbench of the zero detector zero_d (W = 70).
//
// Checks zero for the all-zero word, every one-hot word and random words.
// A watchdog ends the run.
module tb_zero_d;
  localparam int unsigned W = 70;
  logic clk = 1'b0;
  logic [W-1:0] v;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] val);
    v = val;
    @(posedge clk);
    checks++;
    if (zero != (val == '0)) begin
      failures++;
      $display("FAIL v=%h zero=%b", val, zero);
    end
  endtask

  initial begin : stim
    apply('0);
    for (int j = 0; j < W; j++) apply(W'(1) << j);
    for (int t = 0; t < 200; t++) apply(W'({$urandom, $urandom, $urandom}));
    apply('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
