// Testbench of the operand selector sm3 (W = 40).
//
// For random B, N, D and all four (A^, q^) pairs, x must be 0, N, B or D as
// listed in the multiplier's selection rule. A watchdog ends the run.
module tb_sm3;
  localparam int unsigned W = 40;
  logic clk = 1'b0;
  logic a_hat, q_hat;
  logic [W-1:0] b, n, d, x, expx;
  int checks = 0, failures = 0;

  sm3 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int t = 0; t < 1000; t++) begin
      b = W'({$urandom, $urandom});
      n = W'({$urandom, $urandom});
      d = W'({$urandom, $urandom});
      {a_hat, q_hat} = 2'(t);
      @(posedge clk);
      case ({a_hat, q_hat})
        2'b00: expx = '0;
        2'b01: expx = n;
        2'b10: expx = b;
        default: expx = d;
      endcase
      checks++;
      if (x !== expx) begin
        failures++;
        $display("FAIL A^=%b q^=%b: x=%h expected %h", a_hat, q_hat, x, expx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
