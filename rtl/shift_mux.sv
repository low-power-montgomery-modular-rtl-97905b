// Skip shift multiplexer (M1, M2 at full width; M4, M5 at three bits).
//
// The SS and SC registers hold the result of the previous iteration already
// divided by two. When the skip detector has decided that the following
// iteration adds nothing (A = q = 0 and both low bits 0), the register word must
// be divided by two once more before it enters the adder. This multiplexer
// gives y = v[W-1:0] when sel = 0 and y = v[W:1] when sel = 1. The input has one
// bit more than the output so that the same module serves as the narrow M4/M5,
// which pass bits 2:0 or 3:1 of a register to the skip detector.
// Purely combinational.
module shift_mux #(
  parameter int unsigned W = 1026
) (
  input  logic [W:0]   v,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? v[W:1] : v[W-1:0];
endmodule
