// Zero detector Zero_D: zero = 1 when every bit of v is 0 (a W-input NOR).
//
// Applied to the carry word SC it tells the control part that a carry-save
// pair has become an ordinary binary number, which ends both the B + N
// precomputation and the final format conversion. Purely combinational.
module zero_d #(
  parameter int unsigned W = 1026
) (
  input  logic [W-1:0] v,
  output logic         zero
);
  assign zero = ~|v;
endmodule
