// Skip detector Skip_D.
//
// Works during iteration i, in parallel with the carry-save adder, on the low
// three bits of the adder inputs SS[i], SC[i] and x. From them it forms the low
// bits of the next state (SS[i+1], SC[i+1]) = (SS[i] + SC[i] + x) / 2:
//   SS[i+1]_0 = sum bit 1,  SC[i+1]_0 = carry out of bit 0,
//   SS[i+1]_1 = sum bit 2,  SC[i+1]_1 = carry out of bit 1,
// and from those
//   q(i+1)    = SS[i+1]_0 ^ SC[i+1]_0 ^ (A(i+1) & B0)
//   skip(i+1) = ~(A(i+1) | q(i+1) | SS[i+1]_0)
//   q(i+2)    = SS[i+1]_1 ^ SC[i+1]_1 ^ (A(i+2) & B0).
// When skip(i+1) = 1, iteration i+1 would add x = 0 to an even pair whose low
// bits are both 0, so it is replaced by one extra right shift and the next
// cycle performs iteration i+2; (q^, A^) then take q(i+2), A(i+2), otherwise
// q(i+1), A(i+1). The skip condition and the q selection follow the multiplier's
// published equations; the derivation of q(i+1), q(i+2) from the low sum and
// carry bits is this design's own. en = 0 (iteration i+1 does not exist)
// forces skip = 0. Sum bit 0 is computed but unused: it is always 0 in an
// iteration. Purely combinational, a few gates deep.
module skip_d (
  input  logic [2:0] ss_lo,  // SS[i] bits 2:0
  input  logic [2:0] sc_lo,  // SC[i] bits 2:0
  input  logic [2:0] x_lo,   // x bits 2:0
  input  logic       a1,     // A(i+1)
  input  logic       a2,     // A(i+2)
  input  logic       b0,     // B bit 0
  input  logic       en,
  output logic       skip,
  output logic       q_hat,
  output logic       a_hat
);
  logic [2:0] sum;
  logic [1:0] cry;
  logic       q1, q2;

  always_comb begin
    sum   = ss_lo ^ sc_lo ^ x_lo;
    cry   = (ss_lo[1:0] & sc_lo[1:0]) | (ss_lo[1:0] & x_lo[1:0]) | (sc_lo[1:0] & x_lo[1:0]);
    q1    = sum[1] ^ cry[0] ^ (a1 & b0);
    q2    = sum[2] ^ cry[1] ^ (a2 & b0);
    skip  = en & ~(a1 | q1 | sum[1]);
    q_hat = skip ? q2 : q1;
    a_hat = skip ? a2 : a1;
  end
endmodule
