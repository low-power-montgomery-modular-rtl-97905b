// Configurable full adder (CFA) cell, bit j of the one-level CCSA.
//
// With alpha = 1 the cell is an ordinary full adder: s = a ^ b ^ c and
// co = majority(a, b, c). With alpha = 0 the row of cells becomes two serial
// half adders: the first half adder of bit j produces t = a ^ b and the carry
// c1_out = a & b, which goes to cell j+1; the second half adder of bit j adds t
// to the first-stage carry c1_in arriving from cell j-1. In both modes the
// outputs satisfy a + b (+ c or c1_in) = s + 2*co, so the carry word is always
// one bit to the left of the sum word.
//
// Gates: XOR a^b (shared by both modes), AND for the first-stage carry, a 2-to-1
// multiplexer choosing the third input (c or c1_in), XOR for the sum and a
// multiplexer-style carry (t ? third : a & alpha). The sharing of the a^b XOR
// and the mode multiplexer on the third input follow the cell the multiplier is
// built around; the exact gate netlist is this design's own. Purely
// combinational.
module cfa (
  input  logic a,       // SS bit j
  input  logic b,       // SC bit j
  input  logic c,       // x bit j, used in full-adder mode
  input  logic alpha,   // 1: full adder, 0: two serial half adders
  input  logic c1_in,   // first-stage carry from cell j-1
  output logic c1_out,  // first-stage carry to cell j+1
  output logic s,       // sum, weight 2^j
  output logic co       // carry, weight 2^(j+1)
);
  logic t;
  logic third;

  always_comb begin
    t      = a ^ b;
    c1_out = a & b;
    third  = alpha ? c : c1_in;
    s      = t ^ third;
    co     = t ? third : (a & alpha);
  end
endmodule
