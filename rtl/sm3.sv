// Simplified operand multiplexer SM3.
//
// Chooses the third carry-save operand x of an iteration from the stored
// selection bits (A^, q^): (0,0) -> 0, (0,1) -> N, (1,0) -> B, (1,1) -> D = B+N.
// Because one of the four choices is zero, no data path is needed for it: the
// selector is an AND-OR of three words under decoded select terms built from
// the select bits and their inverses. Purely combinational; A^ and q^ come
// from flip-flops so the selection starts at the clock edge.
module sm3 #(
  parameter int unsigned W = 1026
) (
  input  logic         a_hat,
  input  logic         q_hat,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  input  logic [W-1:0] d,
  output logic [W-1:0] x
);
  logic sel_b, sel_n, sel_d;

  always_comb begin
    sel_n = ~a_hat &  q_hat;
    sel_b =  a_hat & ~q_hat;
    sel_d =  a_hat &  q_hat;
    x     = ({W{sel_b}} & b) | ({W{sel_n}} & n) | ({W{sel_d}} & d);
  end
endmodule
