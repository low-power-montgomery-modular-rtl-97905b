// One-level configurable carry-save adder (CCSA), W bits wide.
//
// A row of W cfa cells. With alpha = 1 it performs one three-input carry-save
// addition (1F_CSA): ss + sc + x = s + 2*co. With alpha = 0 it performs two
// serial two-input carry-save additions (2H_CSA) of ss and sc, ignoring x:
// the first half-adder stage of bit j hands its carry to the second stage of
// bit j+1, so ss + sc = s + 2*co again, but the carry word has advanced by two
// positions in one clock cycle. This is what halves the cycles spent on the
// B + N precomputation and on the final format conversion.
//
// The first-stage carry into bit 0 is 0; the first-stage carry out of bit W-1
// is dropped, which loses nothing as long as ss + sc < 2^W (the multiplier's
// operands never reach 2^W). Purely combinational; the critical path is the
// mode multiplexer plus one full adder, independent of W.
module ccsa #(
  parameter int unsigned W = 1026
) (
  input  logic [W-1:0] ss,
  input  logic [W-1:0] sc,
  input  logic [W-1:0] x,
  input  logic         alpha,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);
  logic [W:0] c1;  // c1[j] is the first-stage carry entering cell j

  assign c1[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_cell
    cfa u_cfa (
      .a     (ss[j]),
      .b     (sc[j]),
      .c     (x[j]),
      .alpha (alpha),
      .c1_in (c1[j]),
      .c1_out(c1[j+1]),
      .s     (s[j]),
      .co    (co[j])
    );
  end
endmodule
