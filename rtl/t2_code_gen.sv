// t2_code_gen: code generator of the Type II full adder.
//
// Decodes the encoder's two binary lines back into four code lines, one per
// quaternary digit, with two inverters and four AND gates:
//   h[0] = ~p & ~q   h[1] = p & ~q   h[2] = p & q   h[3] = ~p & q
// (p = Xp, q = Xq; the gate count is the design's, the products follow from
// the encoder's Gray code). Exactly one line is high. Purely combinational.
module t2_code_gen
  import qlogic_pkg::*;
(
  input  logic   p,
  input  logic   q,
  output qcode_t h
);

  logic pn, qn;   // INV_1, INV_2

  always_comb begin
    pn   = ~p;
    qn   = ~q;
    h[0] = pn & qn;
    h[1] = p  & qn;
    h[2] = p  & q;
    h[3] = pn & q;
  end

endmodule
