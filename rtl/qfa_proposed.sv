// qfa_proposed: quaternary full adder made of two half adders and a MAX gate.
//
//   (s1, c1)  = QHA(x, y)
//   (sum, c2) = QHA(s1, cin)
//   cout      = MAX(c1, c2)
//
// The two half-adder carries can never both be 1 (x + y = 4..6 leaves
// s1 <= 2, so s1 + cin < 4), so MAX acts as their OR. The block structure
// follows the design's block diagram; the 1-bit carry in, widened to digit
// 0/1 for the second half adder, and the 1-bit carry out are this model's
// interface choice. Purely combinational: sum and cout follow the inputs in
// the same cycle.
module qfa_proposed
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  input  qdigit_t y,
  input  logic    cin,
  output qdigit_t sum,
  output logic    cout
);

  qdigit_t s1, c1, c2, cmax;

  qha  u_qha1 (.a(x),  .b(y),            .sum(s1),  .carry(c1));
  qha  u_qha2 (.a(s1), .b({1'b0, cin}),  .sum(sum), .carry(c2));
  qmax u_max  (.a(c1), .b(c2), .y(cmax));

  // cmax is 0 or 1.
  assign cout = (cmax != Q_MIN);

endmodule
