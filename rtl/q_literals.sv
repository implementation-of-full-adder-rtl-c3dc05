// q_literals: the four literals of one quaternary digit, built from down
// literal circuits, inverters and MIN gates.
//
// j[k] is at the top level (3) when x equals k and at 0 otherwise:
//   j[0] = DLC1                 (x < 1)
//   j[1] = MIN(DLC2, INV(DLC1)) (x < 2 and not x < 1)
//   j[2] = MIN(DLC3, INV(DLC2)) (x < 3 and not x < 2)
//   j[3] = INV(DLC3)            (not x < 3)
// The DLC outputs swing 0 V / 3 V and are widened to quaternary levels 0 / 3.
// This helper feeds the MIN/MAX sum-of-products half adder (qha); the
// construction is this design's own. Purely combinational.
module q_literals
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  output qdigit_t j [4]
);

  logic    d1, d2, d3;      // DLC1..DLC3 outputs
  qdigit_t l1, l2, l3;      // the same as quaternary levels 0 / 3
  qdigit_t n1, n2, n3;      // their inversions

  dlc #(.K(1)) u_dlc1 (.x(x), .y(d1));
  dlc #(.K(2)) u_dlc2 (.x(x), .y(d2));
  dlc #(.K(3)) u_dlc3 (.x(x), .y(d3));

  assign l1 = d1 ? Q_MAX : Q_MIN;
  assign l2 = d2 ? Q_MAX : Q_MIN;
  assign l3 = d3 ? Q_MAX : Q_MIN;

  qinv u_inv1 (.x(l1), .y(n1));
  qinv u_inv2 (.x(l2), .y(n2));
  qinv u_inv3 (.x(l3), .y(n3));

  assign j[0] = l1;
  qmin u_min1 (.a(l2), .b(n1), .y(j[1]));
  qmin u_min2 (.a(l3), .b(n2), .y(j[2]));
  assign j[3] = n3;

endmodule
