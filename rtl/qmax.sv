// qmax: quaternary MAX gate, one of the three fundamental gates (MIN, MAX,
// inverter). In the MIN/MAX-style full adder it merges the carries of the two
// half adders. y is the higher of the two input levels. Purely combinational.
module qmax
  import qlogic_pkg::*;
(
  input  qdigit_t a,
  input  qdigit_t b,
  output qdigit_t y
);

  always_comb y = (a > b) ? a : b;

endmodule
