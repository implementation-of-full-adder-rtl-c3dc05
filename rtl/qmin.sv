// qmin: quaternary MIN gate, one of the three fundamental gates (MIN, MAX,
// inverter) from which the MIN/MAX-style full adder is composed.
// y is the lower of the two input levels. Purely combinational.
module qmin
  import qlogic_pkg::*;
(
  input  qdigit_t a,
  input  qdigit_t b,
  output qdigit_t y
);

  always_comb y = (a < b) ? a : b;

endmodule
