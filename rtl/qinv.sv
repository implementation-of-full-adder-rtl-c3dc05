// qinv: quaternary inverter, the third fundamental gate beside MIN and MAX.
// It mirrors the level about mid-rail: y = 3 - x (0<->3, 1<->2). The adder
// design names the inverter without defining it; the standard multiple-valued
// inverter is this model's choice. Purely combinational.
module qinv
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  output qdigit_t y
);

  always_comb y = Q_MAX - x;

endmodule
