// dlc: down literal circuit DLCk.
//
// The output is high (3 V, carried as 1) when the quaternary input level is
// below the threshold K, and low (0 V) otherwise. DLC1, DLC2 and DLC3 are the
// instances with K = 1, 2 and 3; they are the level detectors from which the
// one-hot decoders and encoders of the adders are built. The name and the use
// of DLC1..DLC3 follow the adder design; the exact switching rule (high below
// K) is the usual definition of a down literal and is this model's choice.
// Purely combinational.
module dlc
  import qlogic_pkg::*;
#(
  parameter int unsigned K = 1  // threshold level, 1..3
) (
  input  qdigit_t x,
  output logic    y
);

  always_comb y = ({30'd0, x} < K);

endmodule
