// t2_encoder: quaternary-to-binary encoder of the Type II full adder.
//
// Splits one quaternary level into two binary lines:
//   xp = DLC1 xor DLC3     high for x = 1 or 2
//   xq = x through two binary inverters in series (mid-rail threshold),
//        high for x = 2 or 3
// giving the Gray code x = 0:(xq,xp)=00, 1:01, 2:11, 3:10. The parts (DLC1,
// DLC3, two inverters, one XOR) are the design's; the resulting code is read
// from them and from the code generator's output order. The first inverter
// switches between levels 1 and 2, so it sees the upper bit of the level.
// Purely combinational.
module t2_encoder
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  output logic    xp,
  output logic    xq
);

  logic d1, d3, inv1;

  dlc #(.K(1)) u_dlc1 (.x(x), .y(d1));
  dlc #(.K(3)) u_dlc3 (.x(x), .y(d3));

  always_comb begin
    xp   = d1 ^ d3;
    inv1 = ~(x >= 2'd2);   // binary inverter on a quaternary input
    xq   = ~inv1;
  end

endmodule
