// t1_onehot_enc: one-hot decoder of the Type I full adder.
//
// Turns one quaternary level into four code lines, h[k] high (3 V) when the
// input is k. It uses three down literal circuits, two XOR gates and one
// inverter, as the design states:
//   h[0] = DLC1            (x = 0)
//   h[1] = DLC1 xor DLC2   (x = 1)
//   h[2] = DLC2 xor DLC3   (x = 2)
//   h[3] = not DLC3        (x = 3)
// The gate count is the design's; which DLCs feed which gate is chosen here so
// that the code matches the design's table for carry in = 0.
// Purely combinational.
module t1_onehot_enc
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  output qcode_t  h
);

  logic d1, d2, d3;

  dlc #(.K(1)) u_dlc1 (.x(x), .y(d1));
  dlc #(.K(2)) u_dlc2 (.x(x), .y(d2));
  dlc #(.K(3)) u_dlc3 (.x(x), .y(d3));

  always_comb begin
    h[0] = d1;
    h[1] = d1 ^ d2;
    h[2] = d2 ^ d3;
    h[3] = ~d3;
  end

endmodule
