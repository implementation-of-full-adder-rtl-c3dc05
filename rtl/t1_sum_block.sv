// t1_sum_block: barrel-shifter sum block of the Type I full adder.
//
// A 4x4 grid of series pass-transistor pairs. The pair on lines a[i] and b[k]
// connects the supply level (i + k) mod 4 (GND, Vdd/3, 2Vdd/3 or Vdd) to the
// SUM line; the grid is the design's:
//           GND   Vdd/3  2Vdd/3  Vdd
//   A0 row  B0    B1     B2      B3
//   A1 row  B3    B0     B1      B2
//   A2 row  B2    B3     B0      B1
//   A3 row  B1    B2     B3      B0
// With one-hot codes on both inputs exactly one pair conducts. The shared SUM
// wire is modelled as an OR of the levels of the conducting pairs.
// Purely combinational. An assertion flags input codes that are not one-hot.
module t1_sum_block
  import qlogic_pkg::*;
(
  input  qcode_t  a,
  input  qcode_t  b,
  output qdigit_t sum
);

  always_comb begin
    sum = Q_MIN;
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        if (a[i] && b[k]) sum |= qdigit_t'((i + k) % 4);
      end
    end
  end

  // Exactly one switch pair may conduct: both codes must be one-hot.
  always_comb begin
    assert final (is_onehot(a) && is_onehot(b))
      else $error("t1_sum_block: codes not one-hot, a=%b b=%b", a, b);
  end

endmodule
