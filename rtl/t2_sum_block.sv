// t2_sum_block: pass-transistor sum block of the Type II full adder.
//
// The code lines hx[i] and hy[k] together connect the supply level
// (i + k + cin) mod 4 to the sum output, i.e. the sum table of a quaternary
// adder with the carry in moving the selected level up by one. The design
// builds this block from pass transistors controlled by the codes; the grid
// arrangement and the way the carry in enters are this model's choice. The
// shared output wire is modelled as an OR of the conducting paths.
// Purely combinational. An assertion flags input codes that are not one-hot.
module t2_sum_block
  import qlogic_pkg::*;
(
  input  qcode_t  hx,
  input  qcode_t  hy,
  input  logic    cin,
  output qdigit_t sum
);

  always_comb begin
    sum = Q_MIN;
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        if (hx[i] && hy[k]) sum |= qdigit_t'((i + k + int'(cin)) % 4);
      end
    end
  end

  // Exactly one pass path may conduct: both codes must be one-hot.
  always_comb begin
    assert final (is_onehot(hx) && is_onehot(hy))
      else $error("t2_sum_block: codes not one-hot, hx=%b hy=%b", hx, hy);
  end

endmodule
