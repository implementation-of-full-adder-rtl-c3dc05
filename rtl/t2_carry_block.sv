// t2_carry_block: pass-transistor carry block of the Type II full adder.
//
// The code lines hx[i] and hy[k] together pass carry level 1 to the output
// when i + k + cin >= 4, and level 0 otherwise. With cin = 0 this is the
// design's carry table; how the carry in enters is this model's choice.
// Purely combinational. An assertion flags input codes that are not one-hot.
module t2_carry_block
  import qlogic_pkg::*;
(
  input  qcode_t hx,
  input  qcode_t hy,
  input  logic   cin,
  output logic   cout
);

  always_comb begin
    cout = 1'b0;
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        if (hx[i] && hy[k] && (i + k + int'(cin) >= 4)) cout = 1'b1;
      end
    end
  end

  // Both codes must be one-hot, as the code generators make them.
  always_comb begin
    assert final (is_onehot(hx) && is_onehot(hy))
      else $error("t2_carry_block: codes not one-hot, hx=%b hy=%b", hx, hy);
  end

endmodule
