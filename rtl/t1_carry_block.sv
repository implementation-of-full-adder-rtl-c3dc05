// t1_carry_block: carry generating block of the Type I full adder.
//
// Each pre-added code line of operand B is passed to the carry node only when
// the one-hot code of A makes A + B reach 4:
//   B0: never (the line carries GND)
//   B1: when A3
//   B2: when A2 or A3
//   B3: when A1, A2 or A3
// Pre-addition maps Y = 3 with cin = 1 to code line B0, which would lose that
// carry, so a fifth path (input Y at 3, gated by cin) is ORed in. The gating
// pattern and the OR gate follow the design; the wired node is modelled as OR.
// Lines a[0] and b[0] can never produce a carry and are therefore unused.
// Purely combinational. An assertion flags input codes that are not one-hot.
module t1_carry_block
  import qlogic_pkg::*;
(
  input  qcode_t a,
  input  qcode_t b,
  input  logic   b3_raw,
  input  logic   cin,
  output logic   cout
);

  logic sel;

  always_comb begin
    sel  = (b[1] & a[3])
         | (b[2] & (a[3] | a[2]))
         | (b[3] & (a[3] | a[2] | a[1]));
    cout = sel | (b3_raw & cin);
  end

  // Both codes must be one-hot, as the decoders make them.
  always_comb begin
    assert final (is_onehot(a) && is_onehot(b))
      else $error("t1_carry_block: codes not one-hot, a=%b b=%b", a, b);
  end

endmodule
