// qfa_type1: Type I quaternary full adder (one-hot codes and a barrel shifter).
//
// Operand X is decoded into a one-hot code A0..A3; operand Y is decoded into
// a one-hot code B0..B3 that already includes the carry in (pre-addition).
// The sum block passes supply level (i + k) mod 4 for active lines Ai, Bk; the
// carry block raises cout when X + Y + cin >= 4. The result is a quaternary
// level, so no radix converter is needed at the output. Structure and block
// split follow the design. Of the plain code of Y only line 3 is needed (by
// the carry block). Purely combinational.
module qfa_type1
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  input  qdigit_t y,
  input  logic    cin,
  output qdigit_t sum,
  output logic    cout
);

  qcode_t a_code, b_code, b_raw;

  t1_onehot_enc    u_dec_a (.x(x), .h(a_code));
  t1_onehot_preadd u_dec_b (.x(y), .cin(cin), .h(b_code), .h_raw(b_raw));
  t1_sum_block     u_sum   (.a(a_code), .b(b_code), .sum(sum));
  t1_carry_block   u_carry (.a(a_code), .b(b_code), .b3_raw(b_raw[3]), .cin(cin), .cout(cout));

endmodule
