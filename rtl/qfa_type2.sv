// qfa_type2: Type II quaternary full adder (binary encoding, then codes).
//
// Each operand passes through an encoder (quaternary to two binary lines) and
// a code generator (two binary lines to four code lines Hx0..Hx3 /
// Hy0..Hy3). The codes steer the pass-transistor sum and carry blocks, which
// put (X + Y + cin) mod 4 on sum and raise cout when X + Y + cin >= 4. The
// output is already quaternary. Block split follows the design; the carry in
// is fed to the sum and carry blocks (this model's choice).
// Purely combinational.
module qfa_type2
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  input  qdigit_t y,
  input  logic    cin,
  output qdigit_t sum,
  output logic    cout
);

  logic   xp, xq, yp, yq;
  qcode_t hx, hy;

  t2_encoder     u_enc_x (.x(x), .xp(xp), .xq(xq));
  t2_encoder     u_enc_y (.x(y), .xp(yp), .xq(yq));
  t2_code_gen    u_gen_x (.p(xp), .q(xq), .h(hx));
  t2_code_gen    u_gen_y (.p(yp), .q(yq), .h(hy));
  t2_sum_block   u_sum   (.hx(hx), .hy(hy), .cin(cin), .sum(sum));
  t2_carry_block u_carry (.hx(hx), .hy(hy), .cin(cin), .cout(cout));

endmodule
