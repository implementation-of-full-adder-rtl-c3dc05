// t1_onehot_preadd: one-hot decoder with carry pre-addition (Type I adder).
//
// Decodes the quaternary input as t1_onehot_enc does and adds the carry in
// before the sum is formed: with cin = 0 the output is the code of Y, with
// cin = 1 the code of (Y + 1) mod 4, i.e. every line moves up one place and
// line 3 wraps to line 0. In the circuit each output line has two pass
// transistors, one steered by cin and one by its complement; here that is a
// 2:1 selection per line. The plain code is also brought out (h_raw) because
// the carry block needs to know that Y itself was 3.
// Purely combinational.
module t1_onehot_preadd
  import qlogic_pkg::*;
(
  input  qdigit_t x,
  input  logic    cin,
  output qcode_t  h,
  output qcode_t  h_raw
);

  logic cinb;

  t1_onehot_enc u_enc (.x(x), .h(h_raw));

  assign cinb = ~cin;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      // line k is the plain line k when cin = 0, plain line k-1 (mod 4) when cin = 1
      h[k] = (cinb & h_raw[k]) | (cin & h_raw[(k + 3) % 4]);
    end
  end

endmodule
