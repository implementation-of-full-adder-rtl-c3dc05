// qha: quaternary half adder of the MIN/MAX-style full adder.
//
// sum   = (a + b) mod 4
// carry = 1 when a + b >= 4, else 0 (a quaternary digit, 0 or 1)
//
// The adder design gives the half adder's truth table and says it is made of
// MIN gates, MAX gates and inverters; how they are arranged is this design's
// choice. It uses the canonical sum-of-products form of multiple-valued logic:
// for every pair of input digits (i, k) the literals J_i(a) and J_k(b) are
// combined with MIN, the result is MIN-ed with the constant output level
// f(i, k), and the 16 terms are combined with a chain of MAX gates. Exactly
// one literal pair is at level 3 at any time, so the chain passes f(a, b).
// Purely combinational.
module qha
  import qlogic_pkg::*;
(
  input  qdigit_t a,
  input  qdigit_t b,
  output qdigit_t sum,
  output qdigit_t carry
);

  qdigit_t ja [4];
  qdigit_t jb [4];

  q_literals u_lit_a (.x(a), .j(ja));
  q_literals u_lit_b (.x(b), .j(jb));

  // MAX chains over the 16 minterms; element 0 is the idle level.
  qdigit_t s_chain [17];
  qdigit_t c_chain [17];

  assign s_chain[0] = Q_MIN;
  assign c_chain[0] = Q_MIN;

  for (genvar i = 0; i < 4; i++) begin : g_a
    for (genvar k = 0; k < 4; k++) begin : g_b
      localparam int      N     = 4 * i + k;
      localparam qdigit_t S_LVL = qdigit_t'((i + k) % 4);
      localparam qdigit_t C_LVL = qdigit_t'((i + k) / 4);

      qdigit_t both, s_term, c_term;

      qmin u_and   (.a(ja[i]), .b(jb[k]),  .y(both));
      qmin u_s_lvl (.a(both),  .b(S_LVL),  .y(s_term));
      qmin u_c_lvl (.a(both),  .b(C_LVL),  .y(c_term));
      qmax u_s_or  (.a(s_chain[N]), .b(s_term), .y(s_chain[N+1]));
      qmax u_c_or  (.a(c_chain[N]), .b(c_term), .y(c_chain[N+1]));
    end
  end

  assign sum   = s_chain[16];
  assign carry = c_chain[16];

endmodule
