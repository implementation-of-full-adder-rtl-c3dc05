// qfa_top: the three quaternary full adders side by side.
//
// p_*  : MIN/MAX-style adder, two half adders and a MAX gate (qfa_proposed)
// t1_* : Type I adder, one-hot codes and a barrel shifter (qfa_type1)
// t2_* : Type II adder, binary encoding and code-steered pass gates (qfa_type2)
// The three compute the same function, one quaternary digit
// x + y + cin = 4*cout + sum, with different circuit structures; each has its
// own ports so that they can be exercised and compared independently.
// Purely combinational.
module qfa_top
  import qlogic_pkg::*;
(
  input  qdigit_t p_x,
  input  qdigit_t p_y,
  input  logic    p_cin,
  output qdigit_t p_sum,
  output logic    p_cout,

  input  qdigit_t t1_x,
  input  qdigit_t t1_y,
  input  logic    t1_cin,
  output qdigit_t t1_sum,
  output logic    t1_cout,

  input  qdigit_t t2_x,
  input  qdigit_t t2_y,
  input  logic    t2_cin,
  output qdigit_t t2_sum,
  output logic    t2_cout
);

  qfa_proposed u_proposed (.x(p_x),  .y(p_y),  .cin(p_cin),  .sum(p_sum),  .cout(p_cout));
  qfa_type1    u_type1    (.x(t1_x), .y(t1_y), .cin(t1_cin), .sum(t1_sum), .cout(t1_cout));
  qfa_type2    u_type2    (.x(t2_x), .y(t2_y), .cin(t2_cin), .sum(t2_sum), .cout(t2_cout));

endmodule
