// qlogic_pkg: types shared by the quaternary (radix-4) adder blocks.
//
// In the voltage-mode circuits these blocks model, a quaternary signal is one
// wire carrying one of four levels, 0 V, 1 V, 2 V and 3 V, for the digits 0..3.
// In RTL such a wire is carried as a 2-bit unsigned digit, qdigit_t, whose
// value is the level in volts. Code lines (one-hot lines that steer pass
// transistors) swing between 0 V and 3 V only and are carried as single bits,
// 1 meaning 3 V. A carry is 0 or 1 (0 V or 1 V) and is carried as one bit.
package qlogic_pkg;

  // One quaternary digit; the value is the voltage level 0..3.
  typedef logic [1:0] qdigit_t;

  // Four code lines; line k is active (3 V) when the encoded digit is k.
  typedef logic [3:0] qcode_t;

  localparam qdigit_t Q_MIN = 2'd0;  // GND
  localparam qdigit_t Q_MAX = 2'd3;  // Vdd, the highest level

  // True when exactly one of the four code lines is active.
  function automatic logic is_onehot(qcode_t c);
    return (c != '0) && ((c & (c - qcode_t'(1))) == '0);
  endfunction

endpackage
