// tb_t1_carry_block: drives the carry block as the Type I adder does. For
// every x, y and cin the testbench forms the codes itself (a = line x,
// b = line (y + cin) mod 4, b3_raw = (y == 3)) and expects a carry exactly
// when x + y + cin >= 4.
module tb_t1_carry_block;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qcode_t a, b;
  logic   b3_raw, cin, cout;

  t1_carry_block dut (.a(a), .b(b), .b3_raw(b3_raw), .cin(cin), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int vx = 0; vx < 4; vx++) begin
        for (int vy = 0; vy < 4; vy++) begin
          a      = qcode_t'(1 << vx);
          b      = qcode_t'(1 << ((vy + c) % 4));
          b3_raw = (vy == 3);
          cin    = logic'(c);
          #1;
          checks++;
          if (cout != (vx + vy + c >= 4)) begin
            failures++;
            $display("FAIL x=%0d y=%0d cin=%0d cout=%0b", vx, vy, c, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
