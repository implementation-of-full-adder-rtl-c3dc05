// tb_qfa_type1: exhaustive check of the full adder qfa_type1 over all 32 combinations of
// x, y (0..3) and cin (0/1). Expected values come from integer arithmetic:
// sum = (x + y + cin) mod 4, cout = (x + y + cin) >= 4.
module tb_qfa_type1;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t x, y, sum;
  logic    cin, cout;

  qfa_type1 dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

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
          int total;
          total = vx + vy + c;
          x   = qdigit_t'(vx);
          y   = qdigit_t'(vy);
          cin = logic'(c);
          #1;
          checks += 2;
          if (int'(sum) != total % 4) begin
            failures++;
            $display("FAIL sum x=%0d y=%0d cin=%0d got=%0d", vx, vy, c, sum);
          end
          if (cout != (total >= 4)) begin
            failures++;
            $display("FAIL cout x=%0d y=%0d cin=%0d got=%0b", vx, vy, c, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
