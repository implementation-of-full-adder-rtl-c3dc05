// tb_qha: exhaustive check of the quaternary half adder against the sum and
// carry tables of a radix-4 adder: sum = (a + b) mod 4, carry = (a + b) / 4.
module tb_qha;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t a, b, sum, carry;

  qha dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 4; va++) begin
      for (int vb = 0; vb < 4; vb++) begin
        a = qdigit_t'(va);
        b = qdigit_t'(vb);
        #1;
        checks += 2;
        if (int'(sum) != (va + vb) % 4) begin
          failures++;
          $display("FAIL sum a=%0d b=%0d got=%0d", va, vb, sum);
        end
        if (int'(carry) != (va + vb) / 4) begin
          failures++;
          $display("FAIL carry a=%0d b=%0d got=%0d", va, vb, carry);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
