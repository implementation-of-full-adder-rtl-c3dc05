// tb_qmax: exhaustive check of the quaternary MAX gate over all 16 input
// pairs; the expected output is the higher of the two levels.
module tb_qmax;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t a, b, y;

  qmax dut (.a(a), .b(b), .y(y));

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
        checks++;
        if (int'(y) != ((va > vb) ? va : vb)) begin
          failures++;
          $display("FAIL a=%0d b=%0d y=%0d", va, vb, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
