// tb_qinv: exhaustive check of the quaternary inverter (y = 3 - x).
module tb_qinv;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t x, y;

  qinv dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      x = qdigit_t'(v);
      #1;
      checks++;
      if (int'(y) != 3 - v) begin
        failures++;
        $display("FAIL x=%0d y=%0d", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
