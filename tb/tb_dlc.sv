// tb_dlc: exhaustive check of the down literal circuits DLC1, DLC2 and DLC3.
// Every input level 0..3 is applied to all three thresholds; the expected
// output (high when the level is below K) is worked out in the testbench.
module tb_dlc;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t x;
  logic y1, y2, y3;

  dlc #(.K(1)) dut1 (.x(x), .y(y1));
  dlc #(.K(2)) dut2 (.x(x), .y(y2));
  dlc #(.K(3)) dut3 (.x(x), .y(y3));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%0d got=%0b exp=%0b", what, x, got, exp);
    end
  endtask

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
      check(y1, v == 0, "DLC1");
      check(y2, v <= 1, "DLC2");
      check(y3, v <= 2, "DLC3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
