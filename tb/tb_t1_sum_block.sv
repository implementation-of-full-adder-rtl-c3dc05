// tb_t1_sum_block: drives every pair of one-hot codes (a = line i, b = line
// k) into the barrel-shifter sum block and expects level (i + k) mod 4.
module tb_t1_sum_block;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qcode_t  a, b;
  qdigit_t sum;

  t1_sum_block dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        a = qcode_t'(1 << i);
        b = qcode_t'(1 << k);
        #1;
        checks++;
        if (int'(sum) != (i + k) % 4) begin
          failures++;
          $display("FAIL A%0d B%0d sum=%0d", i, k, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
