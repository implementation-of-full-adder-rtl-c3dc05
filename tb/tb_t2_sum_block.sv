// tb_t2_sum_block: drives every pair of code lines (hx = line i, hy = line
// k) with cin = 0 and 1 into the Type II sum block and expects level (i + k + cin) mod 4.
module tb_t2_sum_block;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qcode_t hx, hy;
  logic   cin;
  qdigit_t sum;

  t2_sum_block dut (.hx(hx), .hy(hy), .cin(cin), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 4; i++) begin
        for (int k = 0; k < 4; k++) begin
          hx  = qcode_t'(1 << i);
          hy  = qcode_t'(1 << k);
          cin = logic'(c);
          #1;
          checks++;
          if (int'(sum) != (i + k + c) % 4) begin
            failures++;
            $display("FAIL Hx%0d Hy%0d cin=%0d sum=%0d", i, k, c, sum);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
