// tb_t2_encoder: checks the Type II encoder's Gray-coded binary outputs:
// x = 0 -> (xq,xp) = 00, 1 -> 01, 2 -> 11, 3 -> 10.
module tb_t2_encoder;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t x;
  logic    xp, xq;

  logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  t2_encoder dut (.x(x), .xp(xp), .xq(xq));

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
      if ({xq, xp} != gray[v]) begin
        failures++;
        $display("FAIL x=%0d xq=%0b xp=%0b", v, xq, xp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
