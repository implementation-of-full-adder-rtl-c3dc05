// tb_t1_onehot_enc: checks the Type I one-hot decoder against the carry-in = 0
// code table: for input level v exactly line v is high.
module tb_t1_onehot_enc;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t x;
  qcode_t  h;

  t1_onehot_enc dut (.x(x), .h(h));

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
      if (h != qcode_t'(1 << v)) begin
        failures++;
        $display("FAIL x=%0d h=%b", v, h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
