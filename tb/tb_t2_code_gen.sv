// tb_t2_code_gen: drives the four Gray-coded (q, p) pairs of the encoder and
// expects code line k high for digit k: 00 -> H0, 01 -> H1, 11 -> H2, 10 -> H3.
module tb_t2_code_gen;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  logic   p, q;
  qcode_t h;

  logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  t2_code_gen dut (.p(p), .q(q), .h(h));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {q, p} = gray[v];
      #1;
      checks++;
      if (h != qcode_t'(1 << v)) begin
        failures++;
        $display("FAIL digit=%0d q=%0b p=%0b h=%b", v, q, p, h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
