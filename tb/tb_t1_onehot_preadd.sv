// tb_t1_onehot_preadd: checks the pre-adding one-hot decoder against both
// code tables. Carry in = 0: line Y is high. Carry in = 1: line (Y+1) mod 4
// is high (Y = 3 wraps to line 0). The plain code output must always show Y.
module tb_t1_onehot_preadd;
  import qlogic_pkg::*;

  int checks = 0, failures = 0;
  qdigit_t x;
  logic    cin;
  qcode_t  h, h_raw;

  // Expected code lines, written out as in the design's two tables.
  qcode_t table0 [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};
  qcode_t table1 [4] = '{4'b0010, 4'b0100, 4'b1000, 4'b0001};

  t1_onehot_preadd dut (.x(x), .cin(cin), .h(h), .h_raw(h_raw));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 4; v++) begin
        x   = qdigit_t'(v);
        cin = logic'(c);
        #1;
        checks += 2;
        if (h != (c ? table1[v] : table0[v])) begin
          failures++;
          $display("FAIL h x=%0d cin=%0d h=%b", v, c, h);
        end
        if (h_raw != table0[v]) begin
          failures++;
          $display("FAIL h_raw x=%0d cin=%0d h_raw=%b", v, c, h_raw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
