// tb_qfa_top: end-to-end test of the three quaternary full adders.
//
// Part 1 applies all 32 (x, y, cin) combinations to every adder at once and
// checks sum and cout against integer arithmetic and against each other.
// Part 2 uses each adder as one digit slice of a ripple-carry adder: random
// 8-digit (16-bit) quaternary numbers are added one digit per step, the carry
// out of a step being fed back as the carry in of the next, and the result
// is compared with a 16-bit binary addition.
// The testbench counts how often each mechanism of the adders was exercised
// (carry pre-addition in the Type I decoder, its OR-gate carry path, a carry
// from either half adder of the MIN/MAX adder, every code line of the Type II
// code generators, a carry out of each adder) and counts a failure for any
// mechanism that never occurred.
module tb_qfa_top;
  import qlogic_pkg::*;

  localparam int DIGITS = 8;
  localparam int RIPPLE_OPS = 200;

  int checks = 0, failures = 0;

  qdigit_t p_x, p_y, p_sum, t1_x, t1_y, t1_sum, t2_x, t2_y, t2_sum;
  logic    p_cin, p_cout, t1_cin, t1_cout, t2_cin, t2_cout;

  qfa_top dut (.*);

  // mechanism counters
  int n_preadd = 0, n_or_path = 0, n_qha1_carry = 0, n_qha2_carry = 0;
  int n_cout_p = 0, n_cout_t1 = 0, n_cout_t2 = 0;
  int n_hx [4] = '{default: 0};
  int n_hy [4] = '{default: 0};

  task automatic count_mechanisms();
    if (dut.u_type1.b_code != dut.u_type1.b_raw) n_preadd++;
    if (dut.u_type1.u_carry.b3_raw && dut.u_type1.u_carry.cin) n_or_path++;
    if (dut.u_proposed.c1 != Q_MIN) n_qha1_carry++;
    if (dut.u_proposed.c2 != Q_MIN) n_qha2_carry++;
    if (p_cout)  n_cout_p++;
    if (t1_cout) n_cout_t1++;
    if (t2_cout) n_cout_t2++;
    for (int k = 0; k < 4; k++) begin
      if (dut.u_type2.hx[k]) n_hx[k]++;
      if (dut.u_type2.hy[k]) n_hy[k]++;
    end
  endtask

  task automatic check_digit(string who, int x, int y, int c, qdigit_t s, logic co);
    int total = x + y + c;
    checks++;
    if (int'(s) != total % 4 || co != (total >= 4)) begin
      failures++;
      $display("FAIL %s x=%0d y=%0d cin=%0d sum=%0d cout=%0b", who, x, y, c, s, co);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("mechanism %-28s seen %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Part 1: exhaustive single digit
    for (int c = 0; c < 2; c++) begin
      for (int vx = 0; vx < 4; vx++) begin
        for (int vy = 0; vy < 4; vy++) begin
          p_x  = qdigit_t'(vx); p_y  = qdigit_t'(vy); p_cin  = logic'(c);
          t1_x = qdigit_t'(vx); t1_y = qdigit_t'(vy); t1_cin = logic'(c);
          t2_x = qdigit_t'(vx); t2_y = qdigit_t'(vy); t2_cin = logic'(c);
          #1;
          count_mechanisms();
          check_digit("proposed", vx, vy, c, p_sum,  p_cout);
          check_digit("type1",    vx, vy, c, t1_sum, t1_cout);
          check_digit("type2",    vx, vy, c, t2_sum, t2_cout);
          checks++;
          if (p_sum != t1_sum || p_sum != t2_sum || p_cout != t1_cout || p_cout != t2_cout) begin
            failures++;
            $display("FAIL adders disagree x=%0d y=%0d cin=%0d", vx, vy, c);
          end
        end
      end
    end

    // Part 2: ripple-carry addition of 8-digit numbers, one digit per step
    for (int op = 0; op < RIPPLE_OPS; op++) begin
      logic [2*DIGITS-1:0] a, b, r_p, r_t1, r_t2;
      logic [2*DIGITS:0]   expected;
      logic c_p, c_t1, c_t2;
      a = (2*DIGITS)'($urandom);
      b = (2*DIGITS)'($urandom);
      if (op == 0) begin a = '1; b = '0; end   // long carry chain with cin = 1 below
      c_p = (op == 0); c_t1 = (op == 0); c_t2 = (op == 0);
      expected = {1'b0, a} + {1'b0, b} + (2*DIGITS+1)'(op == 0);
      for (int d = 0; d < DIGITS; d++) begin
        p_x  = a[2*d +: 2]; p_y  = b[2*d +: 2]; p_cin  = c_p;
        t1_x = a[2*d +: 2]; t1_y = b[2*d +: 2]; t1_cin = c_t1;
        t2_x = a[2*d +: 2]; t2_y = b[2*d +: 2]; t2_cin = c_t2;
        #1;
        count_mechanisms();
        r_p[2*d +: 2]  = p_sum;  c_p  = p_cout;
        r_t1[2*d +: 2] = t1_sum; c_t1 = t1_cout;
        r_t2[2*d +: 2] = t2_sum; c_t2 = t2_cout;
      end
      checks += 3;
      if ({c_p, r_p} != expected) begin
        failures++;
        $display("FAIL ripple proposed %h + %h = %h, expected %h", a, b, {c_p, r_p}, expected);
      end
      if ({c_t1, r_t1} != expected) begin
        failures++;
        $display("FAIL ripple type1 %h + %h = %h, expected %h", a, b, {c_t1, r_t1}, expected);
      end
      if ({c_t2, r_t2} != expected) begin
        failures++;
        $display("FAIL ripple type2 %h + %h = %h, expected %h", a, b, {c_t2, r_t2}, expected);
      end
    end

    expect_seen("type1 carry pre-addition", n_preadd);
    expect_seen("type1 OR-gate carry path", n_or_path);
    expect_seen("proposed first QHA carry", n_qha1_carry);
    expect_seen("proposed second QHA carry", n_qha2_carry);
    expect_seen("proposed carry out", n_cout_p);
    expect_seen("type1 carry out", n_cout_t1);
    expect_seen("type2 carry out", n_cout_t2);
    for (int k = 0; k < 4; k++) begin
      expect_seen($sformatf("type2 code line Hx%0d", k), n_hx[k]);
      expect_seen($sformatf("type2 code line Hy%0d", k), n_hy[k]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
