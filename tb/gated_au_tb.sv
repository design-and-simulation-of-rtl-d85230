// gated_au_tb: end-to-end self-check of the gated 8-bit arithmetic unit at
// its default sizes.
//
// Every 8-bit operand pair is applied with every combination of SELECT, M
// and ENABLE. The expected result comes from integer arithmetic: a+b or a-b
// modulo 256 with its carry (no borrow for a subtraction) while the
// adder/subtractor is selected, the signed product of the low nibbles while
// the multiplier is selected, and 0 on both outputs while ENABLE is low.
// The test also looks inside the design to check the gating itself: the
// module that is not selected must see all-zero inputs (input gating) and
// produce no result (power gating), and the selected one must be fed.
//
// Each mechanism is counted (addition, subtraction, multiplication, carry
// out, borrow, negative product, whole-AU disable, each module gated off);
// one that never happens counts as a failure. A watchdog ends the run.
module gated_au_tb;
  import au_pkg::*;

  logic [DATA_W-1:0] a, b, y;
  logic              m, sel, enable, cout;
  int                checks = 0, failures = 0;

  // Mechanism counters.
  int n_add = 0, n_sub = 0, n_mul = 0, n_carry = 0, n_borrow = 0;
  int n_negprod = 0, n_disabled = 0, n_addsub_off = 0, n_mul_off = 0;

  gated_au dut (
    .a(a), .b(b), .m(m), .sel(sel), .enable(enable), .y(y), .cout(cout)
  );

  initial begin
    #100_000_000;
    failures++;
    $display("gated_au_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: en=%0d sel=%0d m=%0d a=%h b=%h y=%h cout=%0d",
                 what, enable, sel, m, a, b, y, cout);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int exp_y, exp_c, sa, sb;
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 2; s++) begin
        for (int mm = 0; mm < 2; mm++) begin
          for (int ia = 0; ia < 256; ia++) begin
            for (int ib = 0; ib < 256; ib++) begin
              a = 8'(ia); b = 8'(ib); m = mm[0]; sel = s[0]; enable = e[0];
              #1;
              exp_c = 0;
              if (e == 0) begin
                exp_y = 0;
                n_disabled++;
              end else if (s == int'(SEL_ADDSUB)) begin
                if (mm == int'(M_ADD)) begin
                  exp_y = (ia + ib) % 256;
                  exp_c = int'(ia + ib >= 256);
                  n_add++;
                  if (exp_c != 0) n_carry++;
                end else begin
                  exp_y = (ia - ib + 256) % 256;
                  exp_c = int'(ia >= ib);
                  n_sub++;
                  if (exp_c == 0) n_borrow++;
                end
              end else begin
                sa = ((ia % 16) >= 8) ? (ia % 16) - 16 : (ia % 16);
                sb = ((ib % 16) >= 8) ? (ib % 16) - 16 : (ib % 16);
                exp_y = (sa * sb + 256) % 256;
                n_mul++;
                if (sa * sb < 0) n_negprod++;
              end
              check(y == 8'(exp_y) && cout == exp_c[0], "result");

              // Input and power gating of the module that is not working.
              if (!(e == 1 && s == int'(SEL_ADDSUB))) begin
                n_addsub_off++;
                check(dut.u_addsub.a_g == '0 && dut.u_addsub.b_g == '0 &&
                      dut.u_addsub.m_g == 1'b0 && dut.addsub_s == '0,
                      "adder/subtractor not gated off");
              end else begin
                check(dut.u_addsub.a_g == a && dut.u_addsub.b_g == b,
                      "adder/subtractor not fed");
              end
              if (!(e == 1 && s == int'(SEL_MUL))) begin
                n_mul_off++;
                check(dut.u_mul.a_g == '0 && dut.u_mul.b_g == '0 && dut.mul_p == '0,
                      "multiplier not gated off");
              end else begin
                check(dut.u_mul.a_g == a[3:0] && dut.u_mul.b_g == b[3:0],
                      "multiplier not fed");
              end
            end
          end
        end
      end
    end

    $display("gated_au_tb mechanisms:");
    need(n_add,        "addition");
    need(n_sub,        "subtraction");
    need(n_mul,        "multiplication");
    need(n_carry,      "carry out");
    need(n_borrow,     "borrow");
    need(n_negprod,    "negative product");
    need(n_disabled,   "ENABLE low");
    need(n_addsub_off, "adder/subtractor gated off");
    need(n_mul_off,    "multiplier gated off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
