// au_activity_tb: switching-activity workload for the three AU operations.
//
// The AU is evaluated by running each operation (addition, subtraction,
// multiplication) on its own over a stream of operands. This test runs each
// such stream, 2000 random operand pairs per operation with ENABLE high, and
// checks every result against integer arithmetic. Power cannot be simulated
// at this level, so it counts switching activity instead: the bit toggles at
// the AU's operand inputs (what an ungated unit would pass to both modules)
// against the toggles that reach each module's core through its input gates.
// The idle module must see no toggle at all; the working one must see those
// of the operand bits it uses. A watchdog ends the run if it stalls.
module au_activity_tb;
  import au_pkg::*;

  logic [DATA_W-1:0] a, b, y;
  logic              m, sel, enable, cout;
  int                checks = 0, failures = 0;

  gated_au dut (
    .a(a), .b(b), .m(m), .sel(sel), .enable(enable), .y(y), .cout(cout)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("au_activity_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Snapshot of the inputs each module core sees.
  function automatic logic [2*DATA_W:0] addsub_in();
    return {dut.u_addsub.m_g, dut.u_addsub.a_g, dut.u_addsub.b_g};
  endfunction
  function automatic logic [2*MUL_N-1:0] mul_in();
    return {dut.u_mul.a_g, dut.u_mul.b_g};
  endfunction

  initial begin
    static string names [3] = '{"addition", "subtraction", "multiplication"};
    int ia, ib, sa, sb, exp_y, exp_c;
    int t_pins, t_pins_low, t_addsub, t_mul;
    logic [2*DATA_W:0]  prev_as;
    logic [2*MUL_N-1:0] prev_mu;
    logic [DATA_W-1:0]  prev_a, prev_b;

    enable = 1'b1;
    for (int op = 0; op < 3; op++) begin
      sel = (op == 2) ? SEL_MUL : SEL_ADDSUB;
      m   = (op == 1) ? M_SUB : M_ADD;
      a = '0; b = '0;
      #1;
      prev_as = addsub_in(); prev_mu = mul_in(); prev_a = a; prev_b = b;
      t_pins = 0; t_pins_low = 0; t_addsub = 0; t_mul = 0;
      for (int t = 0; t < 2000; t++) begin
        ia = int'($urandom_range(0, 255));
        ib = int'($urandom_range(0, 255));
        a = 8'(ia); b = 8'(ib);
        #1;
        t_pins     += $countones({a ^ prev_a, b ^ prev_b});
        t_pins_low += $countones({a[3:0] ^ prev_a[3:0], b[3:0] ^ prev_b[3:0]});
        t_addsub   += $countones(addsub_in() ^ prev_as);
        t_mul      += $countones(mul_in() ^ prev_mu);
        prev_as = addsub_in(); prev_mu = mul_in(); prev_a = a; prev_b = b;

        exp_c = 0;
        if (op == 0) begin
          exp_y = (ia + ib) % 256;
          exp_c = int'(ia + ib >= 256);
        end else if (op == 1) begin
          exp_y = (ia - ib + 256) % 256;
          exp_c = int'(ia >= ib);
        end else begin
          sa = ((ia % 16) >= 8) ? (ia % 16) - 16 : (ia % 16);
          sb = ((ib % 16) >= 8) ? (ib % 16) - 16 : (ib % 16);
          exp_y = (sa * sb + 256) % 256;
        end
        checks++;
        if (y != 8'(exp_y) || cout != exp_c[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s a=%0d b=%0d: y=%0d cout=%0d, expected %0d %0d",
                     names[op], ia, ib, y, cout, exp_y, exp_c);
        end
      end

      $display("%-14s operand toggles %0d, adder/subtractor core %0d, multiplier core %0d",
               names[op], t_pins, t_addsub, t_mul);
      checks++;
      if (op == 2) begin
        if (t_addsub != 0 || t_mul != t_pins_low) begin
          failures++;
          $display("FAIL %s: gated activity not as expected", names[op]);
        end
      end else begin
        if (t_mul != 0 || t_addsub != t_pins) begin
          failures++;
          $display("FAIL %s: gated activity not as expected", names[op]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
