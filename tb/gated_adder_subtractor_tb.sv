// gated_adder_subtractor_tb: self-check of the gated adder/subtractor.
// Random operands and modes are applied with the enable high (result must be
// the integer sum or difference and its carry) and low (outputs must read 0,
// and the core must see blocked, all-zero inputs). A watchdog ends the run.
module gated_adder_subtractor_tb;

  localparam int W = 8;

  logic         en, m, cout;
  logic [W-1:0] a, b, s;
  int           checks = 0, failures = 0;

  gated_adder_subtractor #(.WIDTH(W)) dut (
    .en(en), .a(a), .b(b), .m(m), .s(s), .cout(cout)
  );

  initial begin
    #1_000_000;
    failures++;
    $display("gated_adder_subtractor_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, exp_s, exp_c;
    for (int t = 0; t < 4000; t++) begin
      ia = int'($urandom_range(0, (1 << W) - 1));
      ib = int'($urandom_range(0, (1 << W) - 1));
      a = W'(ia); b = W'(ib); m = t[0]; en = t[1];
      #1;
      if (en) begin
        exp_s = m ? (ia - ib + (1 << W)) % (1 << W) : (ia + ib) % (1 << W);
        exp_c = m ? int'(ia >= ib) : int'(ia + ib >= (1 << W));
      end else begin
        exp_s = 0;
        exp_c = 0;
        checks++;
        if (dut.a_g !== '0 || dut.b_g !== '0 || dut.m_g !== 1'b0) begin
          failures++;
          $display("FAIL inputs reach the core while disabled");
        end
      end
      checks++;
      if (s !== W'(exp_s) || cout !== exp_c[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL en=%0d m=%0d a=%0d b=%0d: s=%0d cout=%0d, expected %0d %0d",
                   en, m, ia, ib, s, cout, exp_s, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
