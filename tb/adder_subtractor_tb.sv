// adder_subtractor_tb: exhaustive self-check of the 8-bit adder/subtractor.
// Every pair of operands is applied in both modes. The expected sum,
// difference and carry are computed with plain integer arithmetic: for an
// addition the carry is bit 8 of a+b, for a subtraction it is 1 exactly when
// a >= b (no borrow). A watchdog ends the run if it stalls.
module adder_subtractor_tb;

  localparam int W = 8;

  logic [W-1:0] a, b, s;
  logic         m, cout;
  int           checks = 0, failures = 0;

  adder_subtractor #(.WIDTH(W)) dut (.a(a), .b(b), .m(m), .s(s), .cout(cout));

  initial begin
    #10_000_000;
    failures++;
    $display("adder_subtractor_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, exp_c;
    for (int mm = 0; mm < 2; mm++) begin
      for (int ia = 0; ia < (1 << W); ia++) begin
        for (int ib = 0; ib < (1 << W); ib++) begin
          a = W'(ia); b = W'(ib); m = mm[0];
          #1;
          if (mm == 0) begin
            exp_s = (ia + ib) % (1 << W);
            exp_c = (ia + ib) >= (1 << W);
          end else begin
            exp_s = (ia - ib + (1 << W)) % (1 << W);
            exp_c = ia >= ib;
          end
          checks++;
          if (s !== W'(exp_s) || cout !== exp_c[0]) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%0d a=%0d b=%0d: s=%0d cout=%0d, expected %0d %0d",
                       mm, ia, ib, s, cout, exp_s, exp_c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
