// gated_multiplier_tb: self-check of the gated 4x4 signed multiplier.
// All operand pairs are applied with the enable high (the signed integer
// product is expected) and low (the product must read 0 and the core must
// see all-zero inputs). A watchdog ends the run if it stalls.
module gated_multiplier_tb;

  localparam int N = 4;

  logic           en;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;

  gated_multiplier #(.N(N)) dut (.en(en), .a(a), .b(b), .p(p));

  initial begin
    #1_000_000;
    failures++;
    $display("gated_multiplier_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, prod;
    for (int e = 1; e >= 0; e--) begin
      for (int ia = 0; ia < (1 << N); ia++) begin
        for (int ib = 0; ib < (1 << N); ib++) begin
          a = N'(ia); b = N'(ib); en = e[0];
          sa = (ia >= (1 << (N - 1))) ? ia - (1 << N) : ia;
          sb = (ib >= (1 << (N - 1))) ? ib - (1 << N) : ib;
          prod = e ? sa * sb : 0;
          #1;
          checks++;
          if (int'($signed(p)) != prod) begin
            failures++;
            if (failures < 10)
              $display("FAIL en=%0d %0d * %0d: got %0d, expected %0d", e, sa, sb, $signed(p), prod);
          end
          if (!en) begin
            checks++;
            if (dut.a_g !== '0 || dut.b_g !== '0) begin
              failures++;
              $display("FAIL inputs reach the core while disabled");
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
