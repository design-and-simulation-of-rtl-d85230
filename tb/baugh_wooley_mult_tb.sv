// baugh_wooley_mult_tb: exhaustive self-check of the 4x4 signed
// Baugh-Wooley multiplier. Each operand pair is read as two signed integers
// (-8..7), multiplied with integer arithmetic, and the 8-bit two's-complement
// product is compared. A watchdog ends the run if it stalls.
module baugh_wooley_mult_tb;

  localparam int N = 4;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;

  baugh_wooley_mult #(.N(N)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1_000_000;
    failures++;
    $display("baugh_wooley_mult_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, prod;
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia); b = N'(ib);
        sa = (ia >= (1 << (N - 1))) ? ia - (1 << N) : ia;
        sb = (ib >= (1 << (N - 1))) ? ib - (1 << N) : ib;
        prod = sa * sb;
        #1;
        checks++;
        if (int'($signed(p)) != prod) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d: got %0d (0x%h), expected %0d", sa, sb, $signed(p), p, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
