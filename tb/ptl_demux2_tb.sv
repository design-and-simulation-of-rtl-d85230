// ptl_demux2_tb: exhaustive self-check of the 1:2 ENABLE demultiplexer
// against its truth table (v1 = vin when sel=0, v2 = vin when sel=1, the
// other output low). A watchdog ends the run if it stalls.
module ptl_demux2_tb;

  logic vin, sel, v1, v2;
  int   checks = 0, failures = 0;

  ptl_demux2 dut (.vin(vin), .sel(sel), .v1(v1), .v2(v2));

  initial begin
    #100_000;
    failures++;
    $display("ptl_demux2_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {vin, sel} -> {v1, v2}
    static logic [1:0] expected [4] = '{2'b00, 2'b00, 2'b10, 2'b01};
    for (int r = 0; r < 3; r++) begin
      for (int t = 0; t < 4; t++) begin
        {vin, sel} = 2'(t);
        #1;
        checks++;
        if ({v1, v2} !== expected[t]) begin
          failures++;
          $display("FAIL vin=%0d sel=%0d: v1=%0d v2=%0d", vin, sel, v1, v2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
