// ptl_mux2_tb: self-check of the 8-bit 2:1 output multiplexer with random
// words on both inputs and both select values. A watchdog ends the run if it
// stalls.
module ptl_mux2_tb;

  localparam int W = 8;

  logic [W-1:0] a, b, y;
  logic         sel;
  int           checks = 0, failures = 0;

  ptl_mux2 #(.WIDTH(W)) dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("ptl_mux2_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = W'($urandom); b = W'($urandom); sel = t[0];
      #1;
      checks++;
      if (y !== (t[0] ? b : a)) begin
        failures++;
        $display("FAIL sel=%0d a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
