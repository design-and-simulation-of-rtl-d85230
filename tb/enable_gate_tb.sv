// enable_gate_tb: self-check of the gating switch bank. Random words are
// applied with the enable high (the word must pass) and low (the output must
// stay 0). A watchdog ends the run if it stalls.
module enable_gate_tb;

  localparam int W = 8;

  logic         en;
  logic [W-1:0] d, q;
  int           checks = 0, failures = 0;

  enable_gate #(.WIDTH(W)) dut (.en(en), .d(d), .q(q));

  initial begin
    #1_000_000;
    failures++;
    $display("enable_gate_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      d = W'($urandom); en = t[0];
      #1;
      checks++;
      if (q !== (en ? d : '0)) begin
        failures++;
        $display("FAIL en=%0d d=%h q=%h", en, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
