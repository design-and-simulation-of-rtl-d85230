// au_one_bit_tb: the one-bit operation test of the gated AU.
//
// The AU's behaviour was first shown on a single bit: only A0 and B0 change,
// all other operand bits stay 0, ENABLE is high, and SELECT and M step
// through addition, subtraction and multiplication while output bit 0 is
// observed. This test applies every A0/B0 combination in each of those
// modes (and with ENABLE low) and checks the whole 8-bit result and the
// carry against hand-derived values:
//   add:      y = a0 + b0                       cout = 0
//   subtract: y = a0 - b0 (0xFF for 0 - 1)      cout = (a0 >= b0)
//   multiply: y = a0 * b0                       cout = 0
// A watchdog ends the run if it stalls.
module au_one_bit_tb;
  import au_pkg::*;

  logic [DATA_W-1:0] a, b, y;
  logic              m, sel, enable, cout;
  int                checks = 0, failures = 0;

  gated_au dut (
    .a(a), .b(b), .m(m), .sel(sel), .enable(enable), .y(y), .cout(cout)
  );

  initial begin
    #100_000;
    failures++;
    $display("au_one_bit_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic en_i, input logic sel_i, input logic m_i,
                       input logic a0, input logic b0,
                       input logic [7:0] exp_y, input logic exp_c);
    enable = en_i; sel = sel_i; m = m_i;
    a = {7'b0, a0}; b = {7'b0, b0};
    #10;
    checks++;
    if (y !== exp_y || cout !== exp_c) begin
      failures++;
      $display("FAIL en=%0d sel=%0d m=%0d a0=%0d b0=%0d: y=%h cout=%0d, expected %h %0d",
               en_i, sel_i, m_i, a0, b0, y, cout, exp_y, exp_c);
    end
  endtask

  initial begin
    //     en    sel         m      a0    b0    y      cout
    apply(1'b1, SEL_ADDSUB, M_ADD, 1'b0, 1'b0, 8'h00, 1'b0);
    apply(1'b1, SEL_ADDSUB, M_ADD, 1'b0, 1'b1, 8'h01, 1'b0);
    apply(1'b1, SEL_ADDSUB, M_ADD, 1'b1, 1'b0, 8'h01, 1'b0);
    apply(1'b1, SEL_ADDSUB, M_ADD, 1'b1, 1'b1, 8'h02, 1'b0);
    apply(1'b1, SEL_ADDSUB, M_SUB, 1'b0, 1'b0, 8'h00, 1'b1);
    apply(1'b1, SEL_ADDSUB, M_SUB, 1'b0, 1'b1, 8'hFF, 1'b0);
    apply(1'b1, SEL_ADDSUB, M_SUB, 1'b1, 1'b0, 8'h01, 1'b1);
    apply(1'b1, SEL_ADDSUB, M_SUB, 1'b1, 1'b1, 8'h00, 1'b1);
    for (int mm = 0; mm < 2; mm++) begin
      apply(1'b1, SEL_MUL, mm[0], 1'b0, 1'b0, 8'h00, 1'b0);
      apply(1'b1, SEL_MUL, mm[0], 1'b0, 1'b1, 8'h00, 1'b0);
      apply(1'b1, SEL_MUL, mm[0], 1'b1, 1'b0, 8'h00, 1'b0);
      apply(1'b1, SEL_MUL, mm[0], 1'b1, 1'b1, 8'h01, 1'b0);
    end
    for (int t = 0; t < 16; t++) begin
      apply(1'b0, t[0], t[1], t[2], t[3], 8'h00, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
