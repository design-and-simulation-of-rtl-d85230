// half_adder: one-bit half adder, used in the Baugh-Wooley multiplier array
// where a column has no incoming carry. Purely combinational:
// s = a ^ b, cout = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b;
    cout = a & b;
  end

endmodule
