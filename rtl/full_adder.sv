// full_adder: one-bit full adder, the cell of the ripple-carry
// adder/subtractor and of the Baugh-Wooley multiplier array.
// Purely combinational: s = a ^ b ^ cin, cout = majority(a, b, cin).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
