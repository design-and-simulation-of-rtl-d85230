// adder_subtractor: WIDTH-bit ripple-carry adder/subtractor.
//
// Each bit of B passes through an XOR gate controlled by M and then into a
// chain of WIDTH full adders whose carry-in is M. With M low the chain
// computes A + B; with M high it computes A + ~B + 1 = A - B in two's
// complement. This XOR-row-plus-full-adder-chain structure and the M polarity
// are the AU's specified ones; WIDTH defaults to the AU's 8 bits.
//
// Interface: a, b operands; m selects add (0) or subtract (1); s is the
// WIDTH-bit result (modulo 2**WIDTH); cout is the carry out of the top full
// adder (for a subtraction, cout=1 means no borrow, i.e. a >= b unsigned).
// Timing: combinational, a ripple of WIDTH full adders.
module adder_subtractor #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             m,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH-1:0] b_x;     // B after the XOR row
  logic [WIDTH-1:0] c_out;   // carry out of each full adder

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic c_in;
    if (i == 0) begin : g_first
      assign c_in = m;
    end else begin : g_next
      assign c_in = c_out[i-1];
    end
    assign b_x[i] = b[i] ^ m;
    full_adder u_fa (
      .a   (a[i]),
      .b   (b_x[i]),
      .cin (c_in),
      .s   (s[i]),
      .cout(c_out[i])
    );
  end

  assign cout = c_out[WIDTH-1];

endmodule
