// ptl_mux2: WIDTH-bit 2:1 multiplexer, the AU's output selector.
//
// In the transistor-level AU each bit is a two-transistor pass-transistor
// multiplexer: a PMOS passes input A while SEL is low and an NMOS passes
// input B while SEL is high, both driving the shared output node. Here each
// bit is the logic function of that cell: y = sel ? b : a. WIDTH defaults to
// the AU's 8 bits.
//
// Interface: a (taken when sel=0), b (taken when sel=1), sel, y.
// Timing: combinational.
module ptl_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      y[i] = sel ? b[i] : a[i];
    end
  end

endmodule
