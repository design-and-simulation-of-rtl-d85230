// enable_gate: a bank of WIDTH gating switches controlled by one ENABLE.
//
// Input gating puts a switch, driven by a module's ENABLE, in series with
// each of the module's inputs, so that a module that is not needed sees no
// input transitions and does not switch. In the transistor-level AU the
// switch is an NMOS pass transistor; here it is its logic function: q follows
// d while en is high and is held at 0 while en is low (a two-valued model of
// the blocked input, this design's choice).
//
// The gated AU modules also use this cell at their outputs to model power
// gating: a module whose supply is cut produces no result, shown as 0.
//
// Interface: en, d (WIDTH bits), q (WIDTH bits). Timing: combinational.
module enable_gate #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  assign q = en ? d : '0;

endmodule
