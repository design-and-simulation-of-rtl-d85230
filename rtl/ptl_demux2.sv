// ptl_demux2: 1:2 demultiplexer that routes the AU's ENABLE signal.
//
// In the transistor-level AU this is a two-transistor pass-transistor cell:
// a PMOS passes VIN to V1 while SEL is low and an NMOS passes VIN to V2 while
// SEL is high. The output that is not selected is left undriven there; in
// this two-valued logic model it is held low, so that the module it enables
// stays switched off. That choice is this design's.
//
// Interface: vin (the signal to route), sel, v1 (= vin when sel=0, else 0),
// v2 (= vin when sel=1, else 0). Timing: combinational.
module ptl_demux2 (
  input  logic vin,
  input  logic sel,
  output logic v1,
  output logic v2
);

  always_comb begin
    v1 = vin & ~sel;
    v2 = vin &  sel;
  end

endmodule
