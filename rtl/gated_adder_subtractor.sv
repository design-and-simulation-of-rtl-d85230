// gated_adder_subtractor: the adder/subtractor with input gating and power
// gating under a single ENABLE.
//
// While en is high the module behaves exactly as adder_subtractor: s is A+B
// (m=0) or A-B (m=1) and cout is the carry out of the chain. While en is low
// its inputs A, B and M are blocked (held at 0 by enable_gate banks), so the
// core sees no transitions, and its supply is considered cut, so s and cout
// read 0. Gating A and B follows the AU's gating scheme; also gating M, and
// showing the unpowered outputs as 0, are this design's choices.
//
// Interface: en, a, b, m, s, cout. Timing: combinational.
module gated_adder_subtractor #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             m,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH-1:0] a_g, b_g, s_core;
  logic             m_g, cout_core;

  // Input gating.
  enable_gate #(.WIDTH(WIDTH)) u_gate_a (.en(en), .d(a), .q(a_g));
  enable_gate #(.WIDTH(WIDTH)) u_gate_b (.en(en), .d(b), .q(b_g));
  enable_gate #(.WIDTH(1))     u_gate_m (.en(en), .d(m), .q(m_g));

  adder_subtractor #(.WIDTH(WIDTH)) u_core (
    .a   (a_g),
    .b   (b_g),
    .m   (m_g),
    .s   (s_core),
    .cout(cout_core)
  );

  // Power gating: no supply, no result.
  enable_gate #(.WIDTH(WIDTH + 1)) u_supply (
    .en(en),
    .d ({cout_core, s_core}),
    .q ({cout, s})
  );

endmodule
