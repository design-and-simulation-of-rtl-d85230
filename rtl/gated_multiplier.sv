// gated_multiplier: the Baugh-Wooley multiplier with input gating and power
// gating under a single ENABLE.
//
// While en is high the module behaves exactly as baugh_wooley_mult: p is the
// signed 2N-bit product of the signed N-bit operands. While en is low its
// inputs are blocked (held at 0 by enable_gate banks) and its supply is
// considered cut, so p reads 0. Gating the two operands follows the AU's
// gating scheme; showing the unpowered output as 0 is this design's choice.
//
// Interface: en, a, b (N bits each), p (2N bits). Timing: combinational.
module gated_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic           en,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0]   a_g, b_g;
  logic [2*N-1:0] p_core;

  // Input gating.
  enable_gate #(.WIDTH(N)) u_gate_a (.en(en), .d(a), .q(a_g));
  enable_gate #(.WIDTH(N)) u_gate_b (.en(en), .d(b), .q(b_g));

  baugh_wooley_mult #(.N(N)) u_core (
    .a(a_g),
    .b(b_g),
    .p(p_core)
  );

  // Power gating: no supply, no result.
  enable_gate #(.WIDTH(2 * N)) u_supply (.en(en), .d(p_core), .q(p));

endmodule
