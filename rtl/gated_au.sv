// gated_au: power-optimised 8-bit arithmetic unit with power and input gating.
//
// The AU adds, subtracts or multiplies two operands. It holds two arithmetic
// modules: an 8-bit adder/subtractor (M low adds, M high subtracts) and a
// 4x4 signed Baugh-Wooley multiplier fed with the low four bits of each
// operand. Only one of them works at a time. A 1:2 demultiplexer routes the
// ENABLE input to the module chosen by SELECT; the other module's inputs are
// blocked and its supply is cut. An 8-bit 2:1 multiplexer, driven by the same
// SELECT, passes the working module's result to Y.
//
// Interface:
//   a, b    8-bit operands (the multiplier uses a[3:0] and b[3:0], signed)
//   m       0 add, 1 subtract (au_pkg::au_mode_e)
//   sel     0 adder/subtractor, 1 multiplier (au_pkg::au_sel_e)
//   enable  1 lets the selected module work; 0 switches both off
//   y       8-bit result: sum/difference, or signed product
//   cout    carry out of the adder/subtractor (0 while it is switched off)
// Timing: fully combinational; no clock or reset.
//
// The structure (DEMUX on ENABLE, gated modules, output MUX) follows the
// AU's specification. Which SELECT value picks which module, the use of the
// low operand bits for the multiplier, and y = 0 while enable is low are
// this design's choices.
module gated_au
  import au_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              m,
  input  logic              sel,
  input  logic              enable,
  output logic [DATA_W-1:0] y,
  output logic              cout
);

  logic                en_addsub, en_mul;
  logic [DATA_W-1:0]   addsub_s;
  logic [2*MUL_N-1:0]  mul_p;

  ptl_demux2 u_demux (
    .vin(enable),
    .sel(sel),
    .v1 (en_addsub),
    .v2 (en_mul)
  );

  gated_adder_subtractor #(.WIDTH(DATA_W)) u_addsub (
    .en  (en_addsub),
    .a   (a),
    .b   (b),
    .m   (m),
    .s   (addsub_s),
    .cout(cout)
  );

  gated_multiplier #(.N(MUL_N)) u_mul (
    .en(en_mul),
    .a (a[MUL_N-1:0]),
    .b (b[MUL_N-1:0]),
    .p (mul_p)
  );

  ptl_mux2 #(.WIDTH(DATA_W)) u_mux (
    .a  (addsub_s),
    .b  (mul_p),
    .sel(sel),
    .y  (y)
  );

  // The product goes straight into the result multiplexer.
  if (2 * MUL_N != DATA_W) begin : g_width_check
    $error("gated_au: 2*MUL_N must equal DATA_W");
  end

  // At most one module may be enabled at a time.
  always_comb begin
    assert (!(en_addsub && en_mul))
      else $error("gated_au: both arithmetic modules enabled");
  end

endmodule
