// baugh_wooley_mult: N x N two's-complement Baugh-Wooley array multiplier.
//
// Signed multiplication is turned into an addition of positive partial
// products. Partial product bit pp[i][j] = a[j] & b[i], except that the bits
// where exactly one of i, j is the sign position N-1 are complemented
// (a NAND instead of an AND); the sign-by-sign bit a[N-1] & b[N-1] is kept.
// Two correction ones are added, at weights 2**N and 2**(2N-1). The sum of
// all of these, taken modulo 2**(2N), is the signed product.
//
// The array here is N rows of 2N adder cells: row i adds the partial-product
// row of b[i], shifted left by i, to the running sum; the first row starts
// from the two correction ones. Each row is a half adder in its lowest
// column, where no carry comes in, followed by a ripple of full adders. The
// use of AND gates, half adders and full adders follows the specified
// 4-bit Baugh-Wooley multiplier; the exact cell placement (a row-ripple
// array) is this design's own, and the complemented partial products follow
// the textbook Baugh-Wooley method.
//
// Interface: a, b signed N-bit operands; p the signed 2N-bit product.
// Timing: combinational.
module baugh_wooley_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned PW = 2 * N;

  // Row i of partial products, already shifted to its weight.
  logic [PW-1:0] row [N];

  // The two Baugh-Wooley correction ones.
  localparam logic [PW-1:0] CORR = (PW'(1) << N) | (PW'(1) << (PW - 1));

  always_comb begin
    for (int i = 0; i < N; i++) begin
      row[i] = '0;
      for (int j = 0; j < N; j++) begin
        if ((i == N - 1) != (j == N - 1)) begin
          row[i][i+j] = ~(a[j] & b[i]);
        end else begin
          row[i][i+j] = a[j] & b[i];
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [PW-1:0] sum_in;   // running sum entering this row
    logic [PW-1:0] sum;      // running sum leaving this row
    logic [PW-1:0] c_out;    // carry out of each full adder of the row
    if (i == 0) begin : g_first
      assign sum_in = CORR;
    end else begin : g_next
      assign sum_in = g_row[i-1].sum;
    end
    // Column 0 has no incoming carry: a half adder.
    half_adder u_ha (
      .a   (sum_in[0]),
      .b   (row[i][0]),
      .s   (sum[0]),
      .cout(c_out[0])
    );
    for (genvar k = 1; k < PW; k++) begin : g_col
      full_adder u_fa (
        .a   (sum_in[k]),
        .b   (row[i][k]),
        .cin (c_out[k-1]),
        .s   (sum[k]),
        .cout(c_out[k])
      );
    end
  end

  // The carry out of the top column is dropped: the product is modulo 2**PW.
  assign p = g_row[N-1].sum;

endmodule
