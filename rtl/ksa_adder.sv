// Kogge-Stone carry-propagate adder: sum = a + b + cin, with carry out.
//
// Generate/propagate pairs are combined in ceil(log2 W) prefix levels, each
// level doubling the span (1, 2, 4, ...). The carry in is folded into the
// generate signal of bit 0, so every prefix (G, P) of bits [i:0] directly
// gives the carry into bit i+1. The Kogge-Stone adder is the one named for
// both the narrow adders of the carry-save stages and the final adder; the
// width is set by the instantiating stage. Purely combinational.
module ksa_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];
  logic [W-1:0] prop;

  always_comb begin
    prop = a ^ b;
    g[0] = a & b;
    p[0] = prop;
    g[0][0] = (a[0] & b[0]) | (prop[0] & cin);
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
          p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    sum[0] = prop[0] ^ cin;
    for (int unsigned i = 1; i < W; i++) sum[i] = prop[i] ^ g[L][i-1];
    cout = g[L][W-1];
  end

endmodule
