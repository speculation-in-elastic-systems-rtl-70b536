// prefix_adder: W-bit parallel-prefix (Kogge-Stone) adder.
//
// Bit generate/propagate pairs are combined in log2(W) levels of the prefix
// operator (g, p) o (g', p') = (g | p & g', p & p'), giving every carry in
// logarithmic depth; sum = p ^ carry. Purely combinational:
// {cout, sum} = a + b + cin. The Kogge-Stone topology is this design's choice
// of prefix network.
module prefix_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = $clog2(W + 1);

  logic [W:0] g [LEVELS+1];
  logic [W:0] p [LEVELS+1];

  always_comb begin
    // position 0 carries cin as a generate; positions 1..W are the bits
    g[0][0] = cin;
    p[0][0] = 1'b0;
    for (int i = 0; i < W; i++) begin
      g[0][i+1] = a[i] & b[i];
      p[0][i+1] = a[i] ^ b[i];
    end
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i <= W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    for (int i = 0; i < W; i++) sum[i] = p[0][i+1] ^ g[LEVELS][i];
    cout = g[LEVELS][W];
  end

endmodule
