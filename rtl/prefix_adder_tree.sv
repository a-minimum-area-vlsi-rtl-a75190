// prefix_adder_tree: binary tree of adders that computes, for each of L
// flags, how many flags to its left are set (exclusive prefix count), and
// the total.
//
// A merging module needs these counts before it concentrates its active
// elements: the element at left-half position l is sent to column
// prefix[l]. The tree is purely combinational: an up-sweep forms the sum of
// every aligned block of leaves, and a down-sweep hands each node the count
// of everything to the left of its block. Depth is 2*log2(L) adders.
//
// The text assigns this precomputation to a tree of full adders placed
// between the CCC and the row trees; the up-sweep/down-sweep organisation
// is this design's choice. L must be a power of two.
module prefix_adder_tree #(
  parameter int L = 4,
  localparam int CW = $clog2(L + 1)
) (
  input  logic          flag   [L],
  output logic [CW-1:0] prefix [L]
);

  localparam int LG = $clog2(L);

  // up[l][k]: number of set flags in block k of size 2^l
  // dn[l][k]: number of set flags left of block k of size 2^l
  logic [CW-1:0] up [LG+1][L];
  logic [CW-1:0] dn [LG+1][L];

  always_comb begin
    for (int l = 0; l <= LG; l++)
      for (int k = 0; k < L; k++) begin
        up[l][k] = '0;
        dn[l][k] = '0;
      end
    for (int k = 0; k < L; k++) up[0][k] = CW'(flag[k]);
    for (int l = 1; l <= LG; l++)
      for (int k = 0; k < (L >> l); k++)
        up[l][k] = up[l-1][2*k] + up[l-1][2*k+1];
    dn[LG][0] = '0;
    for (int l = LG; l >= 1; l--)
      for (int k = 0; k < (L >> l); k++) begin
        dn[l-1][2*k]   = dn[l][k];
        dn[l-1][2*k+1] = dn[l][k] + up[l-1][2*k];
      end
  end

  for (genvar k = 0; k < L; k++) begin : g_out
    assign prefix[k] = dn[0][k];
  end

endmodule
