// bin_tree: one interconnecting tree of a combiner (a row tree RT_i(l) or a
// column tree CT_j(l)).
//
// The tree has LEAVES leaves, one per merging module of a row or column,
// and moves a W-bit value in two directions:
//   down: the value on dn_root_in is broadcast to every dn_leaf_out;
//   up:   the leaf values up_leaf_in are summed (mod 2^W) into up_root_out.
// Summing serves two uses: it totals the partial ranks into a global rank,
// and, when all leaves but one drive zero, it selects that one leaf's word
// (this is how a column tree collects its output element).
//
// COMB = 0 builds a full binary tree: every internal node is a register, so
// both directions take log2(LEAVES) cycles. COMB = 1 builds a comb tree: a
// spine of LEAVES registers with one leaf hanging off each, LEAVES cycles in
// either direction, but far less wiring. Inputs must be held stable for the
// whole latency (sorter_pkg::tree_latency); the outputs are then valid.
//
// Tree shapes and depths follow the text; the word-parallel width W (the
// text uses 1-bit bit-serial lines) and the register per node are choices
// of this design. LEAVES must be a power of two.
module bin_tree #(
  parameter int  LEAVES = 4,
  parameter int  W      = 8,
  parameter bit  COMB   = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] dn_root_in,
  output logic [W-1:0] dn_leaf_out [LEAVES],
  input  logic [W-1:0] up_leaf_in  [LEAVES],
  output logic [W-1:0] up_root_out
);

  if (COMB) begin : g_comb
    logic [W-1:0] up_q [LEAVES];
    logic [W-1:0] dn_q [LEAVES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < LEAVES; k++) begin
          up_q[k] <= '0;
          dn_q[k] <= '0;
        end
      end else begin
        for (int k = 0; k < LEAVES; k++) begin
          // spine node k adds its leaf to the partial sum from further out
          if (k == LEAVES - 1) up_q[k] <= up_leaf_in[k];
          else                 up_q[k] <= up_leaf_in[k] + up_q[k+1];
          // broadcast travels outwards along the spine
          if (k == 0) dn_q[k] <= dn_root_in;
          else        dn_q[k] <= dn_q[k-1];
        end
      end
    end

    assign up_root_out = up_q[0];
    for (genvar k = 0; k < LEAVES; k++) begin : g_leaf
      assign dn_leaf_out[k] = dn_q[k];
    end

  end else begin : g_full
    // Heap numbering: node 1 is the root, node n has children 2n and 2n+1,
    // leaves are nodes LEAVES .. 2*LEAVES-1.
    logic [W-1:0] up_q [1:LEAVES-1];
    logic [W-1:0] dn_q [2:2*LEAVES-1];

    function automatic logic [W-1:0] up_val(int n,
                                            logic [W-1:0] nodes [1:LEAVES-1],
                                            logic [W-1:0] leaves [LEAVES]);
      if (n >= LEAVES) return leaves[n - LEAVES];
      return nodes[n];
    endfunction

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int n = 1; n < LEAVES; n++)     up_q[n] <= '0;
        for (int n = 2; n < 2 * LEAVES; n++) dn_q[n] <= '0;
      end else begin
        for (int n = 1; n < LEAVES; n++)
          up_q[n] <= up_val(2 * n, up_q, up_leaf_in) + up_val(2 * n + 1, up_q, up_leaf_in);
        for (int n = 2; n < 2 * LEAVES; n++)
          dn_q[n] <= (n < 4) ? dn_root_in : dn_q[n / 2];
      end
    end

    assign up_root_out = up_q[1];
    for (genvar k = 0; k < LEAVES; k++) begin : g_leaf
      assign dn_leaf_out[k] = dn_q[LEAVES + k];
    end
  end

endmodule
