// sorter_pkg: types and constants shared by the combination sorter.
//
// The merging modules of a combiner are driven in lock step by one
// controller, SIMD fashion: every cycle the controller broadcasts one
// command (mm_cmd_e) and one cube dimension to all m*m modules. The
// functions below give the widths used on the trees and the cycle counts
// of the trees and of a whole combiner, so that the RTL and its
// testbenches agree on one schedule.
package sorter_pkg;

  // Width of the cube-dimension field that accompanies each command.
  localparam int DIM_W = 5;

  // Commands to the merging modules, in the order a combination uses them.
  typedef enum logic [3:0] {
    MM_IDLE      = 4'd0,   // hold state
    MM_LOAD_LEFT = 4'd1,   // take S_i from the row-tree leaves into the left half
    MM_COPY_DIAG = 4'd2,   // diagonal modules copy the left half into the right half (dimension tau)
    MM_LOAD_RIGHT= 4'd3,   // take S_j from the column-tree leaves into the right half
    MM_REVERSE   = 4'd4,   // right half: unconditional exchange along dimension dim (reverses S_j)
    MM_MERGE     = 4'd5,   // bitonic compare-exchange along dimension dim, exchange recorded
    MM_RETRACE   = 4'd6,   // undo the recorded exchange along dim, carrying rank tokens back
    MM_RANK      = 4'd7,   // partial rank C_ij(l) = merge rank - l
    MM_ACTIVATE  = 4'd8,   // read total ranks, mark the elements that leave through this column
    MM_CONC      = 4'd9,   // concentration step along dim (left half)
    MM_EXPAND    = 4'd10,  // expansion step along dim (left half)
    MM_TRANSFER  = 4'd11   // move the left half into the right half (dimension tau)
  } mm_cmd_e;

  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // Bits of a total rank in an (m,t) combination: log2(m*t).
  function automatic int rank_width(int m, int t);
    return max2(1, $clog2(m * t));
  endfunction

  // Row trees carry data words in phase A and ranks in phase B.
  function automatic int row_tree_width(int m, int t, int q);
    return max2(q, rank_width(m, t));
  endfunction

  // Cycles for a value to cross an m-leaf tree in either direction.
  function automatic int tree_latency(int leaves, bit comb);
    return comb ? leaves : max2(1, $clog2(leaves));
  endfunction

  // Cycles from the clock edge that accepts start to the edge that raises
  // done, for one (m,t)-combiner.
  function automatic int combiner_latency(int m, int t, bit comb);
    int tau, lt;
    tau = $clog2(t);
    lt  = tree_latency(m, comb);
    // phase A: row broadcast, load, diagonal copy, column up+down, load
    // phase B: reverse, merge, retrace, rank, row up+down
    // phase C: activate, concentrate, expand, transfer, column up, output
    return (lt + 1 + 1 + 2 * lt + 1)
         + (tau + (tau + 1) + (tau + 1) + 1 + 2 * lt)
         + (1 + tau + tau + 1 + lt + 1);
  endfunction

endpackage
