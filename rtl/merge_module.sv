// merge_module: merging module M_ij of an (m,t)-combiner.
//
// The module holds 2t cells, numbered like the columns of the CCC that the
// text uses: cells 0..t-1 form the left half (they are the leaves of the row
// trees RT_i(0..t-1)) and cells t..2t-1 the right half (leaves of the
// column trees CT_j(0..t-1)). The cells are linked as a (tau+1)-dimensional
// binary cube, tau = log2(t): along dimension h, cell k talks to cell
// k xor 2^h. Every cycle the combiner's controller issues one command
// (sorter_pkg::mm_cmd_e) and one dimension, and all cells act on it:
//
//   LOAD_LEFT     cell l <- s_i(l) from the row-tree leaf; right half cleared
//   COPY_DIAG     in M_ii only: cell t+l <- cell l (dimension tau)
//   LOAD_RIGHT    cell t+l <- s_j(l) from the column-tree leaf
//   REVERSE h     right half exchanges along h (h = 0..tau-1): S_j reversed,
//                 so the 2t cells hold a bitonic sequence
//   MERGE h       compare-exchange along h (h = tau..0, a DESCEND pass),
//                 smaller key to the lower cell; each cell records whether
//                 it exchanged
//   RETRACE h     (h = 0..tau, an ASCEND pass) undo the recorded exchange.
//                 Elements return to where they were, each carrying a token
//                 holding the cell it reached in the merge: its merge rank.
//   RANK          C_ij(l) = rank of s_i(l) in MERGE(S_i,S_j) minus l,
//                 driven on the row-tree leaves
//   ACTIVATE      read the total rank C_i(l) from the row-tree leaf; s_i(l)
//                 is active if the top log2(m) rank bits equal j. The
//                 concentration target (count of active cells to the left,
//                 from prefix_adder_tree) and the expansion target
//                 (rank mod t) are attached to the element.
//   CONC h        (h = 0..tau-1, ASCEND) active elements move to the
//                 leftmost cells, keeping their order
//   EXPAND h      (h = tau-1..0, DESCEND) active elements move to cell
//                 rank mod t
//   TRANSFER      cell t+l <- cell l (dimension tau); an active cell t+l
//                 drives its word on the column-tree leaf, other cells drive 0
//
// Keys are compared as {value, sequence index, position, half}, which makes
// every element distinct, so ranks are unique even when values repeat. The
// data word itself is Q bits. Every command takes one clock cycle; the
// whole cube works word-parallel, where the text's micromodules are
// bit-serial cells pipelined along the CCC cycles. The merge, the retrace
// of exchange paths, the subtraction of l, the activation rule and the
// concentration/expansion split follow the text; the reversal step, the
// tie-breaking key and the word-parallel cells are this design's choices.
module merge_module
  import sorter_pkg::*;
#(
  parameter int M = 4,     // sequences per combination (m), power of two
  parameter int T = 4,     // words per input sequence (t), power of two
  parameter int Q = 10,    // word length
  parameter int I = 0,     // mesh row of this module
  parameter int J = 0,     // mesh column of this module
  localparam int RTW = row_tree_width(M, T, Q)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mm_cmd_e          cmd,
  input  logic [DIM_W-1:0] dim,
  input  logic [RTW-1:0]   row_in  [T],  // from the row-tree leaves (words, then total ranks)
  output logic [RTW-1:0]   row_out [T],  // partial ranks C_ij(l) to the row-tree leaves
  input  logic [Q-1:0]     col_in  [T],  // from the column-tree leaves (S_j)
  output logic [Q-1:0]     col_out [T]   // outgoing words to the column-tree leaves
);

  localparam int TAU = $clog2(T);
  localparam int MU  = $clog2(M);
  localparam int S   = 2 * T;                 // cells
  localparam int DW  = TAU + 1;               // cell address bits
  localparam int IW  = (MU  > 0) ? MU  : 1;
  localparam int LW  = (TAU > 0) ? TAU : 1;
  localparam int CW  = $clog2(T + 1);         // partial-rank bits
  localparam int RW  = rank_width(M, T);      // total-rank bits

  typedef struct packed {
    logic [Q-1:0]  v;     // data word
    logic [IW-1:0] seq;   // index of the input sequence it came from
    logic [LW-1:0] pos;   // position in that sequence
    logic          half;  // 1 for the copy in the right half of M_ii
  } key_t;

  typedef struct packed {
    key_t          key;
    logic          act;   // cell holds a (valid / active) element
    logic [DW-1:0] tok;   // rank token
    logic [LW-1:0] cdst;  // concentration target
    logic [LW-1:0] edst;  // expansion target
  } cell_t;

  cell_t          c_q [S];
  cell_t          c_d [S];
  logic [TAU:0]   xf_q [S];   // bit h: this cell exchanged along dimension h
  logic [TAU:0]   xf_d [S];
  logic [CW-1:0]  cij_q [T];
  logic [CW-1:0]  cij_d [T];

  // concentration targets
  logic           clash;      // two elements routed to one cell (never happens)
  logic           act_flag [T];
  logic [CW-1:0]  pre      [T];

  for (genvar l = 0; l < T; l++) begin : g_act
    logic [RW-1:0] r;
    assign r = row_in[l][RW-1:0];
    assign act_flag[l] = (MU == 0) ? 1'b1 : (int'(r) >> TAU == J);
  end

  prefix_adder_tree #(.L(T)) u_prefix (
    .flag   (act_flag),
    .prefix (pre)
  );

  function automatic logic bit_of(int k, int h);
    return ((k >> h) & 1) != 0;
  endfunction

  always_comb begin
    int   h, p;
    logic sw, tk, tp, stay, come;
    h    = int'(dim);
    p    = 0;
    sw   = 1'b0;
    tk   = 1'b0;
    tp   = 1'b0;
    stay = 1'b0;
    come = 1'b0;
    clash = 1'b0;
    c_d   = c_q;
    xf_d  = xf_q;
    cij_d = cij_q;
    unique case (cmd)
      MM_LOAD_LEFT: begin
        for (int l = 0; l < T; l++) begin
          c_d[l]          = '0;
          c_d[l].key.v    = row_in[l][Q-1:0];
          c_d[l].key.seq  = IW'(I);
          c_d[l].key.pos  = LW'(l);
          c_d[l].act      = 1'b1;
          c_d[T+l]        = '0;
        end
      end
      MM_COPY_DIAG: begin
        if (I == J)
          for (int l = 0; l < T; l++) begin
            c_d[T+l]          = c_q[l];
            c_d[T+l].key.half = 1'b1;
          end
      end
      MM_LOAD_RIGHT: begin
        for (int l = 0; l < T; l++) begin
          c_d[T+l]          = '0;
          c_d[T+l].key.v    = col_in[l];
          c_d[T+l].key.seq  = IW'(J);
          c_d[T+l].key.pos  = LW'(l);
          c_d[T+l].key.half = 1'b1;
          c_d[T+l].act      = 1'b1;
        end
      end
      MM_REVERSE: begin
        for (int k = T; k < S; k++)
          if (h < TAU) c_d[k] = c_q[k ^ (1 << h)];
      end
      MM_MERGE: begin
        for (int k = 0; k < S; k++) begin
          if (h <= TAU) begin
            p  = (k ^ (1 << h)) & (S - 1);
            // lower cell of the pair keeps the smaller key
            sw = bit_of(k, h) ? (c_q[p].key > c_q[k].key) : (c_q[k].key > c_q[p].key);
            c_d[k]     = sw ? c_q[p] : c_q[k];
            c_d[k].tok = DW'(k);
            xf_d[k][h] = sw;
          end
        end
      end
      MM_RETRACE: begin
        for (int k = 0; k < S; k++) begin
          if (h <= TAU) begin
            p = (k ^ (1 << h)) & (S - 1);
            if (xf_q[k][h]) c_d[k] = c_q[p];
          end
        end
      end
      MM_RANK: begin
        for (int l = 0; l < T; l++)
          cij_d[l] = CW'(int'(c_q[l].tok) - l);
      end
      MM_ACTIVATE: begin
        for (int l = 0; l < T; l++) begin
          c_d[l].act  = act_flag[l];
          c_d[l].cdst = LW'(pre[l]);
          c_d[l].edst = LW'(row_in[l][RW-1:0] & RW'(T - 1));
          c_d[T+l].act = 1'b0;
        end
      end
      MM_CONC, MM_EXPAND: begin
        for (int k = 0; k < T; k++) begin
          if (h < TAU) begin
            p    = (k ^ (1 << h)) & (S - 1);
            tk   = (cmd == MM_CONC) ? c_q[k].cdst[h] : c_q[k].edst[h];
            tp   = (cmd == MM_CONC) ? c_q[p].cdst[h] : c_q[p].edst[h];
            stay = c_q[k].act && (tk == bit_of(k, h));
            come = c_q[p].act && (tp == bit_of(k, h));
            clash = clash | (stay & come);
            if (stay)      c_d[k] = c_q[k];
            else if (come) c_d[k] = c_q[p];
            else           c_d[k].act = 1'b0;
          end
        end
      end
      MM_TRANSFER: begin
        for (int l = 0; l < T; l++) c_d[T+l] = c_q[l];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < S; k++) begin
        c_q[k]  <= '0;
        xf_q[k] <= '0;
      end
      for (int l = 0; l < T; l++) cij_q[l] <= '0;
    end else begin
      c_q   <= c_d;
      xf_q  <= xf_d;
      cij_q <= cij_d;
    end
  end

  for (genvar l = 0; l < T; l++) begin : g_leaf
    assign row_out[l] = RTW'(cij_q[l]);
    assign col_out[l] = c_q[T+l].act ? c_q[T+l].key.v : '0;
  end

  // Concentration and expansion are conflict-free for order-preserving
  // routes: two elements never claim the same cell.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) !clash)
    else $error("merge_module: routing conflict in M_%0d%0d", I, J);

endmodule
