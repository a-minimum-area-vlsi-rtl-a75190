// combiner: (m,t)-COMBINER. Combines M sorted sequences of T words into one
// sorted sequence of M*T words.
//
// Structure (orthogonal trees with merging modules at the leaves): an M x M
// mesh of merge_module instances M_ij; for every row i and every position l
// a row tree RT_i(l) whose leaves are cell l of M_i0 .. M_i,M-1; for every
// column j and position l a column tree CT_j(l) whose leaves are cell T+l
// of M_0j .. M_M-1,j. A single controller steps all modules through the
// three phases of the combination:
//
//   A  s_i(l) enters at the root of RT_i(l) and is broadcast along row i.
//      The diagonal module M_jj copies S_j into its right half and sends it
//      up CT_j(l); the root sends it back down to all of column j.
//   B  Every M_ij merges S_i with S_j, retraces the exchanges and puts the
//      partial rank C_ij(l) (elements of S_j below s_i(l)) on its row-tree
//      leaf. RT_i(l) sums them into the total rank C_i(l) = rank of s_i(l)
//      in the output, and broadcasts it back along the row.
//   C  M_ij keeps the elements whose rank has j in its top log2(M) bits,
//      moves each to cell T + (rank mod T), and CT_j(l) collects the one
//      element of column j sent there: output word j*T+l.
//
// Interface: in_data[i*T+l] = s_i(l); each S_i must be sorted ascending.
// Pulse start for one cycle while not busy; in_data is sampled then. done
// pulses for one cycle exactly sorter_pkg::combiner_latency(M,T,COMB)
// cycles later, with out_data sorted ascending (held until the next done).
// COMB selects comb trees instead of full binary trees (section 4.1).
// The phase sequence follows the text; the cycle-by-cycle schedule, the
// start/done handshake and the word-parallel trees are this design's own.
module combiner
  import sorter_pkg::*;
#(
  parameter int M    = 4,
  parameter int T    = 4,
  parameter int Q    = 10,
  parameter bit COMB = 1'b0,
  localparam int N   = M * T
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] in_data  [N],
  output logic         busy,
  output logic         done,
  output logic [Q-1:0] out_data [N]
);

  localparam int TAU = $clog2(T);
  localparam int LT  = tree_latency(M, COMB);
  localparam int RTW = row_tree_width(M, T, Q);

  typedef enum logic [4:0] {
    S_IDLE, S_RT_BCAST, S_LOAD_LEFT, S_COPY_DIAG, S_CT_UP, S_CT_DN,
    S_LOAD_RIGHT, S_REVERSE, S_MERGE, S_RETRACE, S_RANK, S_RT_UP, S_RT_DN,
    S_ACTIVATE, S_CONC, S_EXPAND, S_TRANSFER, S_CT_OUT, S_OUT
  } state_e;

  // cycles spent in each state
  function automatic int state_len(state_e s);
    case (s)
      S_RT_BCAST, S_CT_UP, S_CT_DN, S_RT_UP, S_RT_DN, S_CT_OUT: return LT;
      S_REVERSE, S_CONC, S_EXPAND:                              return TAU;
      S_MERGE, S_RETRACE:                                       return TAU + 1;
      default:                                                  return 1;
    endcase
  endfunction

  // next state, skipping states of length zero (T = 1 has no reversal,
  // concentration or expansion)
  function automatic state_e next_state(state_e s);
    state_e n;
    n = (s == S_OUT) ? S_IDLE : state_e'(int'(s) + 1);
    // at most two zero-length states follow one another (CONC, EXPAND)
    for (int k = 0; k < 2; k++)
      if (n != S_IDLE && state_len(n) == 0) n = state_e'(int'(n) + 1);
    return n;
  endfunction

  state_e          state;
  logic [7:0]      cnt;
  logic [Q-1:0]    in_q [N];
  mm_cmd_e         cmd;
  logic [DIM_W-1:0] dim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      for (int k = 0; k < N; k++) in_q[k] <= '0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        if (start) begin
          in_q  <= in_data;
          state <= S_RT_BCAST;
          cnt   <= '0;
        end
      end else if (int'(cnt) == state_len(state) - 1) begin
        cnt   <= '0;
        state <= next_state(state);
        if (state == S_OUT) done <= 1'b1;
      end else begin
        cnt <= cnt + 8'd1;
      end
    end
  end

  assign busy = (state != S_IDLE);

  // command broadcast to every merging module
  always_comb begin
    cmd = MM_IDLE;
    dim = '0;
    case (state)
      S_LOAD_LEFT:  cmd = MM_LOAD_LEFT;
      S_COPY_DIAG:  cmd = MM_COPY_DIAG;
      S_LOAD_RIGHT: cmd = MM_LOAD_RIGHT;
      S_REVERSE:    begin cmd = MM_REVERSE;  dim = DIM_W'(cnt); end
      S_MERGE:      begin cmd = MM_MERGE;    dim = DIM_W'(TAU - int'(cnt)); end
      S_RETRACE:    begin cmd = MM_RETRACE;  dim = DIM_W'(cnt); end
      S_RANK:       cmd = MM_RANK;
      S_ACTIVATE:   cmd = MM_ACTIVATE;
      S_CONC:       begin cmd = MM_CONC;     dim = DIM_W'(cnt); end
      S_EXPAND:     begin cmd = MM_EXPAND;   dim = DIM_W'(TAU - 1 - int'(cnt)); end
      S_TRANSFER:   cmd = MM_TRANSFER;
      default:      ;
    endcase
  end

  // leaf-side signals, indexed [row][column][position]
  logic [RTW-1:0] rt_dn   [M][M][T];   // RT_i(l) leaf j -> M_ij
  logic [RTW-1:0] rt_up   [M][M][T];   // M_ij -> RT_i(l) leaf j
  logic [Q-1:0]   ct_dn   [M][M][T];   // CT_j(l) leaf i -> M_ij
  logic [Q-1:0]   ct_up   [M][M][T];   // M_ij -> CT_j(l) leaf i
  logic [RTW-1:0] rt_root_up [M][T];
  logic [Q-1:0]   ct_root_up [M][T];

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      merge_module #(.M(M), .T(T), .Q(Q), .I(i), .J(j)) u_mm (
        .clk     (clk),
        .rst_n   (rst_n),
        .cmd     (cmd),
        .dim     (dim),
        .row_in  (rt_dn[i][j]),
        .row_out (rt_up[i][j]),
        .col_in  (ct_dn[i][j]),
        .col_out (ct_up[i][j])
      );
    end
  end

  for (genvar a = 0; a < M; a++) begin : g_tree
    for (genvar l = 0; l < T; l++) begin : g_pos
      // row tree RT_a(l): leaves are M_a0 .. M_a,M-1
      logic [RTW-1:0] rdn [M];
      logic [RTW-1:0] rup [M];
      logic [RTW-1:0] rroot_in;
      // column tree CT_a(l): leaves are M_0a .. M_M-1,a
      logic [Q-1:0]   cdn [M];
      logic [Q-1:0]   cup [M];

      // phase A broadcasts the input word, phase B the summed rank
      assign rroot_in = (state == S_RT_DN) ? rt_root_up[a][l] : RTW'(in_q[a*T + l]);

      for (genvar k = 0; k < M; k++) begin : g_leaf
        assign rt_dn[a][k][l] = rdn[k];
        assign rup[k]         = rt_up[a][k][l];
        assign ct_dn[k][a][l] = cdn[k];
        assign cup[k]         = ct_up[k][a][l];
      end

      bin_tree #(.LEAVES(M), .W(RTW), .COMB(COMB)) u_rt (
        .clk         (clk),
        .rst_n       (rst_n),
        .dn_root_in  (rroot_in),
        .dn_leaf_out (rdn),
        .up_leaf_in  (rup),
        .up_root_out (rt_root_up[a][l])
      );

      bin_tree #(.LEAVES(M), .W(Q), .COMB(COMB)) u_ct (
        .clk         (clk),
        .rst_n       (rst_n),
        .dn_root_in  (ct_root_up[a][l]),
        .dn_leaf_out (cdn),
        .up_leaf_in  (cup),
        .up_root_out (ct_root_up[a][l])
      );
    end
  end

  // the root of CT_j(l) delivers output word j*T + l
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) out_data[k] <= '0;
    end else if (state == S_OUT) begin
      for (int j = 0; j < M; j++)
        for (int l = 0; l < T; l++)
          out_data[j*T + l] <= ct_root_up[j][l];
    end
  end

endmodule
