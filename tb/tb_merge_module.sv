// tb_merge_module: self-checking test of one merging module M_ij.
//
// Three modules of a (4,4)-combiner are stepped through the command
// sequence of a combination: M_12 and M_21 (off-diagonal, one of each tie
// order) and M_33 (diagonal, whose right half is filled by COPY_DIAG and
// offered to the column tree; only the diagonal module may offer it).
// After RANK every partial rank C_ij(l) is compared with a count made in
// the testbench: elements of S_j below s_i(l), where an equal element
// counts as below when j < i. Then random strictly increasing total ranks
// are presented; after ACTIVATE, CONC, EXPAND and TRANSFER, cell t+l must
// hold s_i(h) exactly when rank(h) = j*t + l, and drive 0 otherwise.
module tb_merge_module;
  import sorter_pkg::*;

  localparam int M = 4, T = 4, Q = 8, TAU = 2;
  localparam int RTW = row_tree_width(M, T, Q);
  localparam int NI = 3;
  localparam int II [NI] = '{1, 2, 3};
  localparam int JJ [NI] = '{2, 1, 3};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  mm_cmd_e          cmd;
  logic [DIM_W-1:0] dim;
  logic [RTW-1:0]   row_in  [NI][T];
  logic [RTW-1:0]   row_out [NI][T];
  logic [Q-1:0]     col_in  [NI][T];
  logic [Q-1:0]     col_out [NI][T];

  for (genvar n = 0; n < NI; n++) begin : g_dut
    merge_module #(.M(M), .T(T), .Q(Q), .I(II[n]), .J(JJ[n])) dut (
      .clk, .rst_n, .cmd, .dim,
      .row_in(row_in[n]), .row_out(row_out[n]), .col_in(col_in[n]), .col_out(col_out[n]));
  end

  task automatic step(input mm_cmd_e c, input int d);
    @(negedge clk);
    cmd = c;
    dim = DIM_W'(d);
    @(negedge clk);
    cmd = MM_IDLE;
  endtask

  task automatic trial(input int range);
    int si [NI][T];
    int sj [NI][T];
    int rk [NI][T];
    for (int n = 0; n < NI; n++) begin
      int a [];
      int b [];
      a = new[T]; b = new[T];
      foreach (a[k]) a[k] = $urandom_range(range - 1);
      foreach (b[k]) b[k] = $urandom_range(range - 1);
      a.sort(); b.sort();
      for (int k = 0; k < T; k++) begin
        si[n][k] = a[k];
        sj[n][k] = (II[n] == JJ[n]) ? a[k] : b[k];
        row_in[n][k] = RTW'(si[n][k]);
        col_in[n][k] = Q'(sj[n][k]);
      end
    end
    step(MM_LOAD_LEFT, 0);
    step(MM_COPY_DIAG, 0);
    // the diagonal module now offers S_i to its column tree, the others 0
    for (int n = 0; n < NI; n++)
      for (int l = 0; l < T; l++) begin
        checks++;
        if (int'(col_out[n][l]) != ((II[n] == JJ[n]) ? si[n][l] : 0)) begin
          failures++;
          $display("FAIL M_%0d%0d after COPY_DIAG leaf %0d = %0d", II[n], JJ[n], l, col_out[n][l]);
        end
      end
    // only the off-diagonal modules take a right half from the column tree;
    // for M_33 col_in equals S_3, so loading it as well changes nothing
    step(MM_LOAD_RIGHT, 0);
    for (int h = 0; h < TAU; h++) step(MM_REVERSE, h);
    for (int h = TAU; h >= 0; h--) step(MM_MERGE, h);
    for (int h = 0; h <= TAU; h++) step(MM_RETRACE, h);
    step(MM_RANK, 0);
    for (int n = 0; n < NI; n++)
      for (int l = 0; l < T; l++) begin
        int e;
        e = 0;
        if (II[n] == JJ[n]) e = l;
        else
          for (int k = 0; k < T; k++)
            if (sj[n][k] < si[n][l] || (sj[n][k] == si[n][l] && JJ[n] < II[n])) e++;
        checks++;
        if (int'(row_out[n][l]) != e) begin
          failures++;
          $display("FAIL C_%0d%0d(%0d) = %0d, expected %0d", II[n], JJ[n], l, row_out[n][l], e);
        end
      end
    // random distinct increasing total ranks in [0, M*T)
    for (int n = 0; n < NI; n++) begin
      int pool [$];
      for (int r = 0; r < M*T; r++) pool.push_back(r);
      pool.shuffle();
      pool = pool[0:T-1];
      pool.sort();
      for (int l = 0; l < T; l++) begin
        rk[n][l] = pool[l];
        row_in[n][l] = RTW'(pool[l]);
      end
    end
    step(MM_ACTIVATE, 0);
    for (int h = 0; h < TAU; h++) step(MM_CONC, h);
    for (int h = TAU - 1; h >= 0; h--) step(MM_EXPAND, h);
    step(MM_TRANSFER, 0);
    for (int n = 0; n < NI; n++)
      for (int l = 0; l < T; l++) begin
        int e;
        e = 0;
        for (int h = 0; h < T; h++)
          if (rk[n][h] == JJ[n] * T + l) e = si[n][h];
        checks++;
        if (int'(col_out[n][l]) != e) begin
          failures++;
          $display("FAIL M_%0d%0d column leaf %0d = %0d, expected %0d", II[n], JJ[n], l, col_out[n][l], e);
        end
      end
  endtask

  initial begin
    cmd = MM_IDLE;
    dim = '0;
    for (int n = 0; n < NI; n++)
      for (int l = 0; l < T; l++) begin
        row_in[n][l] = '0;
        col_in[n][l] = '0;
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) trial((r % 2 == 0) ? 4 : 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
