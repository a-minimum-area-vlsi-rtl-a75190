// tb_combination_sorter: end-to-end test of the three-stage sorter at a
// reduced size, N = 64 words: stage 1 (64;1:2), stage 2 (64;2:8) with full
// trees, stage 3 (64;8:64) with comb trees, an (8,8)-combiner whose comb
// trees have the same 8 leaves as at the default size.
//
// Each run sorts random words (every other run from a range of 6 values,
// so that equal keys are common) and checks the output against a sort made
// in the testbench, and the latency against the sum of the three combiner
// latencies plus one cycle for each of the two stage hand-overs.
// Monitors inside the second and third stage count how often
// each mechanism of a combination happens: diagonal copies, compare-
// exchanges that swap, elements inhibited at activation, concentration and
// expansion moves, plus equal input words and completed full- and
// comb-tree stages. A mechanism that never happens counts as a failure.
module tb_combination_sorter;
  import sorter_pkg::*;

  localparam int N = 64, Q = 10, M1 = 2, M2 = 4, M3 = N / (M1 * M2);
  localparam int T2 = M1, T3 = M1 * M2;
  localparam int RUNS = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [Q-1:0] in_data  [N];
  logic [Q-1:0] out_data [N];

  combination_sorter #(.N(N), .Q(Q), .M1(M1), .M2(M2)) dut (
    .clk, .rst_n, .start, .in_data, .busy, .done, .out_data);

  // mechanism counters
  int n_diag = 0, n_swap = 0, n_inhibit = 0, n_conc = 0, n_expand = 0;
  int n_ties = 0, n_full_stage = 0, n_comb_stage = 0;

  always @(posedge clk) begin
    if (dut.done1) n_full_stage++;
    if (dut.done2) n_full_stage++;
    if (dut.done)  n_comb_stage++;
  end

  // one monitor per merging module of the stage-2 combiner 0 and of the
  // stage-3 combiner
  `define MM_MONITOR(PATH, TT) \
    always @(posedge clk) begin \
      case (PATH.cmd) \
        MM_COPY_DIAG: if (PATH.c_d[TT].act && !PATH.c_q[TT].act) n_diag++; \
        MM_MERGE:     for (int k = 0; k < 2*TT; k++) if (PATH.xf_d[k][PATH.dim]) n_swap++; \
        MM_ACTIVATE:  for (int l = 0; l < TT; l++) if (!PATH.act_flag[l]) n_inhibit++; \
        MM_CONC:      for (int k = 0; k < TT; k++) \
                        if (PATH.c_d[k].act && (!PATH.c_q[k].act || PATH.c_d[k].key != PATH.c_q[k].key)) n_conc++; \
        MM_EXPAND:    for (int k = 0; k < TT; k++) \
                        if (PATH.c_d[k].act && (!PATH.c_q[k].act || PATH.c_d[k].key != PATH.c_q[k].key)) n_expand++; \
        default: ; \
      endcase \
    end

  for (genvar i = 0; i < M2; i++) begin : g_m2r
    for (genvar j = 0; j < M2; j++) begin : g_m2c
      `MM_MONITOR(dut.u_stage2.g_comb[0].u_comb.g_row[i].g_col[j].u_mm, T2)
    end
  end
  for (genvar i = 0; i < M3; i++) begin : g_m3r
    for (genvar j = 0; j < M3; j++) begin : g_m3c
      `MM_MONITOR(dut.u_stage3.g_comb[0].u_comb.g_row[i].g_col[j].u_mm, T3)
    end
  end

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("mechanism %-22s %0d", what, n);
  endtask

  initial begin
    int lat;
    lat = combiner_latency(M1, 1, 1'b0) + combiner_latency(M2, T2, 1'b0)
        + combiner_latency(M3, T3, 1'b1) + 2;   // one cycle per stage hand-over
    start = 1'b0;
    foreach (in_data[k]) in_data[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      int ref_v [];
      int cyc;
      ref_v = new[N];
      foreach (in_data[k]) begin
        in_data[k] = Q'(r[0] ? $urandom_range(5) : $urandom_range((1 << Q) - 1));
        ref_v[k]   = int'(in_data[k]);
      end
      ref_v.sort();
      for (int k = 1; k < N; k++) if (ref_v[k] == ref_v[k-1]) n_ties++;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during a run");
      end
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != lat) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc, lat);
      end
      foreach (ref_v[k]) begin
        checks++;
        if (int'(out_data[k]) != ref_v[k]) begin
          failures++;
          $display("FAIL run %0d out[%0d] = %0d, expected %0d", r, k, out_data[k], ref_v[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL busy high after done");
      end
    end
    $display("sort latency %0d cycles", lat);
    expect_count("diagonal copy", n_diag);
    expect_count("swapping exchange", n_swap);
    expect_count("inhibited element", n_inhibit);
    expect_count("concentration move", n_conc);
    expect_count("expansion move", n_expand);
    expect_count("equal keys", n_ties);
    expect_count("full-tree stage", n_full_stage);
    expect_count("comb-tree stage", n_comb_stage);
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
