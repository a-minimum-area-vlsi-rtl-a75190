// combination_sorter: sorts N words of Q bits in O(log N) time with a
// cascade of three coalescers (COMBINE-SORT with d = 3 stages):
//
//   stage 1  (N; 1    : M1      )  full-tree combiners (M1, 1)
//   stage 2  (N; M1   : M1*M2   )  full-tree combiners (M2, M1)
//   stage 3  (N; M1*M2: N       )  one comb-tree combiner (M3, M1*M2)
//
// with M1 = N/log^2 N, M2 = log N and M3 = N/(M1*M2) = log N by default, the
// factorisation of the minimum-area sorter. The first stage sorts blocks
// of M1 words, the second merges M2 of those blocks at a time, the last
// combines the M3 remaining runs. The comb trees of the last stage are
// cheap because their depth M3 = log N is no more than the word length.
//
// Interface: pulse start for one cycle while not busy, with the N words on
// in_data (any order). done pulses once when out_data holds them in
// ascending order; out_data stays until the next run. Latency is the sum
// of the three combiner latencies (sorter_pkg::combiner_latency) plus 2:
// a stage's done is the next stage's start, which costs one cycle per
// hand-over.
// N = 256 and Q = 10 (word length (1+eps) log N with eps = 1/4) are this
// design's defaults; N, M1 and M2 may be set to any powers of two with
// M1, M2, M3 >= 2. The stage structure follows the text.
module combination_sorter #(
  parameter int N  = 256,
  parameter int Q  = 10,
  parameter int M1 = N / ($clog2(N) * $clog2(N)),
  parameter int M2 = $clog2(N),
  localparam int M3 = N / (M1 * M2)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] in_data  [N],
  output logic         busy,
  output logic         done,
  output logic [Q-1:0] out_data [N]
);

  logic [Q-1:0] d1 [N];
  logic [Q-1:0] d2 [N];
  logic         done1, done2;
  logic         busy1, busy2, busy3;

  coalescer #(.N(N), .M(M1), .T(1), .Q(Q), .COMB(1'b0)) u_stage1 (
    .clk (clk), .rst_n (rst_n), .start (start), .in_data (in_data),
    .busy (busy1), .done (done1), .out_data (d1)
  );

  coalescer #(.N(N), .M(M2), .T(M1), .Q(Q), .COMB(1'b0)) u_stage2 (
    .clk (clk), .rst_n (rst_n), .start (done1), .in_data (d1),
    .busy (busy2), .done (done2), .out_data (d2)
  );

  coalescer #(.N(N), .M(M3), .T(M1 * M2), .Q(Q), .COMB(1'b1)) u_stage3 (
    .clk (clk), .rst_n (rst_n), .start (done2), .in_data (d2),
    .busy (busy3), .done (done), .out_data (out_data)
  );

  // a run is in progress from start until the last stage is done
  logic run_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     run_q <= 1'b0;
    else if (start) run_q <= 1'b1;
    else if (done)  run_q <= 1'b0;
  end
  assign busy = run_q | busy1 | busy2 | busy3;

endmodule
