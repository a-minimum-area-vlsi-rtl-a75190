// coalescer: (N; T; M*T)-COALESCER. The N input words form N/T sorted runs
// of T words; every block of M consecutive runs is combined into one sorted
// run of M*T words, so the output is N/(M*T) sorted runs.
//
// It is N/(M*T) (M,T)-combiners side by side, one per block, all started
// together; since they run the same schedule they finish together.
// Interface and timing are those of combiner: pulse start while not busy,
// done pulses combiner_latency(M,T,COMB) cycles later with out_data valid.
// The text lays the combiners out as a square array; the arrangement does
// not affect the logic here.
module coalescer #(
  parameter int N    = 16,
  parameter int M    = 4,
  parameter int T    = 1,
  parameter int Q    = 10,
  parameter bit COMB = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [Q-1:0] in_data  [N],
  output logic         busy,
  output logic         done,
  output logic [Q-1:0] out_data [N]
);

  localparam int B  = M * T;     // words per combiner
  localparam int NC = N / B;     // combiners

  logic c_busy [NC];
  logic c_done [NC];

  for (genvar c = 0; c < NC; c++) begin : g_comb
    logic [Q-1:0] cin  [B];
    logic [Q-1:0] cout [B];
    for (genvar k = 0; k < B; k++) begin : g_w
      assign cin[k]            = in_data[c*B + k];
      assign out_data[c*B + k] = cout[k];
    end
    combiner #(.M(M), .T(T), .Q(Q), .COMB(COMB)) u_comb (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .in_data  (cin),
      .busy     (c_busy[c]),
      .done     (c_done[c]),
      .out_data (cout)
    );
  end

  always_comb begin
    busy = 1'b0;
    done = 1'b1;
    for (int c = 0; c < NC; c++) begin
      busy = busy | c_busy[c];
      done = done & c_done[c];
    end
  end

endmodule
