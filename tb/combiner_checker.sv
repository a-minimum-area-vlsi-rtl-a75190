// combiner_checker: testbench helper that drives one combiner instance.
//
// It waits for rst_n, then runs RUNS combinations of M random sorted runs of
// T words. Every other run draws its words from a range of 6 values, so
// that equal words occur within and across runs. For each run it compares
// every output word with a sort of the inputs made here, and checks that
// done arrives exactly combiner_latency(M,T,COMB) cycles after the start
// pulse. When all runs are over it raises finished and holds its counts.
module combiner_checker
  import sorter_pkg::*;
#(
  parameter int M    = 4,
  parameter int T    = 4,
  parameter int Q    = 10,
  parameter bit COMB = 1'b0,
  parameter int RUNS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic         start, busy, done;
  logic [Q-1:0] in_data  [M*T];
  logic [Q-1:0] out_data [M*T];

  combiner #(.M(M), .T(T), .Q(Q), .COMB(COMB)) dut (
    .clk, .rst_n, .start, .in_data, .busy, .done, .out_data);

  initial begin
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    start    = 1'b0;
    foreach (in_data[k]) in_data[k] = '0;
    @(posedge rst_n);
    for (int r = 0; r < RUNS; r++) begin
      int ref_v [];
      int cyc;
      ref_v = new[M*T];
      for (int i = 0; i < M; i++) begin
        int v [];
        v = new[T];
        foreach (v[k]) v[k] = r[0] ? $urandom_range(5) : $urandom_range((1 << Q) - 1);
        v.sort();
        for (int k = 0; k < T; k++) begin
          in_data[i*T + k] = Q'(v[k]);
          ref_v[i*T + k]   = v[k];
        end
      end
      ref_v.sort();
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != combiner_latency(M, T, COMB)) begin
        failures++;
        $display("FAIL (%0d,%0d) comb=%0d latency %0d, expected %0d", M, T, COMB, cyc,
                 combiner_latency(M, T, COMB));
      end
      foreach (ref_v[k]) begin
        checks++;
        if (int'(out_data[k]) != ref_v[k]) begin
          failures++;
          $display("FAIL (%0d,%0d) comb=%0d out[%0d] = %0d, expected %0d", M, T, COMB, k,
                   out_data[k], ref_v[k]);
        end
      end
    end
    finished = 1'b1;
  end

endmodule
