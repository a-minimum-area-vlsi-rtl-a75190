// tb_coalescer: self-checking test of a coalescer, (32; 2 : 8): four
// (4,2)-combiners side by side. The input is 16 sorted runs of 2 words;
// every block of 8 output words must be the sorted contents of the
// corresponding 4 input runs, and done must arrive combiner_latency()
// cycles after start.
module tb_coalescer;
  import sorter_pkg::*;

  localparam int N = 32, M = 4, T = 2, Q = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [Q-1:0] in_data  [N];
  logic [Q-1:0] out_data [N];

  coalescer #(.N(N), .M(M), .T(T), .Q(Q), .COMB(1'b0)) dut (
    .clk, .rst_n, .start, .in_data, .busy, .done, .out_data);

  initial begin
    start = 1'b0;
    foreach (in_data[k]) in_data[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      int cyc;
      int range;
      range = r[0] ? 8 : 1 << Q;
      for (int s = 0; s < N / T; s++) begin
        int v [];
        v = new[T];
        foreach (v[k]) v[k] = $urandom_range(range - 1);
        v.sort();
        for (int k = 0; k < T; k++) in_data[s*T + k] = Q'(v[k]);
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != combiner_latency(M, T, 1'b0)) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc, combiner_latency(M, T, 1'b0));
      end
      for (int b = 0; b < N / (M*T); b++) begin
        int ref_v [];
        ref_v = new[M*T];
        foreach (ref_v[k]) ref_v[k] = int'(in_data[b*M*T + k]);
        ref_v.sort();
        foreach (ref_v[k]) begin
          checks++;
          if (int'(out_data[b*M*T + k]) != ref_v[k]) begin
            failures++;
            $display("FAIL block %0d word %0d = %0d, expected %0d", b, k, out_data[b*M*T + k], ref_v[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
