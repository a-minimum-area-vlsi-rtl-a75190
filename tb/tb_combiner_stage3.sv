// tb_combiner_stage3: the last stage of the default sorter on its own: one
// (8,32)-combiner with comb trees, as used by combination_sorter at
// N = 256. Eight random sorted runs of 32 words (every other run drawn
// from 8 values, so that most words have equals) are combined; every
// output word is compared with a sort made in the testbench and the
// latency with combiner_latency(8, 32, comb) = 82 cycles.
module tb_combiner_stage3;
  import sorter_pkg::*;

  localparam int M = 8, T = 32, Q = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [Q-1:0] in_data  [M*T];
  logic [Q-1:0] out_data [M*T];

  combiner #(.M(M), .T(T), .Q(Q), .COMB(1'b1)) dut (
    .clk, .rst_n, .start, .in_data, .busy, .done, .out_data);

  initial begin
    start = 1'b0;
    foreach (in_data[k]) in_data[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      int ref_v [];
      int cyc;
      ref_v = new[M*T];
      for (int i = 0; i < M; i++) begin
        int v [];
        v = new[T];
        foreach (v[k]) v[k] = r[0] ? $urandom_range(7) : $urandom_range((1 << Q) - 1);
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
      if (cyc != 82) begin
        failures++;
        $display("FAIL latency %0d, expected 82", cyc);
      end
      foreach (ref_v[k]) begin
        checks++;
        if (int'(out_data[k]) != ref_v[k]) begin
          failures++;
          $display("FAIL run %0d out[%0d] = %0d, expected %0d", r, k, out_data[k], ref_v[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
