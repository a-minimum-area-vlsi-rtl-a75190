// tb_combiner: self-checking test of the (m,t)-combiner in five shapes,
// each driven by its own combiner_checker:
//   (4,1) full trees  - a stage-1 combiner of the default sorter
//   (8,4) full trees  - a stage-2 combiner of the default sorter
//   (4,4) full trees
//   (4,2) comb trees
//   (2,8) comb trees
// Each checker compares every output word with a reference sort of its
// random inputs (with many equal words) and checks the latency.
module tb_combiner;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  logic fin [NC];
  int   chk [NC];
  int   fl  [NC];

  combiner_checker #(.M(4), .T(1), .COMB(1'b0), .RUNS(30)) u_c0 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  combiner_checker #(.M(8), .T(4), .COMB(1'b0), .RUNS(20)) u_c1 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  combiner_checker #(.M(4), .T(4), .COMB(1'b0), .RUNS(30)) u_c2 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  combiner_checker #(.M(4), .T(2), .COMB(1'b1), .RUNS(30)) u_c3 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  combiner_checker #(.M(2), .T(8), .COMB(1'b1), .RUNS(30)) u_c4 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));

  function automatic bit all_done();
    for (int k = 0; k < NC; k++) if (!fin[k]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!all_done()) @(negedge clk);
    checks = 0;
    failures = 0;
    for (int k = 0; k < NC; k++) begin
      checks   += chk[k];
      failures += fl[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3] + chk[4],
             fl[0] + fl[1] + fl[2] + fl[3] + fl[4] + 1);
    $finish;
  end

endmodule
