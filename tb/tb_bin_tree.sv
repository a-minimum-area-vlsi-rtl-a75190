// tb_bin_tree: self-checking test of the interconnecting tree.
//
// A full binary tree (8 leaves) and a comb tree (4 leaves) get new random
// leaf and root values; after exactly tree_latency() cycles the root must
// show the sum of the leaves and every leaf the root value, and one cycle
// earlier the broadcast value must not yet have reached the leaves. A second pattern
// drives one non-zero leaf, the selection use of the tree.
module tb_bin_tree;
  import sorter_pkg::*;

  localparam int W = 8;
  localparam int LF = 8, LC = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [W-1:0] rin_f, rout_f, rin_c, rout_c;
  logic [W-1:0] lin_f [LF];
  logic [W-1:0] lout_f [LF];
  logic [W-1:0] lin_c [LC];
  logic [W-1:0] lout_c [LC];

  bin_tree #(.LEAVES(LF), .W(W), .COMB(1'b0)) dut_f (
    .clk, .rst_n, .dn_root_in(rin_f), .dn_leaf_out(lout_f), .up_leaf_in(lin_f), .up_root_out(rout_f));
  bin_tree #(.LEAVES(LC), .W(W), .COMB(1'b1)) dut_c (
    .clk, .rst_n, .dn_root_in(rin_c), .dn_leaf_out(lout_c), .up_leaf_in(lin_c), .up_root_out(rout_c));

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp, input bit equal);
    checks++;
    if ((got == exp) != equal) begin
      failures++;
      $display("FAIL %s: got %0d, %s %0d", what, got, equal ? "expected" : "must differ from", exp);
    end
  endtask

  task automatic trial(input bit one_hot);
    logic [W-1:0] sf, sc;
    int hot;
    sf = '0; sc = '0;
    hot = $urandom_range(LF - 1);
    @(negedge clk);
    // new values that differ from what is in flight
    rin_f = lout_f[0] + W'($urandom_range(1, 200));
    rin_c = lout_c[0] + W'($urandom_range(1, 200));
    for (int k = 0; k < LF; k++) begin
      lin_f[k] = (one_hot && k != hot) ? '0 : W'($urandom);
      sf += lin_f[k];
    end
    for (int k = 0; k < LC; k++) begin
      lin_c[k] = (one_hot && k != hot % LC) ? '0 : W'($urandom);
      sc += lin_c[k];
    end
    // one cycle short of the latency: not there yet (full tree: 3, comb: 4)
    repeat (tree_latency(LF, 1'b0) - 1) @(negedge clk);
    check("full leaf early", lout_f[LF-1], rin_f, 1'b0);
    @(negedge clk);
    check("full root sum", rout_f, sf, 1'b1);
    for (int k = 0; k < LF; k++) check("full leaf broadcast", lout_f[k], rin_f, 1'b1);
    repeat (tree_latency(LC, 1'b1) - tree_latency(LF, 1'b0) - 1) @(negedge clk);
    check("comb leaf early", lout_c[LC-1], rin_c, 1'b0);
    @(negedge clk);
    check("comb root sum", rout_c, sc, 1'b1);
    for (int k = 0; k < LC; k++) check("comb leaf broadcast", lout_c[k], rin_c, 1'b1);
  endtask

  initial begin
    rin_f = '0; rin_c = '0;
    foreach (lin_f[k]) lin_f[k] = '0;
    foreach (lin_c[k]) lin_c[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 50; r++) trial(r[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
