// tb_prefix_adder_tree: self-checking test of the prefix adder tree.
// Random flag vectors (and the all-set and all-clear cases) on 8 and 1
// leaves; each prefix output is compared with a running count made in the
// testbench.
module tb_prefix_adder_tree;

  localparam int L = 8;
  int checks = 0, failures = 0;

  logic       flag [L];
  logic [3:0] prefix [L];
  logic       flag1 [1];
  logic [0:0] prefix1 [1];

  prefix_adder_tree #(.L(L)) dut (.flag(flag), .prefix(prefix));
  prefix_adder_tree #(.L(1)) dut1 (.flag(flag1), .prefix(prefix1));

  initial begin
    for (int r = 0; r < 300; r++) begin
      int cnt;
      for (int k = 0; k < L; k++)
        flag[k] = (r == 0) ? 1'b1 : (r == 1) ? 1'b0 : 1'($urandom);
      flag1[0] = r[0];
      #1;
      cnt = 0;
      for (int k = 0; k < L; k++) begin
        checks++;
        if (int'(prefix[k]) != cnt) begin
          failures++;
          $display("FAIL prefix[%0d] = %0d, expected %0d", k, prefix[k], cnt);
        end
        cnt += int'(flag[k]);
      end
      checks++;
      if (prefix1[0] != 1'b0) begin
        failures++;
        $display("FAIL single-leaf prefix = %0d", prefix1[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
