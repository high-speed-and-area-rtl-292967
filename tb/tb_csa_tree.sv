// tb_csa_tree: self-checking testbench of csa_tree. Drives random addends
// into trees of 1 to 7 operands (16 bits) and checks that sum + carry equals
// the arithmetic sum of the addends modulo 2^16, and that the number of
// compressor levels is 0, 0, 1, 2, 3, 3, 4 for 1..7 operands.
module tb_csa_tree;
  import mcm_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned MAXN = 7;

  logic [MAXN-1:0][W-1:0] ops;
  logic [W-1:0] s [1:MAXN];
  logic [W-1:0] c [1:MAXN];
  int checks = 0, failures = 0;

  for (genvar n = 1; n <= MAXN; n++) begin : g_dut
    csa_tree #(.N(n), .W(W)) dut (.ops(ops[n-1:0]), .sum(s[n]), .carry(c[n]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_lv [1:MAXN] = '{0, 0, 1, 2, 3, 3, 4};
    for (int n = 1; n <= MAXN; n++) begin
      checks++;
      if (csa_levels(n) != exp_lv[n]) begin
        failures++;
        $display("csa_levels(%0d) = %0d, expected %0d", n, csa_levels(n), exp_lv[n]);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < MAXN; j++) begin
        case (t % 4)
          0: ops[j] = W'($urandom);
          1: ops[j] = '1;                        // all ones: longest carries
          2: ops[j] = W'($urandom) & 16'h00ff;
          default: ops[j] = W'($urandom) | 16'h8001;
        endcase
      end
      #1;
      for (int n = 1; n <= MAXN; n++) begin
        logic [W-1:0] ref_sum;
        ref_sum = '0;
        for (int j = 0; j < n; j++) ref_sum += ops[j];
        checks++;
        if (W'(s[n] + c[n]) != ref_sum) begin
          failures++;
          if (failures < 10)
            $display("N=%0d: sum+carry %h, expected %h", n, W'(s[n] + c[n]), ref_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
