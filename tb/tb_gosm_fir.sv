// tb_gosm_fir: end-to-end self-checking testbench of gosm_fir at its
// default parameters: the 5-tap filter with coefficients
// {11, 23, 45, 125, 187} on 8-bit samples, alphabet {S1, S11, S37}.
// Every 8-bit value is sent first, then random samples, with random gaps
// in in_valid and two resets in mid-stream. Each output is compared with
// y(n) = sum_i C_i * x(n-i) computed here from the accepted samples, and
// must appear on the clock edge after the one that took its sample (two register stages: ROM read, tap chain). The test
// counts how often each mechanism happened (input gaps, back-to-back
// samples, full-scale samples, mid-stream resets) and fails if one never did.
module tb_gosm_fir;
  localparam int unsigned NT = 5;
  localparam longint C [NT] = '{11, 23, 45, 125, 187};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] x = '0;
  logic out_valid;
  logic signed [18:0] y;

  int checks = 0, failures = 0;
  int n_gap = 0, n_b2b = 0, n_full = 0, n_reset = 0, n_out = 0;
  longint cyc = 0;
  longint hist [NT];          // hist[i] = x(n-i)
  longint exp_q [$];          // expected outputs, in order
  longint stamp_q [$];        // edge on which each sample was taken

  gosm_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: runs just after every rising edge.
  always @(posedge clk) begin
    #1;
    cyc++;
    if (!rst_n) begin
      exp_q.delete();
      stamp_q.delete();
      for (int i = 0; i < NT; i++) hist[i] = 0;
    end else begin
      if (out_valid) begin
        n_out++;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++;
          $display("edge %0d: unexpected output %0d", cyc, y);
        end else begin
          longint e, s;
          e = exp_q.pop_front();
          s = stamp_q.pop_front();
          if (longint'(y) != e) begin
            failures++;
            if (failures < 10) $display("edge %0d: y=%0d expected %0d", cyc, y, e);
          end
          if (cyc - s != 1) begin
            failures++;
            $display("edge %0d: latency %0d edges, expected 1", cyc, cyc - s);
          end
        end
      end
      if (in_valid) begin
        longint acc;
        acc = 0;
        for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(x);
        for (int i = 0; i < NT; i++) acc += C[i] * hist[i];
        exp_q.push_back(acc);
        stamp_q.push_back(cyc);
      end
    end
  end

  initial begin
    logic prev_v;
    for (int i = 0; i < NT; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_v = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t == 1500 || t == 2900) begin
        rst_n = 1'b0;
        in_valid = 1'b0;
        n_reset++;
      end else begin
        rst_n = 1'b1;
        in_valid = (t < 256) ? ((t % 5) != 4) : (($urandom % 4) != 0);
        x = (t < 256) ? 8'(t) : ((t % 11 == 0) ? 8'hff : 8'($urandom));
      end
      if (rst_n && !in_valid) n_gap++;
      if (in_valid && prev_v) n_b2b++;
      if (in_valid && x == 8'hff) n_full++;
      prev_v = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs never appeared", exp_q.size());
    end
    checks += 5;
    if (n_gap == 0)   begin failures++; $display("no input gap"); end
    if (n_b2b == 0)   begin failures++; $display("no back-to-back samples"); end
    if (n_full == 0)  begin failures++; $display("no full-scale sample"); end
    if (n_reset == 0) begin failures++; $display("no mid-stream reset"); end
    if (n_out == 0)   begin failures++; $display("no output"); end
    $display("gaps=%0d back-to-back=%0d full-scale=%0d resets=%0d outputs=%0d",
             n_gap, n_b2b, n_full, n_reset, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
