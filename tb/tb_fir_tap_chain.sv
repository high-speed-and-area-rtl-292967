// tb_fir_tap_chain: self-checking testbench of fir_tap_chain with 5 taps,
// taps 1 and 3 negative. Random products are fed with random gaps in en;
// after every enabled edge y must equal sum_i s_i * p_i(n-i) over the
// products of the last five enabled edges, computed here from a history
// buffer; y must hold while en = 0; reset must clear the chain.
module tb_fir_tap_chain;
  localparam int unsigned NTAPS = 5;
  localparam int unsigned P_W   = 16;
  localparam logic [NTAPS-1:0] NEG = 5'b01010;
  localparam int unsigned ACC_W = P_W + $clog2(NTAPS) + 1;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [P_W-1:0] p [NTAPS];
  logic signed [ACC_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;
  // hist[k][i]: product of tap i k enabled edges ago.
  longint hist [NTAPS][NTAPS];

  fir_tap_chain #(.NTAPS(NTAPS), .P_W(P_W), .TAP_NEG(NEG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected();
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++)
      acc += NEG[i] ? -hist[i][i] : hist[i][i];
    return acc;
  endfunction

  initial begin
    longint exp_y;
    for (int k = 0; k < NTAPS; k++) for (int i = 0; i < NTAPS; i++) hist[k][i] = 0;
    for (int i = 0; i < NTAPS; i++) p[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_y = 0;
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom % 3) != 0;
      for (int i = 0; i < NTAPS; i++) p[i] = (t % 7 == 0) ? '1 : P_W'($urandom);
      if (t == 1000) rst_n = 1'b0;
      @(posedge clk);
      #1;
      if (!rst_n) begin
        for (int k = 0; k < NTAPS; k++) for (int i = 0; i < NTAPS; i++) hist[k][i] = 0;
        exp_y = 0;
      end else if (en) begin
        for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        for (int i = 0; i < NTAPS; i++) hist[0][i] = longint'(p[i]);
        exp_y = expected();
      end
      checks += 2;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("t=%0d: y=%0d expected %0d", t, y, exp_y);
      end
      if (y_valid != (en && rst_n)) begin
        failures++;
        $display("t=%0d: y_valid=%b", t, y_valid);
      end
      @(negedge clk);
      rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
