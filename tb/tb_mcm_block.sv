// tb_mcm_block: self-checking testbench of mcm_block in two configurations.
//   u_ex : worked example, coefficients {11, 23, 45, 125, 187}, 8-bit input,
//          alphabet {S1, S11, S37}, 16 x 18-bit ROM.
//   u_ilp: two-coefficient example {11, 23} (binary 1011, 10111) on a 10-bit
//          input, alphabet {S1, S11}: 11 = F(S11,0), 23 = F(S11,1) + F(S1,0),
//          32 x 9-bit ROM.
// Random samples are sent with random gaps in in_valid. For every accepted
// sample, one cycle later out_valid must be high and every product must equal
// coefficient * sample; out_valid must be low after a gap.
module tb_mcm_block;
  import mcm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [7:0]  x8;
  logic [9:0]  x10;
  logic        v_ex, v_ilp;
  logic [15:0] p_ex  [5];
  logic [14:0] p_ilp [2];
  localparam int unsigned C_EX  [5] = '{11, 23, 45, 125, 187};
  localparam int unsigned C_ILP [2] = '{11, 23};
  localparam frag_list_t  M_ILP [2] = '{frags(frag_mem(0, 0)),
                                        frags(frag_mem(0, 1), frag_one(0))};

  int checks = 0, failures = 0;
  int gaps = 0;

  mcm_block u_ex (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x8),
    .out_valid(v_ex), .prod(p_ex)
  );

  mcm_block #(
    .IN_W(10), .COEF_W(5), .NSYM(1), .SYMS(syms8(11)), .NCOEF(2),
    .COEF(C_ILP), .MATCH(M_ILP),
    .D(2)
  ) u_ilp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x10),
    .out_valid(v_ilp), .prod(p_ilp)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       prev_valid;
    logic [7:0] prev_x8;
    logic [9:0] prev_x10;
    // Memory sizes of the two configurations.
    checks += 2;
    if ($bits(u_ex.q_a) != 18)  begin failures++; $display("example ROM word %0d bits", $bits(u_ex.q_a)); end
    if ($bits(u_ilp.q_a) != 9)  begin failures++; $display("ILP ROM word %0d bits", $bits(u_ilp.q_a)); end
    in_valid = 1'b0; x8 = '0; x10 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 1'b0; prev_x8 = '0; prev_x10 = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // New input first: the products must not follow it before the next edge.
      in_valid = ($urandom % 4) != 0;
      if (!in_valid) gaps++;
      x8  = (t < 256) ? 8'(t) : 8'($urandom);
      x10 = (t < 1024) ? 10'(t) : 10'($urandom);
      #1;
      // Check the result of the previous cycle's input.
      checks += 2;
      if (v_ex != prev_valid || v_ilp != prev_valid) begin
        failures++;
        $display("cycle %0d: out_valid %b/%b, expected %b", t, v_ex, v_ilp, prev_valid);
      end
      if (prev_valid) begin
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (p_ex[i] != 16'(C_EX[i] * prev_x8)) begin
            failures++;
            if (failures < 10) $display("%0d * %0d: got %0d", C_EX[i], prev_x8, p_ex[i]);
          end
        end
        for (int i = 0; i < 2; i++) begin
          checks++;
          if (p_ilp[i] != 15'(C_ILP[i] * prev_x10)) begin
            failures++;
            if (failures < 10) $display("%0d * %0d: got %0d", C_ILP[i], prev_x10, p_ilp[i]);
          end
        end
      end
      prev_valid = in_valid;
      if (in_valid) begin
        prev_x8  = x8;
        prev_x10 = x10;
      end
    end
    checks++;
    if (gaps == 0) begin failures++; $display("no input gap was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
