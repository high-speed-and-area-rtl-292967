// tb_mcm_depth: self-checking testbench of mcm_block at the two other CSA
// tree depth bounds, D = 1 and D = 3, for the coefficient 125 (1111101):
//   u_d1: D = 1 (at most 3 supports), alphabet {S1, S31},
//         125 = F(S31,2) + F(S1,0), one CSA level, a 16 x 9-bit ROM;
//   u_d3: D = 3 (at most 6 supports), alphabet {S1} only, no ROM at all,
//         125 = F(S1,6) + F(S1,5) + F(S1,4) + F(S1,3) + F(S1,2) + F(S1,0),
//         three CSA levels.
// Both get every 8-bit sample; one cycle later the product must be 125 * x.
module tb_mcm_depth;
  import mcm_pkg::*;

  localparam int unsigned C1 [1] = '{125};
  localparam frag_list_t  M1 [1] = '{frags(frag_mem(0, 2), frag_one(0))};
  localparam frag_list_t  M3 [1] = '{frags(frag_one(6), frag_one(5), frag_one(4),
                                           frag_one(3), frag_one(2), frag_one(0))};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0]  x = '0;
  logic        v1, v3;
  logic [15:0] p1 [1];
  logic [15:0] p3 [1];
  int checks = 0, failures = 0;

  mcm_block #(.NSYM(1), .SYMS(syms8(31)), .NCOEF(1), .COEF(C1), .MATCH(M1), .D(1)) u_d1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v1), .prod(p1));
  mcm_block #(.NSYM(0), .SYMS(syms8()), .NCOEF(1), .COEF(C1), .MATCH(M3), .D(3)) u_d3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v3), .prod(p3));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 2;
    if ($bits(u_d1.q_a) != 9) begin failures++; $display("D=1 ROM word %0d bits", $bits(u_d1.q_a)); end
    if (csa_levels(num_sup(M3[0], MAX_FRAG)) != 3) begin failures++; $display("D=3 tree depth"); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      x = 8'(v);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 2;
      if (!v1 || p1[0] != 16'(125 * v)) begin
        failures++;
        if (failures < 10) $display("D=1: 125 * %0d gave %0d (valid %b)", v, p1[0], v1);
      end
      if (!v3 || p3[0] != 16'(125 * v)) begin
        failures++;
        if (failures < 10) $display("D=3: 125 * %0d gave %0d (valid %b)", v, p3[0], v3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
