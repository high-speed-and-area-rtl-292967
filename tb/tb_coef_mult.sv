// tb_coef_mult: self-checking testbench of coef_mult. One instance per
// coefficient of the worked example {11, 23, 45, 125, 187}, each with its
// match (one to four supports, up to two CSA levels). The ROM words are
// formed here from the symbol values {11, 37}, every 8-bit input is applied,
// and each product is compared with coefficient * x.
module tb_coef_mult;
  import mcm_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned P_W  = 16;
  localparam int unsigned NC   = 5;
  localparam int unsigned C [NC] = '{11, 23, 45, 125, 187};

  logic [IN_W-1:0] x;
  logic [17:0]     q_a, q_b;
  logic [P_W-1:0]  prod [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    coef_mult #(
      .IN_W(IN_W), .P_W(P_W), .NSYM(2), .SYMS(syms8(11, 37)),
      .COEF(C[i]), .FRAGS(EX_MATCH[i]), .D(2)
    ) dut (.x(x), .q_a(q_a), .q_b(q_b), .prod(prod[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x   = IN_W'(v);
      // ROM word layout: S11 * a in bits 7:0, S37 * a in bits 17:8.
      q_a = {10'(37 * (v % 16)), 8'(11 * (v % 16))};
      q_b = {10'(37 * (v / 16)), 8'(11 * (v / 16))};
      #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (prod[i] != P_W'(C[i] * v)) begin
          failures++;
          if (failures < 10) $display("%0d * %0d: got %0d", C[i], v, prod[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
