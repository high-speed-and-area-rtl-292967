// tb_symbol_rom: self-checking testbench of symbol_rom with the default
// alphabet {S11, S37} and 4 address bits (8-bit samples).
// Reads every address pair on both ports, checks each symbol field against
// S * address worked out here, the one-cycle read latency, that the outputs
// hold while en = 0, and the 16 x 18-bit word size of this configuration.
module tb_symbol_rom;
  import mcm_pkg::*;

  localparam int unsigned ADDR_W = 4;
  localparam int unsigned WORD_W = 18;   // 8 bits for 11*15, 10 for 37*15

  logic              clk = 1'b0;
  logic              en;
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic [WORD_W-1:0] q_a, q_b;
  int checks = 0, failures = 0;

  symbol_rom #(.ADDR_W(ADDR_W), .NSYM(2), .SYMS(syms8(11, 37))) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input logic [WORD_W-1:0] q, input int a, input string port);
    checks++;
    if (q[7:0] != 8'(11 * a) || q[17:8] != 10'(37 * a)) begin
      failures++;
      $display("port %s addr %0d: got S11 field %0d, S37 field %0d", port, a, q[7:0], q[17:8]);
    end
  endtask

  initial begin
    checks++;
    if ($bits(q_a) != 18) begin
      failures++;
      $display("word width %0d, expected 18", $bits(q_a));
    end
    en = 1'b0; addr_a = '0; addr_b = '0;
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      addr_a = ADDR_W'(a);
      addr_b = ADDR_W'(15 - a);
      en     = 1'b1;
      @(posedge clk);
      #1;
      check_word(q_a, a, "A");
      check_word(q_b, 15 - a, "B");
      // Hold: new addresses with en low must not change the outputs.
      @(negedge clk);
      en     = 1'b0;
      addr_a = ADDR_W'(a + 3);
      addr_b = ADDR_W'(a + 7);
      @(posedge clk);
      #1;
      check_word(q_a, a, "A(hold)");
      check_word(q_b, 15 - a, "B(hold)");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
