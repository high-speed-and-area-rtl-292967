// symbol_rom: first stage of the shared-symbol MCM block, the dual-port
// memory that holds the products of the stored alphabet symbols.
//
// The B-bit input X is split into a low half a and a high half b of
// ADDR_W = B/2 bits each (memory partition), so S*X = S*a + (S*b << ADDR_W).
// Both halves look up the same table, so one dual-port memory of 2^ADDR_W
// words serves them: port A is addressed by a, port B by b. Word i holds
// S_k * i for every stored symbol S_k side by side, symbol 0 in the least
// significant bits, each field just wide enough for S_k * (2^ADDR_W - 1)
// (see mcm_pkg::sym_offset). For the default alphabet {S11, S37} and an 8-bit
// input this is a 16 x 18-bit memory (8 + 10 bits). S1 is never stored.
//
// The table is computed at elaboration from the SYMS parameter and read
// synchronously, as in an FPGA block-RAM ROM: on a clock edge with en = 1 both
// ports register the word at their address, which appears on q_a / q_b one
// cycle later and is held while en = 0. The output registers are not reset,
// like block-RAM output registers. The synchronous read follows the target
// device of the design; the enable is this design's choice.
module symbol_rom
  import mcm_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,        // address bits = half the input width
  parameter int unsigned NSYM   = EX_NSYM,  // number of stored symbols
  parameter sym_list_t   SYMS   = EX_SYMS,  // stored symbols, index 0 first
  localparam int unsigned WORD_W = rom_word_w(SYMS, NSYM, ADDR_W),
  localparam int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              en,       // read enable for both ports
  input  logic [ADDR_W-1:0] addr_a,   // low half of the input
  input  logic [ADDR_W-1:0] addr_b,   // high half of the input
  output logic [WORD_W-1:0] q_a,      // products of every symbol with addr_a
  output logic [WORD_W-1:0] q_b       // products of every symbol with addr_b
);

  typedef logic [WORD_W-1:0] rom_t [DEPTH];

  // Word i = concatenation of SYMS[k] * i over the stored symbols.
  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      r[i] = '0;
      for (int unsigned k = 0; k < NSYM; k++)
        r[i] |= WORD_W'((64'(SYMS[k]) * 64'(i)) << sym_offset(SYMS, k, ADDR_W));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (en) begin
      q_a <= ROM[addr_a];
      q_b <= ROM[addr_b];
    end
  end

  initial begin
    for (int unsigned k = 0; k < NSYM; k++)
      if (!is_symbol(64'(SYMS[k])) || SYMS[k] == 1)
        $error("symbol_rom: stored symbol %0d (%0d) must be odd and above 1", k, SYMS[k]);
  end

endmodule
