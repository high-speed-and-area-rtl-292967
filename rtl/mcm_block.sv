// mcm_block: two-stage multiple constant multiplication (MCM) block with
// shared symbols: multiplies one input sample X by every coefficient of a
// set, prod[i] = COEF[i] * X.
//
// Stage 1 is memory: symbol_rom holds the products of the alphabet symbols
// with every half-width value; its port A is addressed by the low half of X,
// its port B by the high half. The input word is registered alongside, so
// that S1 fragments (X used directly) line up with the ROM output. Stage 2 is
// logic: one coef_mult per coefficient forms the supports of the
// coefficient's match by wire shifts and adds them in a CSA tree of at most D
// levels and a CPA. Symbols are shared: a ROM field feeds every coefficient
// whose match uses that symbol, so the memory grows with the size of the
// alphabet, not with the number of coefficients.
//
// Timing: a sample presented with in_valid = 1 is captured on the clock
// edge; its products are on prod (combinational from the stage-1 registers)
// from that edge on, flagged by out_valid, one cycle of latency. The stage-1
// registers hold while in_valid = 0. Only out_valid is reset (active-low,
// synchronous). The single register stage is this design's choice; the
// synchronous memory read follows the design's FPGA target.
//
// Defaults: the worked example, coefficients {11, 23, 45, 125, 187}, 8-bit
// input, alphabet {S1, S11, S37}, a 16 x 18-bit dual-port ROM, D = 2.
module mcm_block
  import mcm_pkg::*;
#(
  parameter int unsigned IN_W   = 8,          // input width, even
  parameter int unsigned COEF_W = 8,          // coefficient width
  parameter int unsigned NSYM   = EX_NSYM,    // stored symbols (S1 excluded)
  parameter sym_list_t   SYMS   = EX_SYMS,    // stored symbols, index 0 first
  parameter int unsigned NCOEF  = EX_NCOEF,   // number of coefficients
  parameter int unsigned COEF  [NCOEF] = '{11, 23, 45, 125, 187},
  parameter frag_list_t  MATCH [NCOEF] = EX_MATCH,  // match of each coefficient
  parameter int unsigned D      = 2,          // CSA tree level bound
  localparam int unsigned P_W    = IN_W + COEF_W,
  localparam int unsigned H      = IN_W / 2,
  localparam int unsigned WORD_W = rom_word_w(SYMS, NSYM, H)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IN_W-1:0]      x,
  output logic                 out_valid,
  output logic [P_W-1:0]       prod [NCOEF]
);

  logic [WORD_W-1:0] q_a, q_b;
  logic [IN_W-1:0]   x_q;

  // Stage 1: symbol products of both input halves, and the input itself.
  if (NSYM > 0) begin : g_rom
    symbol_rom #(.ADDR_W(H), .NSYM(NSYM), .SYMS(SYMS)) u_rom (
      .clk   (clk),
      .en    (in_valid),
      .addr_a(x[H-1:0]),
      .addr_b(x[IN_W-1:H]),
      .q_a   (q_a),
      .q_b   (q_b)
    );
  end else begin : g_no_rom
    assign q_a = '0;
    assign q_b = '0;
  end

  always_ff @(posedge clk) begin
    if (in_valid) x_q <= x;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // Stage 2: one CSA tree and CPA per coefficient.
  for (genvar i = 0; i < NCOEF; i++) begin : g_coef
    coef_mult #(
      .IN_W (IN_W),
      .P_W  (P_W),
      .NSYM (NSYM),
      .SYMS (SYMS),
      .COEF (COEF[i]),
      .FRAGS(MATCH[i]),
      .D    (D)
    ) u_mult (
      .x   (x_q),
      .q_a (q_a),
      .q_b (q_b),
      .prod(prod[i])
    );
  end

  if (H == 0 || IN_W % 2 != 0) begin : g_chk_in_w
    $error("mcm_block: IN_W (%0d) must be even and at least 2", IN_W);
  end

endmodule
