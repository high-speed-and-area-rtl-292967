// gosm_fir: N-tap transposed-form FIR filter whose constant multipliers are
// a memory-based MCM block with shared symbols,
//   y(n) = sum_{i=0}^{NTAPS-1} C_i * x(n-i).
//
// Every coefficient of the filter is a sum of shifted "symbols". The
// products of the stored symbols with each half of the input are read from
// one small dual-port ROM, and each coefficient's product is assembled from
// them (and from x itself for the symbol 1) by a CSA tree of at most D levels
// and a carry-propagate adder (mcm_block). The tap chain (fir_tap_chain)
// then adds the delayed products. TAP_COEF maps each tap to one of the NCOEF
// distinct coefficient magnitudes, so taps with equal magnitude (a symmetric
// filter, for one) share one product. TAP_NEG marks taps whose coefficient is
// negative, whose product is subtracted.
//
// Interface: unsigned IN_W-bit samples x with in_valid, one per clock at
// most; gaps are allowed and stall the whole pipeline. y is signed.
// Timing: two register stages, the synchronous ROM read and the tap chain.
// The sample taken on clock edge t (x with in_valid = 1) gives its output y
// on edge t+1, flagged by out_valid in the same cycle.
// Synchronous active-low reset clears the tap chain and the valid flags.
//
// Defaults: the design's worked example, a 5-tap filter with coefficients
// {11, 23, 45, 125, 187} on 8-bit samples, alphabet {S1, S11, S37}, D = 2,
// which needs a single 16 x 18-bit dual-port ROM. The other configurations
// are produced by changing the parameters to the alphabet and matches that
// a symbol-matching optimiser chose for the coefficients.
// The two-stage MCM structure and the transposed filter follow the design;
// the valid handshake, the reset, the tap-to-coefficient map, the signed
// taps and the word widths are this implementation's choices.
module gosm_fir
  import mcm_pkg::*;
#(
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned NSYM   = EX_NSYM,
  parameter sym_list_t   SYMS   = EX_SYMS,
  parameter int unsigned NCOEF  = EX_NCOEF,
  parameter int unsigned COEF  [NCOEF] = '{11, 23, 45, 125, 187},
  parameter frag_list_t  MATCH [NCOEF] = EX_MATCH,
  parameter int unsigned D      = 2,
  parameter int unsigned NTAPS  = 5,
  parameter int unsigned TAP_COEF [NTAPS] = '{0, 1, 2, 3, 4},  // coefficient of each tap
  parameter logic [NTAPS-1:0] TAP_NEG = '0,                    // bit i: tap i negative
  localparam int unsigned P_W   = IN_W + COEF_W,
  localparam int unsigned ACC_W = P_W + $clog2(NTAPS) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         x,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y
);

  logic           prod_valid;
  logic [P_W-1:0] prod  [NCOEF];
  logic [P_W-1:0] tap_p [NTAPS];

  mcm_block #(
    .IN_W  (IN_W),
    .COEF_W(COEF_W),
    .NSYM  (NSYM),
    .SYMS  (SYMS),
    .NCOEF (NCOEF),
    .COEF  (COEF),
    .MATCH (MATCH),
    .D     (D)
  ) u_mcm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(prod_valid),
    .prod     (prod)
  );

  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    assign tap_p[t] = prod[TAP_COEF[t]];
    if (TAP_COEF[t] >= NCOEF) begin : g_chk
      $error("gosm_fir: tap %0d refers to coefficient %0d of %0d", t, TAP_COEF[t], NCOEF);
    end
  end

  fir_tap_chain #(.NTAPS(NTAPS), .P_W(P_W), .TAP_NEG(TAP_NEG)) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (prod_valid),
    .p      (tap_p),
    .y      (y),
    .y_valid(out_valid)
  );

endmodule
