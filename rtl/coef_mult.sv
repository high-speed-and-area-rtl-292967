// coef_mult: second-stage path of the MCM block for one constant
// coefficient C, prod = C * X.
//
// The coefficient is given by its match FRAGS: fragments F(S, s) whose sum
// is C. Each fragment becomes addends ("supports") of a carry-save adder
// tree, formed by wiring alone:
//   S1 fragment:     X << s                                   (one support)
//   stored symbol k: (S_k*a) << s  and  (S_k*b) << (s + H)   (two supports)
// where a and b are the low and high H-bit halves of X and S_k*a, S_k*b are
// symbol k's fields of the two ROM port words q_a and q_b. The csa_tree
// reduces the supports to two words and a carry-propagate adder (CPA) adds
// them. As in the design's area model, the supports enter the tree in
// ascending order of width, so the narrowest share the first compressors.
// All addends are P_W bits wide; constant zero bits above and below each
// support are left for synthesis to trim.
//
// Purely combinational: prod follows x, q_a and q_b. x must be the input
// word that addressed the ROM, delayed to line up with its registered output.
// Elaboration checks that the match really sums to C, that it is a match in
// the strict sense (its fragments have as many non-zero bits together as C
// has), and that it needs no more supports than a CSA tree of D levels takes
// (3, 4 and 6 for D = 1, 2 and 3). Default parameters: coefficient 187 of the
// worked example, 187 = F(S11,4) + F(S11,0), four supports, two CSA levels.
// Supports, their ordering, the CSA tree and the CPA follow the design; the
// uniform P_W-bit addend width and the elaboration checks are this
// implementation's choices.
module coef_mult
  import mcm_pkg::*;
#(
  parameter int unsigned IN_W  = 8,                 // input width, even
  parameter int unsigned P_W   = 16,                // product width
  parameter int unsigned NSYM  = EX_NSYM,           // stored symbols
  parameter sym_list_t   SYMS  = EX_SYMS,           // stored symbols, index 0 first
  parameter int unsigned COEF  = 187,               // the coefficient
  parameter frag_list_t  FRAGS = EX_MATCH[4],       // its match
  parameter int unsigned D     = 2,                 // CSA tree level bound
  localparam int unsigned H      = IN_W / 2,
  localparam int unsigned WORD_W = rom_word_w(SYMS, NSYM, H),
  localparam int unsigned NS     = num_sup(FRAGS, MAX_FRAG),
  localparam int unsigned NSA    = (NS > 0) ? NS : 1
) (
  input  logic [IN_W-1:0]   x,     // input sample, aligned with q_a / q_b
  input  logic [WORD_W-1:0] q_a,   // ROM word for the low half of x
  input  logic [WORD_W-1:0] q_b,   // ROM word for the high half of x
  output logic [P_W-1:0]    prod   // COEF * x
);

  logic [NSA-1:0][P_W-1:0] sup;
  logic [P_W-1:0]          csa_s, csa_c;

  // Width (index of the highest possibly non-zero bit, plus one) of the
  // support numbered j in match order: an S1 fragment gives one support,
  // a stored symbol two (low half, then high half).
  function automatic int unsigned sup_width(int unsigned j);
    int unsigned n = 0;
    for (int unsigned f = 0; f < MAX_FRAG; f++) begin
      if (FRAGS[f].used) begin
        int unsigned sh = 32'(FRAGS[f].shift);
        if (FRAGS[f].direct) begin
          if (n == j) return sh + IN_W;
          n++;
        end else begin
          int unsigned sw = sym_prod_w(64'(SYMS[FRAGS[f].sym]), H);
          if (n == j) return sh + sw;
          if (n + 1 == j) return sh + H + sw;
          n += 2;
        end
      end
    end
    return 0;
  endfunction

  // Position of support j in the tree: supports enter in ascending order of
  // width (ties keep match order), so the narrowest ones share the first
  // compressors.
  function automatic int unsigned sup_rank(int unsigned j);
    int unsigned r = 0;
    for (int unsigned i = 0; i < NS; i++)
      if (sup_width(i) < sup_width(j) || (sup_width(i) == sup_width(j) && i < j)) r++;
    return r;
  endfunction

  for (genvar f = 0; f < MAX_FRAG; f++) begin : g_frag
    localparam int unsigned IDX = num_sup(FRAGS, f);   // first support of f
    localparam int unsigned SH  = 32'(FRAGS[f].shift);
    if (FRAGS[f].used && FRAGS[f].direct) begin : g_one
      assign sup[sup_rank(IDX)] = P_W'(x) << SH;
    end else if (FRAGS[f].used) begin : g_mem
      localparam int unsigned K   = 32'(FRAGS[f].sym);
      localparam int unsigned OFF = sym_offset(SYMS, K, H);
      localparam int unsigned SW  = sym_prod_w(64'(SYMS[K]), H);
      assign sup[sup_rank(IDX)]     = P_W'(q_a[OFF +: SW]) << SH;
      assign sup[sup_rank(IDX + 1)] = P_W'(q_b[OFF +: SW]) << (SH + H);
    end
  end
  if (NS == 0) begin : g_no_sup
    assign sup = '0;
  end

  csa_tree #(.N(NS), .W(P_W)) u_tree (
    .ops  (sup),
    .sum  (csa_s),
    .carry(csa_c)
  );

  // Carry-propagate adder.
  assign prod = csa_s + csa_c;

  // Elaboration-time checks of the match.
  if (IN_W % 2 != 0) begin : g_chk_even
    $error("coef_mult: IN_W (%0d) must be even", IN_W);
  end
  if (match_value(FRAGS, SYMS) != 64'(COEF)) begin : g_chk_value
    $error("coef_mult: match sums to %0d, not to the coefficient %0d",
           match_value(FRAGS, SYMS), COEF);
  end
  if (match_nzb(FRAGS, SYMS) != nzb(64'(COEF))) begin : g_chk_nzb
    $error("coef_mult: fragments of coefficient %0d overlap (NZB mismatch)", COEF);
  end
  if (NS > numsup_max(D)) begin : g_chk_sup
    $error("coef_mult: coefficient %0d needs %0d supports, a %0d-level CSA tree takes %0d",
           COEF, NS, D, numsup_max(D));
  end
  if (bits_for(64'(COEF)) + IN_W > P_W) begin : g_chk_width
    $error("coef_mult: P_W (%0d) too narrow for coefficient %0d", P_W, COEF);
  end

endmodule
