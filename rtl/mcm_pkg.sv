// mcm_pkg: types, constants and elaboration-time helper functions shared by
// the shared-symbol memory-based MCM (multiple constant multiplication) block
// and the FIR filter built on it.
//
// A coefficient C is multiplied by an input X as a sum of "fragments": a
// fragment is a symbol S (a binary number whose MSB and LSB are both 1)
// shifted left by some bits. The symbol 1 (S1) needs no memory: its product is
// X itself. Every other symbol's product S*X is read from a dual-port ROM whose
// two ports are addressed by the low and the high half of X (memory
// partition), so such a fragment contributes two addends ("supports") to the
// carry-save adder tree, while an S1 fragment contributes one.
//
// The alphabet (list of stored symbols) and the match of every coefficient
// (its list of fragments) are chosen before synthesis by a symbol-matching
// optimiser and enter the RTL as parameters of the types below. The defaults
// describe the worked example of the design: coefficients {11,23,45,125,187},
// alphabet {S1, S11, S37}, 8-bit input.
package mcm_pkg;

  // Largest number of stored symbols in an alphabet (S1 excluded).
  localparam int unsigned MAX_SYM  = 64;
  // Largest number of fragments in one match. A match has at most as many
  // fragments as supports, and the deepest supported CSA tree (D = 3) takes
  // six supports.
  localparam int unsigned MAX_FRAG = 6;
  // Width of a symbol or coefficient value held in a list.
  localparam int unsigned VAL_W    = 32;

  // One fragment F(S, shift) of a match.
  typedef struct packed {
    logic       used;    // 1: this slot holds a fragment
    logic       direct;  // 1: the symbol is S1, taken straight from the input
    logic [5:0] sym;     // index of the stored symbol (ignored when direct)
    logic [7:0] shift;   // left shift of the symbol, in bits
  } frag_t;

  // The match of one coefficient: up to MAX_FRAG fragments, slot 0 first.
  typedef frag_t [MAX_FRAG-1:0] frag_list_t;
  // The stored symbols of an alphabet, index 0 first.
  typedef logic [MAX_SYM-1:0][VAL_W-1:0] sym_list_t;

  localparam frag_t NO_FRAG = '0;

  // Fragment built from a stored symbol.
  function automatic frag_t frag_mem(int unsigned sym, int unsigned shift);
    frag_t f;
    f.used   = 1'b1;
    f.direct = 1'b0;
    f.sym    = 6'(sym);
    f.shift  = 8'(shift);
    return f;
  endfunction

  // Fragment built from S1, the input itself.
  function automatic frag_t frag_one(int unsigned shift);
    frag_t f;
    f.used   = 1'b1;
    f.direct = 1'b1;
    f.sym    = '0;
    f.shift  = 8'(shift);
    return f;
  endfunction

  // Number of bits needed to hold the unsigned value v (at least 1).
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned n = 1;
    while (n < 64 && (v >> n) != 0) n++;
    return n;
  endfunction

  // Number of non-zero bits, NZB(v).
  function automatic int unsigned nzb(longint unsigned v);
    int unsigned n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  // A symbol is a binary number whose MSB and LSB are both 1.
  function automatic bit is_symbol(longint unsigned v);
    return v != 0 && v[0] == 1'b1;
  endfunction

  // Width of the product S * a for an a of addr_w bits.
  function automatic int unsigned sym_prod_w(longint unsigned s, int unsigned addr_w);
    return bits_for(s * ((64'd1 << addr_w) - 1));
  endfunction

  // Bit offset of stored symbol k inside a ROM word: symbols are packed
  // side by side, symbol 0 in the least significant bits.
  function automatic int unsigned sym_offset(sym_list_t syms, int unsigned k,
                                             int unsigned addr_w);
    int unsigned off = 0;
    for (int unsigned i = 0; i < k; i++) off += sym_prod_w(64'(syms[i]), addr_w);
    return off;
  endfunction

  // Width of a ROM word holding the products of nsym symbols.
  function automatic int unsigned rom_word_w(sym_list_t syms, int unsigned nsym,
                                             int unsigned addr_w);
    return (nsym == 0) ? 1 : sym_offset(syms, nsym, addr_w);
  endfunction

  // Number of supports (CSA tree addends) of the first nfr fragments.
  function automatic int unsigned num_sup(frag_list_t fr, int unsigned nfr);
    int unsigned n = 0;
    for (int unsigned i = 0; i < nfr && i < MAX_FRAG; i++)
      if (fr[i].used) n += fr[i].direct ? 1 : 2;
    return n;
  endfunction

  // Value of a match: the sum of its fragments.
  function automatic longint unsigned match_value(frag_list_t fr, sym_list_t syms);
    longint unsigned v = 0;
    for (int unsigned i = 0; i < MAX_FRAG; i++)
      if (fr[i].used)
        v += (fr[i].direct ? 64'd1 : 64'(syms[fr[i].sym])) << fr[i].shift;
    return v;
  endfunction

  // Sum of NZB over the fragments of a match.
  function automatic int unsigned match_nzb(frag_list_t fr, sym_list_t syms);
    int unsigned n = 0;
    for (int unsigned i = 0; i < MAX_FRAG; i++)
      if (fr[i].used) n += fr[i].direct ? 1 : nzb(64'(syms[fr[i].sym]));
    return n;
  endfunction

  // Operands left after one level of 3:2 compressors working on n operands.
  function automatic int unsigned csa_next(int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  // Levels of 3:2 compressors needed to bring n operands down to two.
  function automatic int unsigned csa_levels(int unsigned n);
    int unsigned lv = 0;
    while (n > 2) begin
      n = csa_next(n);
      lv++;
    end
    return lv;
  endfunction

  // Operands present at level lv of a tree that starts with n operands.
  function automatic int unsigned csa_count(int unsigned n, int unsigned lv);
    for (int unsigned i = 0; i < lv; i++) n = csa_next(n);
    return n;
  endfunction

  // NumSup_max: the most supports a CSA tree of at most d levels can take
  // (3, 4, 6, 9, ... for d = 1, 2, 3, 4, ...).
  function automatic int unsigned numsup_max(int unsigned d);
    int unsigned n = 2;
    for (int unsigned i = 0; i < d; i++) n = (3 * n) / 2;
    return n;
  endfunction

  // ---------------------------------------------------------------------
  // Worked example: coefficients {11, 23, 45, 125, 187}, 8-bit input,
  // alphabet {S1, S11, S37}, CSA tree of at most two levels.
  //   11  = F(S11,0)
  //   23  = F(S11,1) + F(S1,0)
  //   45  = F(S37,0) + F(S1,3)
  //   125 = F(S37,0) + F(S11,3)
  //   187 = F(S11,4) + F(S11,0)
  // ---------------------------------------------------------------------
  // Match built from up to MAX_FRAG fragments, f0 in slot 0. Lists are
  // filled by explicit index so that no tool has to guess the slot order of
  // an assignment pattern on a packed array.
  function automatic frag_list_t frags(frag_t f0 = NO_FRAG, frag_t f1 = NO_FRAG,
                                       frag_t f2 = NO_FRAG, frag_t f3 = NO_FRAG,
                                       frag_t f4 = NO_FRAG, frag_t f5 = NO_FRAG);
    frag_list_t r;
    r[0] = f0; r[1] = f1; r[2] = f2; r[3] = f3; r[4] = f4; r[5] = f5;
    return r;
  endfunction

  // Alphabet built from up to eight stored symbols, s0 at index 0.
  function automatic sym_list_t syms8(int unsigned s0 = 0, int unsigned s1 = 0,
                                      int unsigned s2 = 0, int unsigned s3 = 0,
                                      int unsigned s4 = 0, int unsigned s5 = 0,
                                      int unsigned s6 = 0, int unsigned s7 = 0);
    sym_list_t r = '0;
    r[0] = s0; r[1] = s1; r[2] = s2; r[3] = s3;
    r[4] = s4; r[5] = s5; r[6] = s6; r[7] = s7;
    return r;
  endfunction

  localparam int unsigned EX_NSYM  = 2;
  localparam sym_list_t   EX_SYMS  = syms8(11, 37);
  localparam int unsigned EX_NCOEF = 5;
  localparam frag_list_t  EX_MATCH [EX_NCOEF] = '{
    frags(frag_mem(0, 0)),                       // 11
    frags(frag_mem(0, 1), frag_one(0)),          // 23
    frags(frag_mem(1, 0), frag_one(3)),          // 45
    frags(frag_mem(1, 0), frag_mem(0, 3)),       // 125
    frags(frag_mem(0, 4), frag_mem(0, 0))        // 187
  };

endpackage
