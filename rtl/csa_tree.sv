// csa_tree: carry-save adder tree that reduces N addends ("supports") to a
// sum word and a carry word, sum + carry == the sum of the addends
// (mod 2^W).
//
// It is built level by level from csa32 compressors: each level groups its
// operands in threes, from operand 0 upwards, turns every group into two
// operands and passes the one or two left over straight on, until two
// operands remain. N operands thus need csa_levels(N) levels: 3 supports take
// one level, 4 take two, 5 or 6 take three, which is the support count / tree
// depth relation (NumSup_max) used to bound the delay of the design. For 4
// supports the tree is CSA(O1,O2,O3) followed by a CSA of its two outputs and
// O4; for 6 it is two CSAs on O1..O3 and O4..O6 followed by two more levels,
// the same arrangements as the design's area model. Operands keep their
// order; to spend the narrowest compressors first, place the narrowest
// supports first. With N = 2 the operands pass through, with N = 1 carry is
// zero, with N = 0 both are zero. Purely combinational.
module csa_tree
  import mcm_pkg::*;
#(
  parameter int unsigned N = 4,    // number of addends
  parameter int unsigned W = 16,   // width of addends and results
  localparam int unsigned LEVELS = csa_levels(N),
  localparam int unsigned NA     = (N > 0) ? N : 1
) (
  input  logic [NA-1:0][W-1:0] ops,
  output logic [W-1:0]         sum,
  output logic [W-1:0]         carry
);

  // Level i reads the operands cur[] (the inputs for level 0, the outputs
  // of level i-1 otherwise) and drives nxt[]. Separate arrays per level keep
  // the tree free of any apparent feedback.
  for (genvar i = 0; i < LEVELS; i++) begin : g_level
    localparam int unsigned NI = csa_count(N, i);   // operands in
    localparam int unsigned NG = NI / 3;            // compressors
    localparam int unsigned NO = csa_next(NI);      // operands out
    logic [W-1:0] cur [NA];
    logic [W-1:0] nxt [NA];
    for (genvar j = 0; j < NA; j++) begin : g_cur
      if (i == 0) begin : g_first
        assign cur[j] = ops[j];
      end else begin : g_later
        assign cur[j] = g_level[i-1].nxt[j];
      end
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      csa32 #(.W(W)) u_csa (
        .a (cur[3*g]),
        .b (cur[3*g+1]),
        .c (cur[3*g+2]),
        .s (nxt[2*g]),
        .cy(nxt[2*g+1])
      );
    end
    for (genvar j = 2 * NG; j < NA; j++) begin : g_pass
      if (j < NO) begin : g_fwd
        assign nxt[j] = cur[j + NG];
      end else begin : g_zero
        assign nxt[j] = '0;
      end
    end
  end

  if (LEVELS == 0) begin : g_out_direct
    assign sum   = (N >= 1) ? ops[0] : '0;
    assign carry = (N >= 2) ? ops[1 % NA] : '0;
  end else begin : g_out_tree
    assign sum   = g_level[LEVELS-1].nxt[0];
    assign carry = g_level[LEVELS-1].nxt[1];
  end

endmodule
