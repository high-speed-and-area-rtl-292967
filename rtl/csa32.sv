// csa32: one W-bit carry-save adder (3:2 compressor), W disjoint full adders.
//
// Takes three W-bit addends and returns a sum word and a carry word with
// a + b + c == s + cy (mod 2^W). s is the bitwise XOR of the three inputs,
// cy the bitwise majority shifted up by one bit (its top bit is dropped, the
// tree works modulo 2^W). Purely combinational, no carry propagation, so its
// delay is one full adder whatever W is. This is the CSA of the design's
// adder tree.
module csa32 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    cy  = {maj[W-2:0], 1'b0};
  end

endmodule
