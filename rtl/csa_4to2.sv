// csa_4to2: two-level carry-save adder tree that reduces four operands to a
// sum word and a carry word.
//
// Level 1 adds a, b and c with full adders; level 2 adds the result to d. Each
// level's carry word is shifted up by one bit, and the bit freed at position 0
// takes a carry-in (cin0 for level 1, cin1 for level 2). In a filter cell the
// operands are the two CSD partial products and the incoming sum and carry,
// and the carry-ins complete the negation of negative partial products.
// s_o + c_o = a + b + c + d + cin0 + cin1 (mod 2^W). Combinational, two
// full-adder delays, no carry propagation. The carries out of the top bit are
// dropped (arithmetic modulo 2^W), so the top bits of m1 and m2 are unused.
module csa_4to2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  input  logic         cin0_i,
  input  logic         cin1_i,
  output logic [W-1:0] s_o,
  output logic [W-1:0] c_o
);

  logic [W-1:0] s1, m1, m2;

  always_comb begin
    s1  = a_i ^ b_i ^ c_i;
    m1  = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
    // second level: s1 + (m1 << 1 | cin0) + d
    s_o = s1 ^ {m1[W-2:0], cin0_i} ^ d_i;
    m2  = (s1 & {m1[W-2:0], cin0_i}) | (s1 & d_i) | ({m1[W-2:0], cin0_i} & d_i);
    c_o = {m2[W-2:0], cin1_i};
  end

endmodule
