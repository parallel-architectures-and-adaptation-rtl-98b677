// cs_final_adder: the carry-propagate adder placed after the last filter cell.
//
// The cells keep their running sums in carry-save form; the true result is
// formed only here. The adder takes two carry-save numbers (a: the y stream,
// b: the z stream of a folded linear-phase filter, or zero), reduces the four
// words with a two-level carry-save tree and adds the remaining pair with one
// carry-propagate addition. The result is registered: sum_o is valid one clock
// after the inputs. The output register is this design's choice.
module cs_final_adder
  import pcpd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  cs_t           a_i,
  input  cs_t           b_i,
  output logic [AW-1:0] sum_o
);

  logic [AW-1:0] s, c;

  csa_4to2 #(.W(AW)) u_tree (
    .a_i(a_i.s), .b_i(a_i.c), .c_i(b_i.s), .d_i(b_i.c),
    .cin0_i(1'b0), .cin1_i(1'b0), .s_o(s), .c_o(c)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sum_o <= '0;
    else        sum_o <= s + c;

endmodule
