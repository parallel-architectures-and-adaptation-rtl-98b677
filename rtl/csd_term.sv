// csd_term: one partial product of a CSD coefficient digit with a data word.
//
// The data word (two's complement, 15 fraction bits) is sign-extended to the
// accumulator width and shifted left by 15-p, which places x*2^-p on the
// accumulator grid (LSB = 2^-30). For a digit of -1 the shifted word is
// bit-inverted and neg_o is raised: the missing +1 of the two's complement is
// added later as a carry-in of the carry-save tree, so no carry propagates
// here. For a digit of 0 the output is zero. Purely combinational.
//
// Shifting and complementing follow the filter description; the late +1
// injection is this design's way of keeping the cell carry-free.
module csd_term
  import pcpd_pkg::*;
(
  input  logic [XW-1:0] x_i,     // data word
  input  csd_digit_t    digit_i, // signed digit and its position
  output logic [AW-1:0] pp_o,    // partial product (inverted when negative)
  output logic          neg_o    // add 1 to complete the negation
);

  logic [AW-1:0] shifted;

  always_comb begin
    shifted = {{(AW-XW){x_i[XW-1]}}, x_i} << (FRAC - 32'(digit_i.p));
    unique case (digit_i.s)
      SD_POS:  begin pp_o = shifted;  neg_o = 1'b0; end
      SD_NEG:  begin pp_o = ~shifted; neg_o = 1'b1; end
      default: begin pp_o = '0;       neg_o = 1'b0; end
    endcase
  end

endmodule
