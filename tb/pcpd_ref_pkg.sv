// pcpd_ref_pkg: reference arithmetic for the FIR filter testbenches.
//
// Computes coefficient-times-data products directly from the CSD pair with
// integer multiplication (x * 2^(15-p), negated for a -1 digit), independent
// of the shift-and-complement hardware, and draws random coefficient codes
// with digit positions in the ranges of the filter description (first digit
// 0..13, second digit 2..15).
package pcpd_ref_pkg;
  import pcpd_pkg::*;

  function automatic int digit_sign(logic [1:0] s);
    if (s == 2'b01) return 1;
    if (s == 2'b11) return -1;
    return 0;
  endfunction

  // h*x on the 2^-30 grid, modulo 2^32
  function automatic logic [31:0] prod(csd_coef_t h, logic [15:0] x);
    longint xv, acc;
    xv  = longint'($signed(x));
    acc = digit_sign(h.d0.s) * xv * (longint'(1) <<< (15 - int'(h.d0.p)))
        + digit_sign(h.d1.s) * xv * (longint'(1) <<< (15 - int'(h.d1.p)));
    return acc[31:0];
  endfunction

  function automatic logic [1:0] rand_sign();
    case ($urandom_range(2))
      0:       return 2'b00;
      1:       return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  function automatic csd_coef_t rand_coef();
    csd_coef_t h;
    h.d0.s = rand_sign();
    h.d0.p = 4'($urandom_range(13));
    h.d1.s = rand_sign();
    h.d1.p = 4'($urandom_range(15, 2));
    return h;
  endfunction

endpackage
