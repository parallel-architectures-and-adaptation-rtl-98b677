// pcpd_pkg: widths, coefficient encoding and carry-save types shared by the
// fully pipelined (pipelined-control, pipelined-data) programmable FIR filter.
//
// Data and coefficients use one 16-bit input port. A data word is a two's
// complement fraction with 15 fraction bits. A coefficient word carries a
// canonic signed-digit (CSD) pair h = s0*2^-p0 + s1*2^-p1 in its 12 low bits
// (two sign digits of 2 bits and two positions of 4 bits, as the filter
// description counts them). Bit 12 is the bypass (continuation) flag used by
// the extended-precision cells; the basic cells ignore it. Bits 15:13 are
// unused in a coefficient word.
//
// Accumulation is 32 bits wide with the least significant bit weighing 2^-30,
// so every partial product x*2^-p (p <= 15) is exact. Sums wrap modulo 2^32.
// The field order inside the 12-bit code, the 2-bit sign-digit encoding and the
// binary point of the 32-bit result are this design's own choices.
package pcpd_pkg;

  localparam int unsigned XW       = 16;  // data / coefficient input port width
  localparam int unsigned AW       = 32;  // accumulator and output width
  localparam int unsigned FRAC     = 15;  // fraction bits of a data word
  localparam int unsigned CODEW    = 12;  // CSD pair code width
  localparam int unsigned FLAG_BIT = 12;  // bypass flag position in a coefficient word

  // Sign digit encoding: 00 = 0, 01 = +1, 11 = -1 (10 is read as 0).
  localparam logic [1:0] SD_ZERO = 2'b00;
  localparam logic [1:0] SD_POS  = 2'b01;
  localparam logic [1:0] SD_NEG  = 2'b11;

  // One signed digit and its position (power of two).
  typedef struct packed {
    logic [1:0] s;
    logic [3:0] p;
  } csd_digit_t;

  // A coefficient as two signed digits: code[11:6] = digit 0, code[5:0] = digit 1.
  typedef struct packed {
    csd_digit_t d0;
    csd_digit_t d1;
  } csd_coef_t;

  // Carry-save number: value = s + c (mod 2^AW).
  typedef struct packed {
    logic [AW-1:0] s;
    logic [AW-1:0] c;
  } cs_t;

  localparam cs_t CS_ZERO = '{s: '0, c: '0};

  // Builds a coefficient word for the input port (used by testbenches too).
  function automatic logic [XW-1:0] coef_word(csd_coef_t h, logic bypass);
    logic [XW-1:0] w;
    w = '0;
    w[CODEW-1:0] = h;
    w[FLAG_BIT]  = bypass;
    return w;
  endfunction

endpackage
