// pcpd_fir_top: the fully pipelined programmable FIR filter in both of its
// forms, side by side, each with its own input port and tags.
//
//   lp_*   N-tap filter of two-digit CSD coefficients (pcpd_lp_fir); lp_y_o is
//          the N-tap response, lp_lp_o the folded linear-phase response of
//          2N taps. Latencies N+1 and N+2 clocks from the data word.
//   ext_*  filter of C cells whose coefficients may span several cells
//          (pcpd_ext_fir); ext_y_o has latency C+1, ext_bypass_o shows the
//          bypass flags.
// Both arrays only use local connections: the clock and the reset are the only
// signals that reach every cell. The input words, tags and programming
// sequences are described in pcpd_lp_fir and pcpd_ext_fir. The chain ends
// (x word, tags, carry-save sum, stored coefficients) are brought out for
// observation and for chaining arrays. Keeping the two forms as separate
// arrays follows the filter description, which gives the extended-precision
// cell without the linear-phase Z stream.
module pcpd_fir_top
  import pcpd_pkg::*;
#(
  parameter int unsigned N = 64,  // taps of the two-digit array
  parameter int unsigned C = 64   // cells of the extended-precision array
) (
  input  logic             clk,
  input  logic             rst_n,
  // two-digit / linear-phase array
  input  logic [XW-1:0]    lp_x_i,
  input  logic             lp_xtag_i,
  input  logic             lp_ytag_i,
  output logic [AW-1:0]    lp_y_o,
  output logic [AW-1:0]    lp_lp_o,
  output cs_t              lp_y_cs_o,
  output logic [XW-1:0]    lp_x_o,
  output logic             lp_xtag_o,
  output logic             lp_ytag_o,
  output csd_coef_t [N-1:0] lp_h_o,
  // extended-precision array
  input  logic [XW-1:0]    ext_x_i,
  input  logic             ext_xtag_i,
  input  logic             ext_ytag_i,
  output logic [AW-1:0]    ext_y_o,
  output cs_t              ext_y_cs_o,
  output logic [XW-1:0]    ext_x_o,
  output logic             ext_xtag_o,
  output logic             ext_ytag_o,
  output logic [C-1:0]     ext_bypass_o,
  output csd_coef_t [C-1:0] ext_h_o
);

  pcpd_lp_fir #(.N(N)) u_lp (
    .clk, .rst_n,
    .x_i(lp_x_i), .xtag_i(lp_xtag_i), .ytag_i(lp_ytag_i),
    .y_cs_o(lp_y_cs_o), .y_o(lp_y_o), .lp_o(lp_lp_o),
    .x_o(lp_x_o), .xtag_o(lp_xtag_o), .ytag_o(lp_ytag_o), .h_o(lp_h_o)
  );

  pcpd_ext_fir #(.C(C)) u_ext (
    .clk, .rst_n,
    .x_i(ext_x_i), .xtag_i(ext_xtag_i), .ytag_i(ext_ytag_i),
    .y_cs_o(ext_y_cs_o), .y_o(ext_y_o),
    .x_o(ext_x_o), .xtag_o(ext_xtag_o), .ytag_o(ext_ytag_o),
    .bypass_o(ext_bypass_o), .h_o(ext_h_o)
  );

endmodule
