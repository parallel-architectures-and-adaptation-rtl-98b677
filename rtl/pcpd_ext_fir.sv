// pcpd_ext_fir: programmable FIR filter whose coefficients may have more than
// two CSD digits, built as a chain of C pcpd_ext_cell cells.
//
// A coefficient with L signed digits occupies ceil(L/2) consecutive cells, each
// holding one digit pair; every cell but the last of such a group has its
// bypass flag set, so the X stream crosses the group one cell per clock, in
// step with the Y stream, and all pairs multiply the same data word.
//
// Programming sequence, all through the data port:
//   1. one word with x tag 0 and y tag 1: a wave of resets clears every
//      bypass flag (the data value is irrelevant);
//   2. C coefficient words with x tag 1, last cell's pair first, each carrying
//      its cell's bypass flag in bit 12; the word for cell 0 also has y tag 1;
//   3. data words with both tags 0.
// The reset wave runs one cell per clock just ahead of the coefficients, so
// they travel through unbypassed cells and the y tag meets the pair for cell k
// exactly in cell k.
//
// Outputs: with tap(0) = 0 and tap(k) = tap(k-1) + (flag(k-1) ? 0 : 1),
// y(n) = sum_k h_k x(n - tap(k)), x(i) = 0 for i < 0, where x(0) is the first
// data word after step 2. y_cs_o holds y(n) in carry-save form at clock n+C,
// y_o carry-propagated at clock n+C+1. bypass_o shows each cell's flag.
module pcpd_ext_fir
  import pcpd_pkg::*;
#(
  parameter int unsigned C = 64   // cells (digit pairs)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_i,
  input  logic          xtag_i,
  input  logic          ytag_i,
  output cs_t           y_cs_o,
  output logic [AW-1:0] y_o,
  output logic [XW-1:0] x_o,
  output logic          xtag_o,
  output logic          ytag_o,
  output logic [C-1:0]  bypass_o,
  output csd_coef_t [C-1:0] h_o   // stored digit pairs (observation)
);

  logic [C:0][XW-1:0] x;
  logic [C:0]         xt, yt;
  cs_t  [C:0]         y;

  assign x[0]  = x_i;
  assign xt[0] = xtag_i;
  assign yt[0] = ytag_i;
  assign y[0]  = CS_ZERO;

  for (genvar k = 0; k < C; k++) begin : g_cell
    pcpd_ext_cell u_cell (
      .clk, .rst_n,
      .x_i(x[k]), .xtag_i(xt[k]), .ytag_i(yt[k]), .y_i(y[k]),
      .x_o(x[k+1]), .xtag_o(xt[k+1]), .ytag_o(yt[k+1]), .y_o(y[k+1]),
      .h_o(h_o[k]), .bypass_o(bypass_o[k])
    );
  end

  cs_final_adder u_yadd (.clk, .rst_n, .a_i(y[C]), .b_i(CS_ZERO), .sum_o(y_o));

  assign y_cs_o = y[C];
  assign x_o    = x[C];
  assign xtag_o = xt[C];
  assign ytag_o = yt[C];

endmodule
