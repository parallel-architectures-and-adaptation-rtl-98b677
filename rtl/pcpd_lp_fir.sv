// pcpd_lp_fir: N-tap programmable FIR filter with fully pipelined data and
// control, built as a chain of pcpd_cell taps, with a folded linear-phase
// output of 2N taps.
//
// Programming: coefficients enter through the data port with x tag 1, in the
// order h(N-1), h(N-2), ..., h(0); the word carrying h(0) also has y tag 1.
// The y tag moves one cell per clock and the coefficients one cell per two
// clocks, so the y tag meets h(i) exactly in cell i, which stores it. Data words follow with both tags 0. Reprogramming takes N clocks and may
// be inserted at any time between data words.
//
// Outputs (x(n) = data word entering at clock n, counting from the first data
// word after a programming sequence, x(i) = 0 for i < 0):
//   y_cs_o  carry-save y(n) = sum_{i<N} h(i) x(n-i), at clock n+N
//   y_o     the same, carry-propagated, at clock n+N+1
//   lp_o    sum_{i<N} h(i) (x(n-i) + x(n-2N+1+i)), a linear-phase filter of
//           2N taps with h(2N-1-i) = h(i), at clock n+N+2; exact for n >= N-1
//           (earlier outputs of the Z stream may hold data of the previous
//           run)
// The Z stream enters cell 0 as zero and moves one cell per three clocks; it
// meets x(n+i) in cell i. After the last cell the Y stream is delayed by one
// register so that y(n) and the matching Z sum reach the final adder together.
// (The original drawing of the folded filter puts this register on the Z
// side; with the cell delays used here that would skip two taps, so the
// register sits on the Y side, which gives the formula above exactly. The
// odd-length folded variant is not provided.)
// The first cell takes y = z = 0. The chain end's x and tags are brought out
// for observation and chaining.
module pcpd_lp_fir
  import pcpd_pkg::*;
#(
  parameter int unsigned N = 64   // taps (cells)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_i,
  input  logic          xtag_i,
  input  logic          ytag_i,
  output cs_t           y_cs_o,
  output logic [AW-1:0] y_o,
  output logic [AW-1:0] lp_o,
  output logic [XW-1:0] x_o,
  output logic          xtag_o,
  output logic          ytag_o,
  output csd_coef_t [N-1:0] h_o   // stored coefficients (observation)
);

  logic [N:0][XW-1:0] x;
  logic [N:0]         xt, yt;
  cs_t  [N:0]         y, z;
  cs_t                y_dly;

  assign x[0]  = x_i;
  assign xt[0] = xtag_i;
  assign yt[0] = ytag_i;
  assign y[0]  = CS_ZERO;
  assign z[0]  = CS_ZERO;

  for (genvar k = 0; k < N; k++) begin : g_cell
    pcpd_cell u_cell (
      .clk, .rst_n,
      .x_i(x[k]), .xtag_i(xt[k]), .ytag_i(yt[k]), .y_i(y[k]), .z_i(z[k]),
      .x_o(x[k+1]), .xtag_o(xt[k+1]), .ytag_o(yt[k+1]), .y_o(y[k+1]), .z_o(z[k+1]),
      .h_o(h_o[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y_dly <= CS_ZERO;
    else        y_dly <= y[N];

  cs_final_adder u_yadd  (.clk, .rst_n, .a_i(y[N]),  .b_i(CS_ZERO), .sum_o(y_o));
  cs_final_adder u_lpadd (.clk, .rst_n, .a_i(y_dly), .b_i(z[N]),    .sum_o(lp_o));

  assign y_cs_o = y[N];
  assign x_o    = x[N];
  assign xtag_o = xt[N];
  assign ytag_o = yt[N];

endmodule
