// pcpd_ext_cell: filter tap whose coefficient may be one digit pair of a longer
// CSD coefficient that spans several consecutive cells.
//
// Besides the CSD pair h, the cell stores a bypass flag. When the flag is set
// the first of the two x registers (and of the two x tag registers) is
// skipped, so the X stream advances to the next cell in one clock instead of
// two. A Y item, which always takes one clock per cell, then meets the same
// data word in this cell and in the next one, and the next cell adds its digit
// pair for the same tap: the coefficient is h_j + h_{j+1} + ...
//
// Operation by incoming tags (x tag, y tag):
//   1,1  store: h <= coefficient code, bypass flag <= flag bit of the word
//   0,1  reset: bypass flag <= 0 (a y tag of 1 meeting data starts a wave of
//        resets that must precede a change of coefficient precision)
//   1,0  pass: y leaves unchanged
//   0,0  multiply-add: y += h*x
// As drawn in the filter description, the store enable of both h and the flag
// is the incoming y tag and a multiplexer steered by the x tag picks the flag
// bit (x tag 1) or 0 (x tag 0). On a reset h therefore takes the data word;
// this is harmless because new coefficients always follow a reset.
//
// Timing: y and its tag 1 register; x and its tag 2 registers, or 1 while the
// bypass flag is set. The cell has no Z stream (no linear-phase folding).
// Asynchronous active-low reset clears all registers (this design's choice).
module pcpd_ext_cell
  import pcpd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_i,
  input  logic          xtag_i,
  input  logic          ytag_i,
  input  cs_t           y_i,
  output logic [XW-1:0] x_o,
  output logic          xtag_o,
  output logic          ytag_o,
  output cs_t           y_o,
  output csd_coef_t     h_o,      // stored digit pair (observation only)
  output logic          bypass_o  // stored bypass flag
);

  csd_coef_t     h_q;
  logic          bypass_q;
  logic [AW-1:0] pp0, pp1;
  logic          neg0, neg1;
  cs_t           y_mac, y_d;
  logic [XW-1:0] x_q1, x_q2;
  logic          xtag_q1, xtag_q2;

  csd_term u_pp0 (.x_i(x_i), .digit_i(h_q.d0), .pp_o(pp0), .neg_o(neg0));
  csd_term u_pp1 (.x_i(x_i), .digit_i(h_q.d1), .pp_o(pp1), .neg_o(neg1));

  csa_4to2 #(.W(AW)) u_ycsa (
    .a_i(pp0), .b_i(pp1), .c_i(y_i.s), .d_i(y_i.c),
    .cin0_i(neg0), .cin1_i(neg1), .s_o(y_mac.s), .c_o(y_mac.c)
  );

  assign y_d = xtag_i ? y_i : y_mac;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q      <= '0;
      bypass_q <= 1'b0;
      x_q1     <= '0;
      x_q2     <= '0;
      xtag_q1  <= 1'b0;
      xtag_q2  <= 1'b0;
      ytag_o   <= 1'b0;
      y_o      <= CS_ZERO;
    end else begin
      if (ytag_i) begin
        h_q      <= csd_coef_t'(x_i[CODEW-1:0]);
        bypass_q <= xtag_i ? x_i[FLAG_BIT] : 1'b0;
      end
      x_q1    <= x_i;
      xtag_q1 <= xtag_i;
      x_q2    <= bypass_q ? x_i    : x_q1;
      xtag_q2 <= bypass_q ? xtag_i : xtag_q1;
      ytag_o  <= ytag_i;
      y_o     <= y_d;
    end
  end

  assign x_o      = x_q2;
  assign xtag_o   = xtag_q2;
  assign h_o      = h_q;
  assign bypass_o = bypass_q;

endmodule
