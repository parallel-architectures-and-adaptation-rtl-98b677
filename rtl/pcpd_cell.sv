// pcpd_cell: basic tap of the fully pipelined programmable FIR filter.
//
// Three streams pass through the cell: the X stream (data words and, ahead of
// them, coefficient words) with its x tag, the Y stream of partial results with
// its y tag, and a Z stream of partial results used to fold a linear-phase
// filter. Nothing is broadcast: every signal enters from the previous cell and
// leaves through a register, so only the clock and reset are global.
//
// The two tags that meet in the cell choose its operation:
//   x tag 1, y tag 1  store: the coefficient word on x is written into h
//   x tag 1, y tag 0  pass:  y and z leave unchanged (coefficient passing by)
//   x tag 0, y tag 0  multiply-add: y += h*x and z += h*x
// The coefficient register is enabled by the incoming y tag and the y/z
// multiplexers are steered by the incoming x tag, as in the cell drawing of
// the filter description. h*x is formed as two shifted, possibly complemented
// data words (one per CSD digit) that a two-level carry-save tree adds to the
// incoming carry-save y (and, separately, z); no carry propagates in a cell.
//
// Timing: x and its tag leave after 2 registers, y and its tag after 1, z
// after 3. So a Y item moves one cell per clock, an X item one cell per two
// clocks and a Z item one cell per three clocks. Asynchronous active-low reset
// clears every register (reset style is this design's choice).
module pcpd_cell
  import pcpd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_i,
  input  logic          xtag_i,
  input  logic          ytag_i,
  input  cs_t           y_i,
  input  cs_t           z_i,
  output logic [XW-1:0] x_o,
  output logic          xtag_o,
  output logic          ytag_o,
  output cs_t           y_o,
  output cs_t           z_o,
  output csd_coef_t     h_o      // stored coefficient (observation only)
);

  csd_coef_t     h_q;
  logic [AW-1:0] pp0, pp1;
  logic          neg0, neg1;
  cs_t           y_mac, z_mac, y_d, z_d;

  logic [1:0][XW-1:0] x_q;      // x pipeline, [0] first stage
  logic [1:0]         xtag_q;
  cs_t  [2:0]         z_q;      // z pipeline, [0] first stage

  csd_term u_pp0 (.x_i(x_i), .digit_i(h_q.d0), .pp_o(pp0), .neg_o(neg0));
  csd_term u_pp1 (.x_i(x_i), .digit_i(h_q.d1), .pp_o(pp1), .neg_o(neg1));

  csa_4to2 #(.W(AW)) u_ycsa (
    .a_i(pp0), .b_i(pp1), .c_i(y_i.s), .d_i(y_i.c),
    .cin0_i(neg0), .cin1_i(neg1), .s_o(y_mac.s), .c_o(y_mac.c)
  );
  csa_4to2 #(.W(AW)) u_zcsa (
    .a_i(pp0), .b_i(pp1), .c_i(z_i.s), .d_i(z_i.c),
    .cin0_i(neg0), .cin1_i(neg1), .s_o(z_mac.s), .c_o(z_mac.c)
  );

  // x tag 1: pass, x tag 0: multiply-add
  always_comb begin
    y_d = xtag_i ? y_i : y_mac;
    z_d = xtag_i ? z_i : z_mac;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q    <= '0;
      x_q    <= '0;
      xtag_q <= '0;
      ytag_o <= 1'b0;
      y_o    <= CS_ZERO;
      z_q    <= '0;
    end else begin
      if (ytag_i) h_q <= csd_coef_t'(x_i[CODEW-1:0]);
      x_q    <= {x_q[0], x_i};
      xtag_q <= {xtag_q[0], xtag_i};
      ytag_o <= ytag_i;
      y_o    <= y_d;
      z_q    <= {z_q[1:0], z_d};
    end
  end

  assign x_o    = x_q[1];
  assign xtag_o = xtag_q[1];
  assign z_o    = z_q[2];
  assign h_o    = h_q;

endmodule
