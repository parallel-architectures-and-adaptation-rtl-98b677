// tb_pcpd_ext_cell: checks the extended-precision tap cycle by cycle against a
// behavioural model. Random tag pairs (store, reset, pass, multiply-add) and
// words are applied every clock. The model keeps its own digit pair and bypass
// flag (store: flag from bit 12; reset: flag cleared) and predicts y one clock
// later, the y tag one clock later, and x and its tag one clock later while the
// flag is set, two clocks later while it is clear. Every event, including
// bypassed and unbypassed x transfers, must occur.
module tb_pcpd_ext_cell;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  localparam int T = 800;
  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x_i, x_o;
  logic xtag_i, ytag_i, xtag_o, ytag_o, bypass_o;
  cs_t y_i, y_o;
  csd_coef_t h_o, h_m;
  logic byp_m;
  logic [XW-1:0] xq1, xq2;   // model of the x stages
  logic          tq1, tq2;
  int checks = 0, failures = 0;
  int n_store = 0, n_reset = 0, n_pass = 0, n_mac = 0, n_byp = 0, n_nobyp = 0;
  logic [AW-1:0] ey;
  logic          eyt;

  pcpd_ext_cell dut (.clk, .rst_n, .x_i, .xtag_i, .ytag_i, .y_i,
                     .x_o, .xtag_o, .ytag_o, .y_o, .h_o, .bypass_o);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what, int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("mismatch %s at cycle %0d", what, t);
    end
  endtask

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_i = '0; xtag_i = 0; ytag_i = 0; y_i = CS_ZERO;
    h_m = '0; byp_m = 0; xq1 = '0; xq2 = '0; tq1 = 0; tq2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < T; t++) begin
      xtag_i = ($urandom_range(2) == 0);
      ytag_i = ($urandom_range(4) == 0);
      x_i    = xtag_i ? coef_word(rand_coef(), 1'($urandom)) : XW'($urandom);
      y_i    = '{s: $urandom, c: $urandom};
      ey  = xtag_i ? y_i.s + y_i.c : y_i.s + y_i.c + prod(h_m, x_i);
      eyt = ytag_i;
      if (byp_m) n_byp++; else n_nobyp++;
      // model register update at the coming clock edge
      xq2 = byp_m ? x_i : xq1;
      tq2 = byp_m ? xtag_i : tq1;
      xq1 = x_i;
      tq1 = xtag_i;
      case ({xtag_i, ytag_i})
        2'b11:   n_store++;
        2'b01:   n_reset++;
        2'b10:   n_pass++;
        default: n_mac++;
      endcase
      if (ytag_i) begin
        h_m   = csd_coef_t'(x_i[CODEW-1:0]);
        byp_m = xtag_i ? x_i[FLAG_BIT] : 1'b0;
      end
      @(negedge clk);
      chk(y_o.s + y_o.c == ey, "y", t);
      chk(ytag_o == eyt, "ytag", t);
      chk(x_o == xq2 && xtag_o == tq2, "x", t);
      chk(bypass_o == byp_m && h_o == h_m, "state", t);
    end
    chk(n_store > 0 && n_reset > 0 && n_pass > 0 && n_mac > 0 && n_byp > 0 && n_nobyp > 0,
        "coverage", T);
    $display("store=%0d reset=%0d pass=%0d mac=%0d bypassed=%0d", n_store, n_reset, n_pass,
             n_mac, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
