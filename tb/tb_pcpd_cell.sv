// tb_pcpd_cell: checks the basic tap cycle by cycle against a behavioural model.
// Random words, x tags, y tags and carry-save y/z inputs are applied every
// clock. The model keeps its own coefficient (written when the y tag is 1) and
// predicts: y out one clock later (y in when x tag = 1, else y in + h*x), z out
// three clocks later (same rule), x and x tag two clocks later, y tag one clock
// later. Values are compared as s + c. Store, pass and multiply-add events are
// counted and each must occur.
module tb_pcpd_cell;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  localparam int T = 600;
  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x_i, x_o;
  logic xtag_i, ytag_i, xtag_o, ytag_o;
  cs_t y_i, z_i, y_o, z_o;
  csd_coef_t h_o, h_m;
  int checks = 0, failures = 0, n_store = 0, n_pass = 0, n_mac = 0;

  logic [XW-1:0] hx[T];
  logic          hxt[T], hyt[T];
  logic [AW-1:0] hy[T], hz[T];

  pcpd_cell dut (.clk, .rst_n, .x_i, .xtag_i, .ytag_i, .y_i, .z_i,
                 .x_o, .xtag_o, .ytag_o, .y_o, .z_o, .h_o);

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
    x_i = '0; xtag_i = 0; ytag_i = 0; y_i = CS_ZERO; z_i = CS_ZERO;
    h_m = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < T; t++) begin
      // stimulus for cycle t
      xtag_i = ($urandom_range(3) == 0);
      ytag_i = xtag_i && ($urandom_range(3) == 0);
      x_i    = xtag_i ? coef_word(rand_coef(), 1'b0) : XW'($urandom);
      y_i    = '{s: $urandom, c: $urandom};
      z_i    = '{s: $urandom, c: $urandom};
      // expected results of this cycle
      hx[t]  = x_i; hxt[t] = xtag_i; hyt[t] = ytag_i;
      hy[t]  = xtag_i ? y_i.s + y_i.c : y_i.s + y_i.c + prod(h_m, x_i);
      hz[t]  = xtag_i ? z_i.s + z_i.c : z_i.s + z_i.c + prod(h_m, x_i);
      if (xtag_i && ytag_i) n_store++;
      else if (xtag_i)      n_pass++;
      else                  n_mac++;
      if (ytag_i) h_m = csd_coef_t'(x_i[CODEW-1:0]);
      @(negedge clk);
      chk(y_o.s + y_o.c == hy[t], "y", t);
      chk(ytag_o == hyt[t], "ytag", t);
      chk(h_o == h_m, "h", t);
      if (t >= 1) begin
        chk(x_o == hx[t-1], "x", t);
        chk(xtag_o == hxt[t-1], "xtag", t);
      end
      if (t >= 2) chk(z_o.s + z_o.c == hz[t-2], "z", t);
    end
    chk(n_store > 0 && n_pass > 0 && n_mac > 0, "coverage", T);
    $display("store=%0d pass=%0d mac=%0d", n_store, n_pass, n_mac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
