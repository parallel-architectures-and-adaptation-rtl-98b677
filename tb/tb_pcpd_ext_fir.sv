// tb_pcpd_ext_fir: end-to-end test of the extended-precision array (C = 6
// cells here). Four programming runs are streamed back to back, each made of a
// bypass reset word, C digit-pair words with random bypass flags (so random
// coefficients of 2 to 12 signed digits), and random data. The first run is
// the three-tap example of the filter description with a four-digit middle
// coefficient (flags 0,1,0,0 in cells 0..3) extended to six cells. For every
// data word x(n) the filter output at clock n+C+1 is compared with
// sum_k h_k x(n - tap(k)), tap(0) = 0, tap(k) = tap(k-1) + (flag(k-1) ? 0 : 1).
// When the reset tag leaves the chain all flags must be clear; when the store
// tag leaves, flags and digit pairs must hold the programmed values. Runs that
// set and clear flags and bypassed transfers are counted and must occur.
module tb_pcpd_ext_fir;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  localparam int C    = 6;
  localparam int RUNS = 4;
  localparam int D    = 40;
  localparam int L    = RUNS * (1 + C + D) + C + 8;

  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x_i, x_o;
  logic xtag_i, ytag_i, xtag_o, ytag_o;
  cs_t y_cs;
  logic [AW-1:0] y_o;
  logic [C-1:0] bypass_o;
  csd_coef_t [C-1:0] h_o;

  logic [XW-1:0] sx[L];
  logic          sxt[L], syt[L];
  int            srun[L], sn[L];
  csd_coef_t     hr[RUNS][C];
  logic          fr[RUNS][C];
  logic [XW-1:0] xr[RUNS][D];
  int checks = 0, failures = 0, n_reset = 0, n_store = 0, n_y = 0, n_flag = 0;

  pcpd_ext_fir #(.C(C)) dut (.clk, .rst_n, .x_i, .xtag_i, .ytag_i, .y_cs_o(y_cs), .y_o,
                             .x_o, .xtag_o, .ytag_o, .bypass_o, .h_o);

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] ref_y(int r, int n);
    logic [AW-1:0] acc = '0;
    int tap = 0;
    for (int k = 0; k < C; k++) begin
      if (k > 0 && !fr[r][k-1]) tap++;
      if (n - tap >= 0) acc += prod(hr[r][k], xr[r][n-tap]);
    end
    return acc;
  endfunction

  task automatic chk(logic cond, string what, int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("mismatch %s at cycle %0d", what, t);
    end
  endtask

  initial begin
    repeat (L + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p = 0;
    for (int r = 0; r < RUNS; r++) begin
      for (int k = 0; k < C; k++) begin
        hr[r][k] = rand_coef();
        fr[r][k] = (r == 0) ? (k == 1) : 1'($urandom);
        if (fr[r][k]) n_flag++;
      end
      for (int n = 0; n < D; n++) xr[r][n] = XW'($urandom);
      sx[p] = XW'($urandom); sxt[p] = 0; syt[p] = 1; srun[p] = r; sn[p] = -2; p++;
      for (int k = C - 1; k >= 0; k--) begin
        sx[p] = coef_word(hr[r][k], fr[r][k]); sxt[p] = 1; syt[p] = (k == 0);
        srun[p] = r; sn[p] = -1; p++;
      end
      for (int n = 0; n < D; n++) begin
        sx[p] = xr[r][n]; sxt[p] = 0; syt[p] = 0; srun[p] = r; sn[p] = n; p++;
      end
    end
    for (; p < L; p++) begin
      sx[p] = '0; sxt[p] = 0; syt[p] = 0; srun[p] = RUNS - 1; sn[p] = -3;
    end

    x_i = '0; xtag_i = 0; ytag_i = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < L; t++) begin
      int s;
      x_i = sx[t]; xtag_i = sxt[t]; ytag_i = syt[t];
      @(negedge clk);
      s = t - C + 1;
      if (s >= 0) begin
        chk(ytag_o == syt[s], "ytag latency", t);
        if (syt[s] && sn[s] == -2) begin
          n_reset++;
          chk(bypass_o == '0, "flags cleared by reset wave", t);
        end
        if (syt[s] && sn[s] == -1) begin
          n_store++;
          for (int k = 0; k < C; k++)
            chk(h_o[k] == hr[srun[s]][k] && bypass_o[k] == fr[srun[s]][k], "stored pair", t);
        end
        if (sn[s] >= 0) chk(y_cs.s + y_cs.c == ref_y(srun[s], sn[s]), "y_cs", t);
      end
      s = t - C;
      if (s >= 0 && sn[s] >= 0) begin
        n_y++;
        chk(y_o == ref_y(srun[s], sn[s]), "y", t);
      end
    end
    chk(n_reset == RUNS && n_store == RUNS, "all resets and stores seen", L);
    chk(n_flag > 0 && n_y > 0, "bypass used and outputs seen", L);
    $display("resets=%0d stores=%0d flags set=%0d y checked=%0d", n_reset, n_store, n_flag, n_y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
