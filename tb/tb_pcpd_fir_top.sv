// tb_pcpd_fir_top: end-to-end test of the whole filter at its default size
// (64-tap two-digit array, 64-cell extended-precision array), both arrays
// running at once from their own input ports.
//
// Each array gets RUNS programming runs streamed back to back with random data
// between them, so every run after the first reprograms a filter that is still
// producing results. Checked for every data word x(n):
//   lp_y   at clock n+N+1 = sum_{i<N} h(i) x(n-i)
//   lp_lp  at clock n+N+2 = sum_{i<N} h(i) (x(n-i) + x(n-2N+1+i)), n >= N-1
//   ext_y  at clock n+C+1 = sum_k h_k x(n - tap(k))
// and the stored coefficients and bypass flags when each store tag leaves a
// chain. Mechanisms counted, each of which must occur: coefficient store,
// coefficient pass (coefficient words crossing cells), multiply-add,
// reprogramming during operation, linear-phase output, bypass reset wave,
// bypass flag set, and a coefficient spanning several cells.
module tb_pcpd_fir_top;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  localparam int N    = 64;   // must match the top's defaults
  localparam int C    = 64;
  localparam int RUNS = 2;
  localparam int D    = 300;
  localparam int LL   = RUNS * (N + D) + N + 8;
  localparam int LE   = RUNS * (1 + C + D) + C + 8;
  localparam int L    = (LL > LE) ? LL : LE;

  logic clk = 0, rst_n = 0;
  logic [XW-1:0] lp_x_i, ext_x_i, lp_x_o, ext_x_o;
  logic lp_xtag_i, lp_ytag_i, ext_xtag_i, ext_ytag_i;
  logic lp_xtag_o, lp_ytag_o, ext_xtag_o, ext_ytag_o;
  logic [AW-1:0] lp_y_o, lp_lp_o, ext_y_o;
  cs_t lp_y_cs_o, ext_y_cs_o;
  logic [C-1:0] ext_bypass_o;
  csd_coef_t [N-1:0] lp_h_o;
  csd_coef_t [C-1:0] ext_h_o;

  // schedules: lp (two-digit array) and ext (extended-precision array)
  logic [XW-1:0] ax[L], bx[L];
  logic          axt[L], ayt[L], bxt[L], byt[L];
  int            arun[L], an[L], brun[L], bn[L];
  csd_coef_t     ha[RUNS][N], hb[RUNS][C];
  logic          fb[RUNS][C];
  logic [XW-1:0] xa[RUNS][D], xb[RUNS][D];

  int checks = 0, failures = 0;
  int c_store = 0, c_pass = 0, c_mac = 0, c_reprog = 0, c_lp = 0;
  int c_reset = 0, c_flag = 0, c_span = 0;

  pcpd_fir_top dut (
    .clk, .rst_n,
    .lp_x_i, .lp_xtag_i, .lp_ytag_i, .lp_y_o, .lp_lp_o, .lp_y_cs_o, .lp_x_o,
    .lp_xtag_o, .lp_ytag_o, .lp_h_o,
    .ext_x_i, .ext_xtag_i, .ext_ytag_i, .ext_y_o, .ext_y_cs_o, .ext_x_o,
    .ext_xtag_o, .ext_ytag_o, .ext_bypass_o, .ext_h_o
  );

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] ref_a(int r, int n);
    logic [AW-1:0] acc = '0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += prod(ha[r][i], xa[r][n-i]);
    return acc;
  endfunction

  function automatic logic [AW-1:0] ref_lp(int r, int n);
    logic [AW-1:0] acc = ref_a(r, n);
    for (int i = 0; i < N; i++)
      if (n - 2*N + 1 + i >= 0) acc += prod(ha[r][i], xa[r][n-2*N+1+i]);
    return acc;
  endfunction

  function automatic logic [AW-1:0] ref_b(int r, int n);
    logic [AW-1:0] acc = '0;
    int tap = 0;
    for (int k = 0; k < C; k++) begin
      if (k > 0 && !fb[r][k-1]) tap++;
      if (n - tap >= 0) acc += prod(hb[r][k], xb[r][n-tap]);
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
    repeat (L + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, q;
    p = 0; q = 0;
    for (int r = 0; r < RUNS; r++) begin
      for (int i = 0; i < N; i++) ha[r][i] = rand_coef();
      for (int k = 0; k < C; k++) begin
        hb[r][k] = rand_coef();
        fb[r][k] = ($urandom_range(2) == 0);
        if (fb[r][k]) c_flag++;
        if (k > 0 && fb[r][k-1]) c_span++;
      end
      for (int n = 0; n < D; n++) begin
        xa[r][n] = XW'($urandom);
        xb[r][n] = XW'($urandom);
      end
      for (int i = N - 1; i >= 0; i--) begin
        ax[p] = coef_word(ha[r][i], 1'b0); axt[p] = 1; ayt[p] = (i == 0);
        arun[p] = r; an[p] = -1; p++;
      end
      for (int n = 0; n < D; n++) begin
        ax[p] = xa[r][n]; axt[p] = 0; ayt[p] = 0; arun[p] = r; an[p] = n; p++;
      end
      bx[q] = '0; bxt[q] = 0; byt[q] = 1; brun[q] = r; bn[q] = -2; q++;
      for (int k = C - 1; k >= 0; k--) begin
        bx[q] = coef_word(hb[r][k], fb[r][k]); bxt[q] = 1; byt[q] = (k == 0);
        brun[q] = r; bn[q] = -1; q++;
      end
      for (int n = 0; n < D; n++) begin
        bx[q] = xb[r][n]; bxt[q] = 0; byt[q] = 0; brun[q] = r; bn[q] = n; q++;
      end
    end
    for (; p < L; p++) begin ax[p] = '0; axt[p] = 0; ayt[p] = 0; arun[p] = 0; an[p] = -3; end
    for (; q < L; q++) begin bx[q] = '0; bxt[q] = 0; byt[q] = 0; brun[q] = 0; bn[q] = -3; end

    lp_x_i = '0; lp_xtag_i = 0; lp_ytag_i = 0;
    ext_x_i = '0; ext_xtag_i = 0; ext_ytag_i = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < L; t++) begin
      int s;
      lp_x_i = ax[t]; lp_xtag_i = axt[t]; lp_ytag_i = ayt[t];
      ext_x_i = bx[t]; ext_xtag_i = bxt[t]; ext_ytag_i = byt[t];
      if (axt[t]) c_pass += N - 1;           // a coefficient word crosses the other cells
      if (an[t] >= 0) c_mac++;
      if (ayt[t] && arun[t] > 0) c_reprog++;
      @(negedge clk);
      // two-digit array
      s = t - N + 1;
      if (s >= 0) begin
        chk(lp_ytag_o == ayt[s], "lp ytag latency", t);
        if (ayt[s]) begin
          c_store++;
          for (int i = 0; i < N; i++) chk(lp_h_o[i] == ha[arun[s]][i], "lp stored h", t);
        end
      end
      s = t - N;
      if (s >= 0 && an[s] >= 0) chk(lp_y_o == ref_a(arun[s], an[s]), "lp y", t);
      s = t - N - 1;
      if (s >= 0 && an[s] >= N - 1) begin
        c_lp++;
        chk(lp_lp_o == ref_lp(arun[s], an[s]), "lp linear phase", t);
      end
      // extended-precision array
      s = t - C + 1;
      if (s >= 0) begin
        chk(ext_ytag_o == byt[s], "ext ytag latency", t);
        if (byt[s] && bn[s] == -2) begin
          c_reset++;
          chk(ext_bypass_o == '0, "ext flags cleared", t);
        end
        if (byt[s] && bn[s] == -1)
          for (int k = 0; k < C; k++)
            chk(ext_h_o[k] == hb[brun[s]][k] && ext_bypass_o[k] == fb[brun[s]][k],
                "ext stored pair", t);
      end
      s = t - C;
      if (s >= 0 && bn[s] >= 0) chk(ext_y_o == ref_b(brun[s], bn[s]), "ext y", t);
    end
    $display("store=%0d pass=%0d mac=%0d reprogram=%0d linear_phase=%0d reset_wave=%0d flags=%0d spans=%0d",
             c_store, c_pass, c_mac, c_reprog, c_lp, c_reset, c_flag, c_span);
    chk(c_store > 0, "store seen", L);
    chk(c_pass > 0, "pass seen", L);
    chk(c_mac > 0, "mac seen", L);
    chk(c_reprog > 0, "reprogramming seen", L);
    chk(c_lp > 0, "linear-phase output seen", L);
    chk(c_reset > 0, "bypass reset wave seen", L);
    chk(c_flag > 0, "bypass flag set", L);
    chk(c_span > 0, "coefficient spanning cells", L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
