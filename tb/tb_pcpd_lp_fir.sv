// tb_pcpd_lp_fir: end-to-end test of the two-digit filter array (N = 8 here).
// Three programming runs with random CSD coefficients, each followed by random
// data, are streamed back to back through the single input port, so later runs
// reprogram the filter while the previous run's results are still in flight.
// For every data word x(n) of a run the testbench checks
//   y_cs (carry-save) at clock n+N and y at clock n+N+1 against
//       sum_{i<N} h(i) x(n-i),
//   lp at clock n+N+2, for n >= N-1, against
//       sum_{i<N} h(i) (x(n-i) + x(n-2N+1+i)),
// with x(i) = 0 before the run, and the stored coefficients after each run's
// programming. The y tag must leave the chain N clocks after it entered.
module tb_pcpd_lp_fir;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  localparam int N    = 8;
  localparam int RUNS = 3;
  localparam int D    = 40;                 // data words per run
  localparam int L    = RUNS * (N + D) + N + 8;

  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x_i, x_o;
  logic xtag_i, ytag_i, xtag_o, ytag_o;
  cs_t y_cs;
  logic [AW-1:0] y_o, lp_o;
  csd_coef_t [N-1:0] h_o;

  // schedule
  logic [XW-1:0] sx[L];
  logic          sxt[L], syt[L];
  int            srun[L], sn[L];            // run and data index, -1 if not data
  csd_coef_t     hr[RUNS][N];
  logic [XW-1:0] xr[RUNS][D];
  int checks = 0, failures = 0, n_lp = 0, n_y = 0, n_tag = 0;

  pcpd_lp_fir #(.N(N)) dut (.clk, .rst_n, .x_i, .xtag_i, .ytag_i, .y_cs_o(y_cs), .y_o,
                            .lp_o, .x_o, .xtag_o, .ytag_o, .h_o);

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] ref_y(int r, int n);
    logic [AW-1:0] acc = '0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += prod(hr[r][i], xr[r][n-i]);
    return acc;
  endfunction

  function automatic logic [AW-1:0] ref_lp(int r, int n);
    logic [AW-1:0] acc = ref_y(r, n);
    for (int i = 0; i < N; i++)
      if (n - 2*N + 1 + i >= 0) acc += prod(hr[r][i], xr[r][n-2*N+1+i]);
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
      for (int i = 0; i < N; i++) hr[r][i] = rand_coef();
      for (int n = 0; n < D; n++) xr[r][n] = XW'($urandom);
      for (int i = N - 1; i >= 0; i--) begin
        sx[p] = coef_word(hr[r][i], 1'b0); sxt[p] = 1; syt[p] = (i == 0);
        srun[p] = r; sn[p] = -1; p++;
      end
      for (int n = 0; n < D; n++) begin
        sx[p] = xr[r][n]; sxt[p] = 0; syt[p] = 0; srun[p] = r; sn[p] = n; p++;
      end
    end
    for (; p < L; p++) begin
      sx[p] = '0; sxt[p] = 0; syt[p] = 0; srun[p] = RUNS - 1; sn[p] = -1;
    end

    x_i = '0; xtag_i = 0; ytag_i = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < L; t++) begin
      x_i = sx[t]; xtag_i = sxt[t]; ytag_i = syt[t];
      @(negedge clk);
      // outputs now belong to inputs applied N, N+1, N+2 cycles ago
      if (t - N + 1 >= 0) begin
        int s;
        s = t - N + 1;
        chk(ytag_o == syt[s], "ytag latency", t);
        if (syt[s]) begin
          n_tag++;
          for (int i = 0; i < N; i++) chk(h_o[i] == hr[srun[s]][i], "stored h", t);
        end
        if (sn[s] >= 0) chk(y_cs.s + y_cs.c == ref_y(srun[s], sn[s]), "y_cs", t);
      end
      if (t - N >= 0 && sn[t-N] >= 0) begin
        n_y++;
        chk(y_o == ref_y(srun[t-N], sn[t-N]), "y", t);
      end
      if (t - N - 1 >= 0 && sn[t-N-1] >= N - 1) begin
        n_lp++;
        chk(lp_o == ref_lp(srun[t-N-1], sn[t-N-1]), "lp", t);
      end
    end
    chk(n_tag == RUNS, "all programming runs seen", L);
    chk(n_lp > 0 && n_y > 0, "outputs seen", L);
    $display("programming runs=%0d y checked=%0d lp checked=%0d", n_tag, n_y, n_lp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
