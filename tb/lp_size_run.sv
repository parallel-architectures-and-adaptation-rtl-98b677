// lp_size_run: testbench helper that programs one pcpd_lp_fir of N taps with
// random two-digit CSD coefficients, streams D random data words and checks
// the N-tap output (latency N+1) and the 2N-tap linear-phase output (latency
// N+2, from n = N-1 on) against directly computed sums. It raises done_o when
// finished and reports its check and failure counts.
module lp_size_run
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;
#(
  parameter int N = 4,
  parameter int D = 64
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int L = N + D + N + 4;

  logic [XW-1:0] x_i, x_o;
  logic xtag_i, ytag_i, xtag_o, ytag_o;
  cs_t y_cs;
  logic [AW-1:0] y_o, lp_o;
  csd_coef_t [N-1:0] h_o;
  csd_coef_t hr[N];
  logic [XW-1:0] xr[D];
  int sn[L];
  logic [XW-1:0] sx[L];
  logic sxt[L], syt[L];

  pcpd_lp_fir #(.N(N)) dut (.clk, .rst_n, .x_i, .xtag_i, .ytag_i, .y_cs_o(y_cs), .y_o,
                            .lp_o, .x_o, .xtag_o, .ytag_o, .h_o);

  function automatic logic [AW-1:0] ref_y(int n);
    logic [AW-1:0] acc = '0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += prod(hr[i], xr[n-i]);
    return acc;
  endfunction

  function automatic logic [AW-1:0] ref_lp(int n);
    logic [AW-1:0] acc = ref_y(n);
    for (int i = 0; i < N; i++)
      if (n - 2*N + 1 + i >= 0) acc += prod(hr[i], xr[n-2*N+1+i]);
    return acc;
  endfunction

  initial begin
    int p;
    done_o = 0; checks_o = 0; failures_o = 0;
    x_i = '0; xtag_i = 0; ytag_i = 0;
    p = 0;
    for (int i = 0; i < N; i++) hr[i] = rand_coef();
    for (int n = 0; n < D; n++) xr[n] = XW'($urandom);
    for (int i = N - 1; i >= 0; i--) begin
      sx[p] = coef_word(hr[i], 1'b0); sxt[p] = 1; syt[p] = (i == 0); sn[p] = -1; p++;
    end
    for (int n = 0; n < D; n++) begin
      sx[p] = xr[n]; sxt[p] = 0; syt[p] = 0; sn[p] = n; p++;
    end
    for (; p < L; p++) begin sx[p] = '0; sxt[p] = 0; syt[p] = 0; sn[p] = -1; end
    @(posedge rst_n);
    for (int t = 0; t < L; t++) begin
      @(negedge clk);
      // outputs of inputs applied N and N+1 clocks before this one
      if (t - N - 1 >= 0 && sn[t-N-1] >= 0) begin
        checks_o++;
        if (y_o != ref_y(sn[t-N-1])) failures_o++;
      end
      if (t - N - 2 >= 0 && sn[t-N-2] >= N - 1) begin
        checks_o++;
        if (lp_o != ref_lp(sn[t-N-2])) failures_o++;
      end
      x_i = sx[t]; xtag_i = sxt[t]; ytag_i = syt[t];
    end
    @(negedge clk);
    done_o = 1;
  end
endmodule
