// tb_workloads: runs the filter sizes of the cost and speed comparison
// (N = 4, 8, 16, 32, 64, 128, 256 taps of the two-digit array, each also as a
// folded linear-phase filter of 2N taps) and the three-tap example with a
// four-digit middle coefficient on a four-cell extended-precision array.
// Each size is programmed once and fed random data; outputs are compared with
// directly computed sums. The example check expects y(n) = h(0)x(n) +
// (h0(1) + h1(1))x(n-1) + h(2)x(n-2) at clock n+5.
module tb_workloads;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  localparam int NS = 7;
  localparam int SIZES[NS] = '{4, 8, 16, 32, 64, 128, 256};

  logic clk = 0, rst_n = 0;
  logic [NS-1:0] done;
  int ck[NS], fl[NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_size
    lp_size_run #(.N(SIZES[g]), .D(2 * SIZES[g] + 16)) u_run (
      .clk, .rst_n, .done_o(done[g]), .checks_o(ck[g]), .failures_o(fl[g]));
  end

  // three-tap example: cells h(0), h0(1) (flag set), h1(1), h(2)
  localparam int C = 4;
  localparam int D = 30;
  logic [XW-1:0] x_i, x_o;
  logic xtag_i, ytag_i, xtag_o, ytag_o;
  cs_t y_cs;
  logic [AW-1:0] y_o;
  logic [C-1:0] byp;
  csd_coef_t [C-1:0] h_o;
  csd_coef_t hc[C];
  logic [XW-1:0] xd[D];
  logic ex_done = 0;

  pcpd_ext_fir #(.C(C)) u_ex (.clk, .rst_n, .x_i, .xtag_i, .ytag_i, .y_cs_o(y_cs), .y_o,
                              .x_o, .xtag_o, .ytag_o, .bypass_o(byp), .h_o);

  function automatic logic [AW-1:0] ref_ex(int n);
    logic [AW-1:0] acc = '0;
    if (n >= 0) acc += prod(hc[0], xd[n]);
    if (n >= 1) acc += prod(hc[1], xd[n-1]) + prod(hc[2], xd[n-1]);
    if (n >= 2) acc += prod(hc[3], xd[n-2]);
    return acc;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_i = '0; xtag_i = 0; ytag_i = 0;
    for (int k = 0; k < C; k++) hc[k] = rand_coef();
    for (int n = 0; n < D; n++) xd[n] = XW'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // reset wave, then digit pairs h(2), h1(1), h0(1) (continues), h(0)
    x_i = '0; xtag_i = 0; ytag_i = 1;
    for (int k = C - 1; k >= 0; k--) begin
      @(negedge clk);
      x_i = coef_word(hc[k], k == 1); xtag_i = 1; ytag_i = (k == 0);
    end
    for (int t = 0; t < D + C + 2; t++) begin
      @(negedge clk);
      x_i = (t < D) ? xd[t] : '0; xtag_i = 0; ytag_i = 0;
      // x(t) is applied now; y(n) appears C+1 clocks after x(n) was applied
      if (t - C - 1 >= 0 && t - C - 1 < D) begin
        checks++;
        if (y_o != ref_ex(t - C - 1)) begin
          failures++;
          $display("example mismatch n=%0d", t - C - 1);
        end
      end
    end
    checks++;
    if (byp != 4'b0010) failures++;
    ex_done = 1;
  end

  initial begin
    wait (ex_done && &done);
    for (int g = 0; g < NS; g++) begin
      $display("N=%0d checks=%0d failures=%0d", SIZES[g], ck[g], fl[g]);
      checks += ck[g];
      failures += fl[g];
      if (ck[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
