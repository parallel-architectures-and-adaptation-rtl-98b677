// tb_csd_term: checks one CSD partial product against integer multiplication.
// For random data words and every sign digit and position, pp + neg must equal
// s * x * 2^(15-p) modulo 2^32, and neg must be set exactly for a -1 digit.
module tb_csd_term;
  import pcpd_pkg::*;
  import pcpd_ref_pkg::*;

  logic [XW-1:0] x;
  csd_digit_t    d;
  logic [AW-1:0] pp;
  logic          neg;
  int checks = 0, failures = 0;

  csd_term dut (.x_i(x), .digit_i(d), .pp_o(pp), .neg_o(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      csd_coef_t h;
      logic [31:0] exp_v;
      x = (i < 4) ? XW'(16'h8000 + i) : XW'($urandom);
      d.s = (i % 3 == 0) ? 2'b00 : (i % 3 == 1) ? 2'b01 : 2'b11;
      d.p = 4'(i % 16);
      h.d0 = d;
      h.d1 = '{s: 2'b00, p: 4'd0};
      #1;
      exp_v = prod(h, x);
      checks++;
      if (pp + 32'(neg) !== exp_v || neg !== (d.s == 2'b11)) begin
        failures++;
        $display("mismatch x=%h s=%b p=%0d pp=%h neg=%b exp=%h", x, d.s, d.p, pp, neg, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
