// tb_csa_4to2: checks the two-level carry-save tree. For random operands and
// carry-ins, s + c must equal a + b + c + d + cin0 + cin1 modulo 2^32, and the
// carry word's bit 0 must be the second carry-in.
module tb_csa_4to2;
  logic [31:0] a, b, c, d, s, cy;
  logic        ci0, ci1;
  int checks = 0, failures = 0;

  csa_4to2 #(.W(32)) dut (.a_i(a), .b_i(b), .c_i(c), .d_i(d),
                          .cin0_i(ci0), .cin1_i(ci1), .s_o(s), .c_o(cy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      if (i < 4) begin a = '1; b = '1; c = '1; d = '1; end
      ci0 = 1'($urandom); ci1 = 1'($urandom);
      #1;
      checks++;
      if (s + cy !== a + b + c + d + 32'(ci0) + 32'(ci1) || cy[0] !== ci1) begin
        failures++;
        $display("mismatch a=%h b=%h c=%h d=%h s=%h cy=%h", a, b, c, d, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
