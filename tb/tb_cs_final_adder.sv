// tb_cs_final_adder: checks the final carry-propagate adder. Random pairs of
// carry-save numbers are applied every clock; one clock later the output must
// equal the sum of all four words modulo 2^32.
module tb_cs_final_adder;
  import pcpd_pkg::*;
  logic clk = 0, rst_n = 0;
  cs_t a, b;
  logic [AW-1:0] sum, exp_q;
  logic have = 0;
  int checks = 0, failures = 0;

  cs_final_adder dut (.clk, .rst_n, .a_i(a), .b_i(b), .sum_o(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = CS_ZERO; b = CS_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (sum !== exp_q) begin
          failures++;
          $display("mismatch sum=%h exp=%h", sum, exp_q);
        end
      end
      a = '{s: $urandom, c: $urandom};
      b = (i % 4 == 0) ? CS_ZERO : '{s: $urandom, c: $urandom};
      exp_q = a.s + a.c + b.s + b.c;
      have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
