// tb_summand_gen: summand generation at the default single-precision
// configuration (25 bits, 13 x 13 multipliers) and at the three-byte
// (9 x 9) and four-byte (17 x 17 with 9 x 9) configurations.
module tb_summand_gen;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;
  int checks = 0, failures = 0;

  tb_gen_case #(.N(25), .M(13)) u_c13 (.clk(clk), .done(d0), .checks(c0), .failures(f0));
  tb_gen_case #(.N(25), .M(9))  u_c9  (.clk(clk), .done(d1), .checks(c1), .failures(f1));
  tb_gen_case #(.N(57), .M(17)) u_c17 (.clk(clk), .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (100000) @(posedge clk);
    failures = f0 + f1 + f2 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, failures);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2; failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
