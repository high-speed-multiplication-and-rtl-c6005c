// tb_hs_mult_configs: the multiplier in its other configurations:
//   * 25-bit operands, 9 x 9 multipliers: three bytes (9,8,8 bits), nine
//     summands, (3,2) and (5,2) counters;
//   * 57-bit operands (sign plus 56-bit fraction), 17 x 17 and 9 x 9
//     multipliers: four bytes (9,16,16,16 bits), sixteen summands, up to
//     (7,2) counters;
//   * the default 25-bit, 13 x 13 configuration without pipeline registers.
// Every product and its latency are checked, and inter-column carries must
// occur in the first two and never in the (3,2)-only row.
module tb_hs_mult_configs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2, k0, k1, k2;
  int checks, failures;

  tb_mult_case #(.N(25), .M(9))  u_m9  (.clk(clk), .rst_n(rst_n), .done(d0), .checks(c0), .failures(f0), .carry_vectors(k0));
  tb_mult_case #(.N(57), .M(17)) u_m17 (.clk(clk), .rst_n(rst_n), .done(d1), .checks(c1), .failures(f1), .carry_vectors(k1));
  tb_mult_case #(.N(25), .M(13), .PIPELINE(1'b0)) u_comb
                                      (.clk(clk), .rst_n(rst_n), .done(d2), .checks(c2), .failures(f2), .carry_vectors(k2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 3; failures = f0 + f1 + f2;
    $display("pairs with inter-column carries: 9x9 %0d, 17x17 %0d, 13x13 %0d", k0, k1, k2);
    if (k0 == 0) begin failures++; $display("FAIL no (5,2) carries"); end
    if (k1 == 0) begin failures++; $display("FAIL no (7,2) carries"); end
    if (k2 != 0) begin failures++; $display("FAIL carries in a (3,2) row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
