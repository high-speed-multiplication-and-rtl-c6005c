// tb_counter_row: the row of (p,2) counters at the single-precision
// configuration (all (3,2) counters), the three-byte 9 x 9 configuration
// ((3,2) and (5,2) counters) and the four-byte 17 x 17 configuration
// (up to (7,2) counters). Inter-column carries must occur in the latter two.
module tb_counter_row;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2, k0, k1, k2;
  int checks, failures;

  tb_row_case #(.N(25), .M(13)) u_c13 (.clk(clk), .done(d0), .checks(c0), .failures(f0), .carry_vectors(k0));
  tb_row_case #(.N(25), .M(9))  u_c9  (.clk(clk), .done(d1), .checks(c1), .failures(f1), .carry_vectors(k1));
  tb_row_case #(.N(57), .M(17)) u_c17 (.clk(clk), .done(d2), .checks(c2), .failures(f2), .carry_vectors(k2));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 3; failures = f0 + f1 + f2;
    $display("vectors with inter-column carries: 13x13 %0d, 9x9 %0d, 17x17 %0d", k0, k1, k2);
    if (k0 != 0) begin failures++; $display("FAIL (3,2) row produced inter-column carries"); end
    if (k1 == 0) begin failures++; $display("FAIL (5,2) carries never occurred"); end
    if (k2 == 0) begin failures++; $display("FAIL (7,2) carries never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
