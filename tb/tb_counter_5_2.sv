// tb_counter_5_2: exhaustive check of the (5,2) counter over all 5 inputs
// and 2 carry-ins. For every combination it checks
//   * conservation: sum(in) + sum(cin) = ps + 2*pc + 2*sum(cout);
//   * ps is the parity of all inputs and carry-ins;
//   * the carry-outs do not depend on the carry-ins at all, which is what
//     keeps carries from rippling along a row of counters.
module tb_counter_5_2;
  logic [5-1:0] in;
  logic [2-1:0] cin, cout;
  logic       ps, pc;
  logic [2-1:0] cout_ref;
  int checks = 0, failures = 0;

  counter_5_2 dut (.in(in), .cin(cin), .cout(cout), .ps(ps), .pc(pc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 5); v++) begin
      for (int c = 0; c < (1 << 2); c++) begin
        int lhs, rhs;
        in  = 5'(v);
        cin = 2'(c);
        #1;
        lhs = $countones(in) + $countones(cin);
        rhs = int'(ps) + 2 * int'(pc) + 2 * $countones(cout);
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("FAIL sum in=%b cin=%b: %0d != ps=%b pc=%b cout=%b", in, cin, lhs, ps, pc, cout);
        end
        checks++;
        if (ps != ^{in, cin}) begin
          failures++;
          $display("FAIL parity in=%b cin=%b ps=%b", in, cin, ps);
        end
        if (c == 0) cout_ref = cout;
        checks++;
        if (cout != cout_ref) begin
          failures++;
          $display("FAIL carry-out depends on carry-in: in=%b cin=%b", in, cin);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
