// tb_counter_7_2: exhaustive check of the (7,2) counter over all 7 inputs
// and 4 carry-ins. For every combination it checks
//   * conservation: sum(in) + sum(cin) = ps + 2*pc + 2*sum(cout);
//   * ps is the parity of all inputs and carry-ins;
//   * the carry-outs do not depend on the carry-ins at all, which is what
//     keeps carries from rippling along a row of counters.
module tb_counter_7_2;
  logic [7-1:0] in;
  logic [4-1:0] cin, cout;
  logic       ps, pc;
  logic [4-1:0] cout_ref;
  logic [3:0]   ref3;
  int checks = 0, failures = 0;

  counter_7_2 dut (.in(in), .cin(cin), .cout(cout), .ps(ps), .pc(pc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 7); v++) begin
      for (int c = 0; c < (1 << 4); c++) begin
        int lhs, rhs;
        in  = 7'(v);
        cin = 4'(c);
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
        if (c[3:2] == 2'b00) ref3[c[1:0]] = cout[3];
        cout_ref[3] = ref3[c[1:0]];
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
