// tb_cla_adder: checks the look-ahead adder against a+b+cin, exhaustively
// at width 5 and with random and carry-chain corner operands at the default
// width 37 (the adder width of the single-precision multiplier).
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic [36:0] a, b, s; logic cin, cout;
  logic [4:0]  a5, b5, s5; logic cin5, cout5;

  cla_adder            dut   (.a(a),  .b(b),  .cin(cin),  .s(s),  .cout(cout));
  cla_adder #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(cin5), .s(s5), .cout(cout5));

  task automatic check37();
    logic [37:0] ref_sum;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + 38'(cin);
    checks++;
    if ({cout, s} != ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %b -> %b %h", a, b, cin, cout, s);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {cin5, a5, b5} = 11'(v);
      #1;
      checks++;
      if ({cout5, s5} != 6'(a5) + 6'(b5) + 6'(cin5)) begin
        failures++;
        $display("FAIL W=5 %0d + %0d + %0d -> %0d", a5, b5, cin5, {cout5, s5});
      end
    end
    // full-length carry chains
    a = '1; b = '0; cin = 1'b1; check37();
    a = '1; b = '1; cin = 1'b1; check37();
    a = 37'h0_5555_5555; b = 37'h1_aaaa_aaab; cin = 1'b0; check37();
    for (int n = 0; n < 5000; n++) begin
      a = 37'({$urandom, $urandom}); b = 37'({$urandom, $urandom}); cin = 1'($urandom);
      check37();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
