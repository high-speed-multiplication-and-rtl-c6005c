// tb_booth_mult: checks the radix-4 Booth multiplier against the signed
// product a*b, at the default width 13, at 9 and 17 (the other multiplier
// sizes of the design) and at an even width, 8. Corner operands (0, +-1,
// the most negative and most positive values) are combined exhaustively,
// then random operands follow.
module tb_booth_mult;
  int checks = 0, failures = 0;

  logic [12:0] a13, b13; logic [25:0] p13;
  logic [8:0]  a9,  b9;  logic [17:0] p9;
  logic [16:0] a17, b17; logic [33:0] p17;
  logic [7:0]  a8,  b8;  logic [15:0] p8;

  booth_mult           dut13 (.a(a13), .b(b13), .p(p13));
  booth_mult #(.W(9))  dut9  (.a(a9),  .b(b9),  .p(p9));
  booth_mult #(.W(17)) dut17 (.a(a17), .b(b17), .p(p17));
  booth_mult #(.W(8))  dut8  (.a(a8),  .b(b8),  .p(p8));

  task automatic check();
    #1;
    checks += 4;
    if ($signed(p13) != $signed(a13) * $signed(b13)) begin
      failures++; $display("FAIL W=13 %0d*%0d -> %0d", $signed(a13), $signed(b13), $signed(p13));
    end
    if ($signed(p9) != $signed(a9) * $signed(b9)) begin
      failures++; $display("FAIL W=9 %0d*%0d -> %0d", $signed(a9), $signed(b9), $signed(p9));
    end
    if ($signed(p17) != $signed(a17) * $signed(b17)) begin
      failures++; $display("FAIL W=17 %0d*%0d -> %0d", $signed(a17), $signed(b17), $signed(p17));
    end
    if ($signed(p8) != $signed(a8) * $signed(b8)) begin
      failures++; $display("FAIL W=8 %0d*%0d -> %0d", $signed(a8), $signed(b8), $signed(p8));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int corner [6] = '{0, 1, -1, 2, 32'h8000_0000, 32'h7fff_ffff};
    for (int i = 0; i < 6; i++) begin
      for (int j = 0; j < 6; j++) begin
        // most negative / positive corners are taken at each width
        a13 = (i == 4) ? 13'h1000 : (i == 5) ? 13'h0fff : 13'(corner[i]);
        b13 = (j == 4) ? 13'h1000 : (j == 5) ? 13'h0fff : 13'(corner[j]);
        a9  = (i == 4) ? 9'h100   : (i == 5) ? 9'h0ff   : 9'(corner[i]);
        b9  = (j == 4) ? 9'h100   : (j == 5) ? 9'h0ff   : 9'(corner[j]);
        a17 = (i == 4) ? 17'h10000 : (i == 5) ? 17'h0ffff : 17'(corner[i]);
        b17 = (j == 4) ? 17'h10000 : (j == 5) ? 17'h0ffff : 17'(corner[j]);
        a8  = (i == 4) ? 8'h80    : (i == 5) ? 8'h7f    : 8'(corner[i]);
        b8  = (j == 4) ? 8'h80    : (j == 5) ? 8'h7f    : 8'(corner[j]);
        check();
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom);
      a9  = 9'($urandom);  b9  = 9'($urandom);
      a17 = 17'($urandom); b17 = 17'($urandom);
      a8  = 8'($urandom);  b8  = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
