// tb_hs_mult: end-to-end test of the multiplier at its default parameters
// (sign plus 24-bit fraction, 13 x 13 multipliers, pipelined).
//
// A stream of operand pairs is applied, one per clock with random idle
// cycles, and every product is checked against x*y (the (-1)x(-1) case
// wraps, as the product has only sign plus 48 bits). Each result must appear
// exactly two clocks after its operands. The test counts and requires:
// back-to-back operands (full pipeline throughput), idle cycles (bubbles),
// negative multiplicand, negative multiplier, both negative (sign-extended
// summands), the top byte at -1.0, and a reset in the middle of the stream
// that must clear out_valid.
module tb_hs_mult;
  import tb_ref_pkg::*;
  localparam int N = 25;
  localparam int W = 2 * N - 1;
  localparam int NV = 4000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] x = '0, y = '0;
  logic out_valid;
  logic [W-1:0] product;

  hs_mult dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
               .out_valid(out_valid), .product(product));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_b2b = 0, n_bubble = 0, n_negx = 0, n_negy = 0, n_negxy = 0, n_min = 0, n_reset = 0;

  typedef struct { logic [W-1:0] p; int cyc; } exp_t;
  exp_t q[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20 * NV) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: compare each valid output with the oldest expected product
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      automatic exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL output with no operands outstanding");
      end else begin
        e = q.pop_front();
        if (product != e.p) begin
          failures++; $display("FAIL product %h expected %h", product, e.p);
        end
        checks++;
        if (cycle - e.cyc != 2) begin
          failures++; $display("FAIL latency %0d clocks", cycle - e.cyc);
        end
      end
    end
  end

  initial begin
    logic [127:0] xv, yv;
    logic prev_valid;
    prev_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NV; n++) begin
      @(negedge clk);
      if (n == NV / 2) begin
        // reset with work in flight: the pipeline must come out empty
        in_valid = 0;
        @(negedge clk);
        rst_n = 0;
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("FAIL out_valid during reset"); end
        q.delete();
        rst_n = 1;
        n_reset++;
        prev_valid = 0;
        @(negedge clk);
      end
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        x = N'($urandom); y = N'($urandom);
        n_bubble++;
        prev_valid = 0;
      end else begin
        xv = rand_op(N); yv = rand_op(N);
        x = N'(xv); y = N'(yv);
        in_valid = 1;
        if (prev_valid) n_b2b++;
        if (x[N-1] && !y[N-1]) n_negx++;
        if (!x[N-1] && y[N-1]) n_negy++;
        if (x[N-1] && y[N-1]) n_negxy++;
        if (x == {1'b1, {(N-1){1'b0}}} || y == {1'b1, {(N-1){1'b0}}}) n_min++;
        q.push_back('{W'(prod_ref(N, xv, yv)), cycle});
        prev_valid = 1;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d products never came out", q.size()); end
    $display("back-to-back %0d, bubbles %0d, x<0 %0d, y<0 %0d, both<0 %0d, -1.0 operand %0d, resets %0d",
             n_b2b, n_bubble, n_negx, n_negy, n_negxy, n_min, n_reset);
    checks += 7;
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back operands"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no idle cycle"); end
    if (n_negx == 0)   begin failures++; $display("FAIL no negative multiplicand"); end
    if (n_negy == 0)   begin failures++; $display("FAIL no negative multiplier"); end
    if (n_negxy == 0)  begin failures++; $display("FAIL no pair of negatives"); end
    if (n_min == 0)    begin failures++; $display("FAIL no -1.0 operand"); end
    if (n_reset == 0)  begin failures++; $display("FAIL no reset in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
