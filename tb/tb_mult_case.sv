// tb_mult_case: streams random and corner operand pairs through one hs_mult
// configuration (N, M, PIPELINE), one pair per clock, and checks each
// product against x*y and its arrival LAT clocks after the operands
// (2 when pipelined, 0 when not). It counts the pairs for which the counter
// row passed carries between columns. Reports its counts through its ports.
module tb_mult_case #(
  parameter int N = 25,
  parameter int M = 9,
  parameter bit PIPELINE = 1'b1,
  parameter int NV = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   carry_vectors
);
  import tb_ref_pkg::*;
  localparam int W = 2 * N - 1;
  localparam int LAT = PIPELINE ? 2 : 0;

  logic in_valid;
  logic [N-1:0] x, y;
  logic out_valid;
  logic [W-1:0] product;
  logic [127:0] expq [$];

  hs_mult #(.N(N), .M(M), .PIPELINE(PIPELINE)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(out_valid), .product(product));

  initial begin
    logic [127:0] xv, yv, e;
    done = 0; checks = 0; failures = 0; carry_vectors = 0;
    in_valid = 0; x = '0; y = '0;
    wait (rst_n);
    for (int n = 0; n < NV + LAT; n++) begin
      @(negedge clk);
      if (n < NV) begin
        xv = rand_op(N); yv = rand_op(N);
        x = N'(xv); y = N'(yv); in_valid = 1;
        expq.push_back(prod_ref(N, xv, yv));
      end else begin
        in_valid = 0;
      end
      #1;
      if (dut.u_row.carry != '0) carry_vectors++;
      if (n >= LAT) begin
        e = expq.pop_front();
        checks++;
        if (!out_valid) begin failures++; $display("FAIL N=%0d M=%0d: out_valid low", N, M); end
        checks++;
        if (128'(product) != e) begin
          failures++;
          $display("FAIL N=%0d M=%0d: product %h expected %h", N, M, product, e);
        end
      end
    end
    done = 1;
  end
endmodule
