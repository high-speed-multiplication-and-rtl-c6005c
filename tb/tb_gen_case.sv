// tb_gen_case: drives one summand_gen configuration (N, M) with random and
// corner operands and checks, one clock after each pair is applied, every
// byte product against the product of the bytes sliced and multiplied here.
// It also checks that the outputs still hold the previous products before
// the clock edge (the output register) and that the byte products, shifted
// into place, add up to x*y. Reports its counts through its ports.
module tb_gen_case #(
  parameter int N = 25,
  parameter int M = 13,
  parameter int NV = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_ref_pkg::*;
  localparam int L = n_bytes(N, M);

  logic [N-1:0] x, y;
  logic [L*L-1:0][2*M-1:0] prods, last;

  summand_gen #(.N(N), .M(M)) dut (.clk(clk), .x(x), .y(y), .prods(prods));

  initial begin
    logic [127:0] xv, yv, total, pr;
    done = 0; checks = 0; failures = 0;
    x = '0; y = '0;
    @(posedge clk);
    for (int n = 0; n < NV; n++) begin
      @(negedge clk);
      last = prods;
      xv = rand_op(N); yv = rand_op(N);
      x = N'(xv); y = N'(yv);
      #1;
      checks++;
      if (prods != last) begin
        failures++; $display("FAIL N=%0d M=%0d: products changed before the clock", N, M);
      end
      @(posedge clk); #1;
      total = '0;
      for (int i = 0; i < L; i++) begin
        for (int j = 0; j < L; j++) begin
          longint r;
          r = byte_val(N, M, xv, i) * byte_val(N, M, yv, j);
          checks++;
          if (prods[i*L+j] != (2*M)'(r)) begin
            failures++;
            $display("FAIL N=%0d M=%0d x=%h y=%h byte product %0d,%0d = %h, expected %h",
                     N, M, x, y, i, j, prods[i*L+j], (2*M)'(r));
          end
          pr = 128'(r);
          total = total + (pr << ((M - 1) * (i + j)));
        end
      end
      checks++;
      if ((total & ((128'd1 << (2*N-1)) - 1)) != prod_ref(N, xv, yv)) begin
        failures++; $display("FAIL N=%0d M=%0d: summands do not add up to x*y", N, M);
      end
    end
    done = 1;
  end
endmodule
