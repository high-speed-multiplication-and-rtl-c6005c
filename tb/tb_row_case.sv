// tb_row_case: drives one counter_row configuration (N, M) with the byte
// products of random and corner operands, computed here, and checks one
// clock later that PS + PC equals x*y modulo 2^(2N-1), that no partial carry
// sits below column M-1 and that the outputs held their old value until the
// clock edge. It counts the vectors for which any counter passed a carry to
// the column above (the non-propagating inter-column carries). Reports its
// counts through its ports.
module tb_row_case #(
  parameter int N = 25,
  parameter int M = 13,
  parameter int NV = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   carry_vectors
);
  import tb_ref_pkg::*;
  localparam int L = n_bytes(N, M);
  localparam int W = 2 * N - 1;

  logic [L*L-1:0][2*M-1:0] prods;
  logic [W-1:0] ps, pc, ps_last;

  counter_row #(.N(N), .M(M)) dut (.clk(clk), .prods(prods), .ps(ps), .pc(pc));

  initial begin
    logic [127:0] xv, yv, sum;
    done = 0; checks = 0; failures = 0; carry_vectors = 0;
    prods = '0;
    @(posedge clk);
    for (int n = 0; n < NV; n++) begin
      @(negedge clk);
      ps_last = ps;
      xv = rand_op(N); yv = rand_op(N);
      for (int i = 0; i < L; i++)
        for (int j = 0; j < L; j++)
          prods[i*L+j] = (2*M)'(byte_val(N, M, xv, i) * byte_val(N, M, yv, j));
      #1;
      if (dut.carry != '0) carry_vectors++;
      checks++;
      if (ps != ps_last) begin
        failures++; $display("FAIL N=%0d M=%0d: ps changed before the clock", N, M);
      end
      @(posedge clk); #1;
      sum = (128'(ps) + 128'(pc)) & ((128'd1 << W) - 1);
      checks++;
      if (sum != prod_ref(N, xv, yv)) begin
        failures++;
        $display("FAIL N=%0d M=%0d x=%h y=%h: ps+pc=%h expected %h", N, M,
                 xv, yv, sum, prod_ref(N, xv, yv));
      end
      checks++;
      if (pc[M-2:0] != '0) begin
        failures++; $display("FAIL N=%0d M=%0d: partial carry below the adder", N, M);
      end
    end
    done = 1;
  end
endmodule
