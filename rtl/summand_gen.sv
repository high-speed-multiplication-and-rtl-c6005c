// summand_gen: summand generation with L*L byte multipliers.
//
// X and Y (N bits, 2's complement) are each cut into L bytes. Bytes 0..L-2
// hold M-1 bits and enter an M x M multiplier with their sign bit tied to 0,
// so their products are never negative. The top byte holds the remaining
// B = N-(M-1)(L-1) bits, sign included; it is sign-extended to M bits where
// it meets a low byte, and the top x top product uses a B x B multiplier.
// prods[i*L+j] is the raw product of X byte i and Y byte j (the top x top one
// sign-extended from 2B to 2M bits); its place in the result, (M-1)(i+j), is
// applied by the counter row. With OUT_REG = 1 the products are registered
// (one clock of latency), the first staging register of the pipeline.
//
// Byte partition, multiplier count and the positive-sign wiring are the
// design's; defaults N = 25, M = 13 are its single-precision case (four
// 13 x 13 multipliers).
module summand_gen #(
  parameter int N       = 25,
  parameter int M       = 13,
  parameter bit OUT_REG = 1'b1
) (
  input  logic                                          clk,
  input  logic [N-1:0]                                  x,
  input  logic [N-1:0]                                  y,
  output logic [hsm_pkg::nbytes(N,M)**2-1:0][2*M-1:0]   prods
);
  localparam int L = hsm_pkg::nbytes(N, M);
  localparam int B = hsm_pkg::top_len(N, M);
  localparam int T = (M - 1) * (L - 1);   // bit position of the top byte

  if (L < 2) begin : g_chk_l
    $error("summand_gen: N must exceed M");
  end
  if (B > M || B < 2) begin : g_chk_b
    $error("summand_gen: top byte length out of range");
  end

  logic [L-1:0][M-1:0] xb, yb;            // bytes widened to multiplier inputs
  logic [L*L-1:0][2*M-1:0] prods_c;

  always_comb begin
    for (int k = 0; k < L - 1; k++) begin
      xb[k] = {1'b0, x[(M-1)*k +: M-1]};
      yb[k] = {1'b0, y[(M-1)*k +: M-1]};
    end
    xb[L-1] = M'($signed(x[N-1:T]));
    yb[L-1] = M'($signed(y[N-1:T]));
  end

  for (genvar i = 0; i < L; i++) begin : g_x
    for (genvar j = 0; j < L; j++) begin : g_y
      if (i == L - 1 && j == L - 1) begin : g_top
        logic [2*B-1:0] pt;
        booth_mult #(.W(B)) u_mul (.a(x[N-1:T]), .b(y[N-1:T]), .p(pt));
        assign prods_c[i*L+j] = (2*M)'($signed(pt));
      end else begin : g_mm
        booth_mult #(.W(M)) u_mul (.a(xb[i]), .b(yb[j]), .p(prods_c[i*L+j]));
      end
    end
  end

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk) prods <= prods_c;
  end else begin : g_comb
    assign prods = prods_c;
  end
endmodule
