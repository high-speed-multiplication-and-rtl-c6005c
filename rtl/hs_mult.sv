// hs_mult: high-speed N-bit 2's-complement multiplier (sign plus N-1
// fraction bits), product of sign plus 2(N-1) bits.
//
// Three sections, as in a byte-partitioned multiplier with a single counter
// row:
//   1. summand_gen  - both operands are cut into L bytes of M-1 bits (top
//                     byte B bits, sign included) and L*L M x M Booth
//                     multipliers form all byte products at once;
//   2. counter_row  - one row of (3,2), (5,2) and (7,2) column counters
//                     reduces the aligned, sign-extended summands to a
//                     partial sum PS and partial carry PC;
//   3. cla_adder    - a carry look-ahead adder adds PS and PC over bits
//                     M-1..2N-2; the M-1 lowest product bits bypass it.
// With PIPELINE = 1 the multiplier and counter outputs are registered, so a
// new operand pair can be accepted every clock and its product appears two
// clocks later (out_valid follows in_valid by two clocks); the adder output
// is not registered. With PIPELINE = 0 the whole path is combinational and
// out_valid equals in_valid.
//
// Defaults N = 25, M = 13 give the single-precision case: two bytes of 13
// and 12 bits, four 13 x 13 multipliers and a row of (3,2) counters. N = 25,
// M = 9 gives three bytes and a mixed row of (3,2) and (5,2) counters;
// N = 57, M = 17 gives four bytes (9,16,16,16 bits) with 17 x 17 and 9 x 9
// multipliers and (7,2) counters. The only product that does not fit is
// (-1) x (-1) = +1, which wraps to -1 as in any sign-plus-2(N-1)-bit result.
//
// The valid bit and its reset (active-low, asynchronous) are this
// implementation's; data registers are not reset.
module hs_mult #(
  parameter int N        = 25,
  parameter int M        = 13,
  parameter bit PIPELINE = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [N-1:0]                  x,
  input  logic [N-1:0]                  y,
  output logic                          out_valid,
  output logic [hsm_pkg::prod_w(N)-1:0] product
);
  localparam int L  = hsm_pkg::nbytes(N, M);
  localparam int W  = hsm_pkg::prod_w(N);
  localparam int LO = M - 1;             // lowest column the adder covers

  logic [L*L-1:0][2*M-1:0] prods;
  logic [W-1:0]            ps, pc;
  logic [W-LO-1:0]         sum_hi;
  logic                    unused_cout;

  summand_gen #(.N(N), .M(M), .OUT_REG(PIPELINE)) u_gen (
    .clk(clk), .x(x), .y(y), .prods(prods));

  counter_row #(.N(N), .M(M), .OUT_REG(PIPELINE)) u_row (
    .clk(clk), .prods(prods), .ps(ps), .pc(pc));

  cla_adder #(.WIDTH(W - LO)) u_cpa (
    .a(ps[W-1:LO]), .b(pc[W-1:LO]), .cin(1'b0), .s(sum_hi), .cout(unused_cout));

  assign product = {sum_hi, ps[LO-1:0]};

  if (PIPELINE) begin : g_pipe
    logic [1:0] vld;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld <= '0;
      else        vld <= {vld[0], in_valid};
    end
    assign out_valid = vld[1];
  end else begin : g_comb
    assign out_valid = in_valid;
  end

  // Below the adder only one summand exists, so no partial carry may appear.
  a_no_low_carry: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> pc[LO-1:0] == '0)
    else $error("hs_mult: partial carry below column M-1");
endmodule
