// counter_row: summand summation by one row of (p,2) column counters.
//
// The L*L raw byte products from summand_gen are placed at their offsets
// (M-1)(i+j) in the W = 2N-1 bit product; signed ones are sign-extended to
// the top bit. Every column c is then reduced on its own by a single
// counter, chosen from the column height: one bit is passed straight on, up to
// three bits use a (3,2) counter (a full adder), up to five a (5,2) and up to
// seven a (7,2). A (p,2) counter's carry-outs are wired to the carry-ins of
// the column above, so the whole row settles after a few full-adder delays
// however wide it is. Carries out of the top column fall outside the W-bit
// product and are dropped, as is the PC of the top column.
//
// Outputs: ps[c] is the partial-sum bit of column c, pc[c] the partial-carry
// bit coming from column c-1. For the columns below M-1 only one summand is
// present, so ps holds the final product bits there and pc is zero; the
// carry-propagate adder therefore only spans bits M-1 to W-1. With
// OUT_REG = 1, ps and pc are registered (one clock of latency), the second
// staging register of the pipeline.
//
// Column-wise counting, the counter types and the inter-column carries follow
// the design; the rule that the counter type never falls from one column to
// the next (so carries always have inputs to land on) is this implementation's.
// Combinational between the registers.
module counter_row #(
  parameter int N       = 25,
  parameter int M       = 13,
  parameter bit OUT_REG = 1'b1
) (
  input  logic                                          clk,
  input  logic [hsm_pkg::nbytes(N,M)**2-1:0][2*M-1:0]   prods,
  output logic [hsm_pkg::prod_w(N)-1:0]                 ps,
  output logic [hsm_pkg::prod_w(N)-1:0]                 pc
);
  localparam int W = hsm_pkg::prod_w(N);

  if (hsm_pkg::max_count(N, M) > 7) begin : g_chk
    $error("counter_row: a column holds more than seven summands");
  end

  logic [W-1:0]      ps_c;
  logic [W:0]        pc_c;           // pc_c[c+1] comes from column c
  logic [W-1:0][3:0] carry;          // carry-outs of each column, weight 2^(c+1)

  assign pc_c[0] = 1'b0;

  for (genvar c = 0; c < W; c++) begin : g_col
    localparam int TYPE = hsm_pkg::col_type(N, M, c);
    logic [6:0] bits;
    logic [3:0] cin;

    for (genvar k = 0; k < 7; k++) begin : g_in
      localparam int S = hsm_pkg::col_summand(N, M, c, k);
      if (S >= 0) begin : g_on
        assign bits[k] = prods[S][hsm_pkg::s_bit(N, M, S, c)];
      end else begin : g_off
        assign bits[k] = 1'b0;
      end
    end

    if (c == 0) begin : g_cin0
      assign cin = '0;
    end else begin : g_cin
      assign cin = carry[c-1];
    end

    if (TYPE == 1) begin : g_wire
      assign ps_c[c]     = bits[0];
      assign pc_c[c+1]   = 1'b0;
      assign carry[c]    = '0;
    end else if (TYPE == 3) begin : g_c32
      full_adder u_cnt (.a(bits[0]), .b(bits[1]), .ci(bits[2]),
                        .s(ps_c[c]), .co(pc_c[c+1]));
      assign carry[c] = '0;
    end else if (TYPE == 5) begin : g_c52
      counter_5_2 u_cnt (.in(bits[4:0]), .cin(cin[1:0]), .cout(carry[c][1:0]),
                         .ps(ps_c[c]), .pc(pc_c[c+1]));
      assign carry[c][3:2] = '0;
    end else begin : g_c72
      counter_7_2 u_cnt (.in(bits), .cin(cin), .cout(carry[c]),
                         .ps(ps_c[c]), .pc(pc_c[c+1]));
    end
  end

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk) begin
      ps <= ps_c;
      pc <= pc_c[W-1:0];
    end
  end else begin : g_comb
    assign ps = ps_c;
    assign pc = pc_c[W-1:0];
  end
endmodule
