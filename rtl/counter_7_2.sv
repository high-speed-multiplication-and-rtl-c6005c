// counter_7_2: the (7,2) column counter, built from five full adders.
//
// Seven bits of weight 2^n (in[6:0]) plus four carry-ins of weight 2^n from
// the column below are reduced to a partial sum PS (weight 2^n), a partial
// carry PC (weight 2^(n+1)) and four carry-outs (weight 2^(n+1)) for the
// column above. Adders 1 and 2 each take three inputs (in[3:1], in[6:4]);
// adder 3 adds in[0] to their two sums; adder 4 adds the third sum to
// carry-ins 0 and 1; adder 5 adds the fourth sum to carry-ins 2 and 3 and
// gives PC and PS. The carry-outs of adders 1 to 4 leave the column.
//
// Carry-outs 0 and 1 are ready after one adder delay, 2 after two and 3 after
// three; carry-ins 0/1 are consumed by adder 4 and 2/3 by adder 5, so in a
// row of these counters each carry enters the next column no later than it is
// needed. Carry-out 3 depends on carry-ins 0 and 1 and therefore goes to
// carry-in 3 of the next column, where only the last adder sees it: a carry
// crosses at most one column boundary and never ripples along the row. The
// carry-outs 0 to 2 do not depend on any carry-in. The adder tree is the design's;
// the pairing of carry-outs to carry-ins is this implementation's choice.
// Combinational.
module counter_7_2 (
  input  logic [6:0] in,
  input  logic [3:0] cin,
  output logic [3:0] cout,
  output logic       ps,
  output logic       pc
);
  logic s1, s2, s3, s4;

  full_adder u_fa1 (.a(in[1]), .b(in[2]), .ci(in[3]),  .s(s1), .co(cout[0]));
  full_adder u_fa2 (.a(in[4]), .b(in[5]), .ci(in[6]),  .s(s2), .co(cout[1]));
  full_adder u_fa3 (.a(in[0]), .b(s1),    .ci(s2),     .s(s3), .co(cout[2]));
  full_adder u_fa4 (.a(s3),    .b(cin[0]), .ci(cin[1]), .s(s4), .co(cout[3]));
  full_adder u_fa5 (.a(s4),    .b(cin[2]), .ci(cin[3]), .s(ps), .co(pc));
endmodule
