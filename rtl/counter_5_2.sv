// counter_5_2: the (5,2) column counter, built from three full adders.
//
// Five bits of weight 2^n (in[4:0]) plus two carry-ins of weight 2^n from
// the column below are reduced to a partial sum PS (weight 2^n), a partial
// carry PC (weight 2^(n+1)) and two carry-outs (weight 2^(n+1)) that go to
// the column above. The first adder takes in[2:0]; the second takes in[4:3]
// and the first sum; the third adds the second sum to the two carry-ins and
// yields PC and PS. The carry-outs never depend on the carry-ins, so carries
// move only one column per row and never ripple along it.
//
// The adder wiring is that of the design's (5,2) counter diagram; which input
// feeds which pin of an adder is immaterial and chosen here. Combinational.
module counter_5_2 (
  input  logic [4:0] in,
  input  logic [1:0] cin,
  output logic [1:0] cout,
  output logic       ps,
  output logic       pc
);
  logic s1, s2;

  full_adder u_fa1 (.a(in[0]), .b(in[1]), .ci(in[2]), .s(s1), .co(cout[0]));
  full_adder u_fa2 (.a(in[3]), .b(in[4]), .ci(s1),    .s(s2), .co(cout[1]));
  full_adder u_fa3 (.a(s2),    .b(cin[0]), .ci(cin[1]), .s(ps), .co(pc));
endmodule
