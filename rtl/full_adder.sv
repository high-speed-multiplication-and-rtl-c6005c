// full_adder: the (3,2) counter. Three bits of equal weight 2^n are added
// into a sum bit S of weight 2^n and a carry bit C of weight 2^(n+1).
// Purely combinational. It is the building block of the (5,2) and (7,2)
// counters and, used alone, the counter of every three-input column.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
