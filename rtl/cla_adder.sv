// cla_adder: WIDTH-bit carry-propagate adder with carry look-ahead.
//
// Bitwise generate (a&b) and propagate (a^b) signals are combined in a
// parallel-prefix (Kogge-Stone) tree of ceil(log2(WIDTH+1)) levels, so the
// carry into every bit is looked ahead in logarithmic depth instead of
// rippling. The carry-in is folded in as an extra generate bit below bit 0.
// s = a + b + cin modulo 2^WIDTH, cout is the carry out of the top bit.
//
// The design only asks for a standard carry-propagate adder with fast carry
// look-ahead; the prefix tree is this implementation's choice. Combinational.
module cla_adder #(
  parameter int WIDTH = 37
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  always_comb begin
    logic [WIDTH:0] g, p;   // bit 0 stands for the carry-in
    g = {a & b, cin};
    p = {a ^ b, 1'b0};
    for (int d = 1; d <= WIDTH; d = d * 2) begin
      g = g | (p & (g << d));
      p = p & (p << d);
    end
    // g[i] is now the carry into bit i of the operands
    s    = (a ^ b) ^ g[WIDTH-1:0];
    cout = g[WIDTH];
  end
endmodule
