// booth_mult: W x W-bit 2's-complement multiplier, radix-4 modified Booth.
//
// The multiplier b is recoded, three overlapping bits at a time, into
// (W+1)/2 digits for odd W or W/2 digits for even W, each in {-2,-1,0,+1,+2}
// and of weight 4^k. Each digit selects 0, a or 2a, negated when the digit is
// negative; the selected multiples are sign-extended to 2W bits, shifted by
// 2k and summed. p is the exact 2W-bit signed product a*b.
//
// Modified Booth recoding and the digit count are as the design describes for
// its m x m multiplier chips; summing the multiples with a plain adder chain
// is this implementation's choice (the chip's internal array is not given).
// Combinational; the caller registers the output when pipelined.
module booth_mult #(
  parameter int W = 13
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int ND = (W + 1) / 2;      // number of recoded digits
  localparam int BW = 2 * ND + 1;       // multiplier bits incl. the 0 appended below

  logic [BW-1:0] bx;                     // {sign-extended b, 1'b0}
  logic [2*W-1:0] ax;                    // a sign-extended to 2W bits

  always_comb begin
    bx = BW'($signed({b, 1'b0}));
    ax = {{W{a[W-1]}}, a};
  end

  always_comb begin
    logic [2:0]     grp;
    logic [2*W-1:0] mult;
    logic [2*W-1:0] acc;
    acc = '0;
    for (int k = 0; k < ND; k++) begin
      grp = bx[2*k +: 3];
      unique case (grp)
        3'b001, 3'b010: mult = ax;                 // +1
        3'b011:         mult = ax << 1;            // +2
        3'b100:         mult = ~(ax << 1) + 1'b1;  // -2
        3'b101, 3'b110: mult = ~ax + 1'b1;         // -1
        default:        mult = '0;                 //  0
      endcase
      acc = acc + (mult << (2 * k));
    end
    p = acc;
  end
endmodule
