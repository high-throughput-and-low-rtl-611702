// booth_mult: signed W x W radix-4 Booth multiplier, purely combinational.
//
// The operand b is recoded into W/2 radix-4 digits in {-2,-1,0,+1,+2}, taken
// from overlapping bit triplets (b[2i+1], b[2i], b[2i-1]) with b[-1] = 0.  Each
// digit selects 0, +/-a or +/-2a as a partial product, weighted by 4^i, and
// the partial products are summed.  Interface: a (multiplicand), b (recoded
// operand), p = a * b in 2W bits.  No clock; the result is valid in the same
// cycle.  The cores use 16x16-bit Booth multipliers; the radix-4 recoding and
// the plain summation of the partial products are this design's choice.
module booth_mult #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  localparam int D = (W + 1) / 2;   // number of radix-4 digits

  logic [2*D:0] bx;                 // b sign-extended to 2D bits, with b[-1] = 0 at bit 0
  assign bx = {{(2 * D - W){b[W-1]}}, b, 1'b0};

  always_comb begin
    logic signed [2*W-1:0] acc;
    logic signed [2*W-1:0] pp;
    logic signed [2*W-1:0] ax;
    ax  = (2 * W)'(a);
    acc = '0;
    for (int i = 0; i < D; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp = ax;
        3'b011:         pp = ax <<< 1;
        3'b100:         pp = -(ax <<< 1);
        3'b101, 3'b110: pp = -ax;
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    p = acc;
  end
endmodule
