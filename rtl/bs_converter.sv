// bs_converter -- conversion of a borrow-save number into non-redundant
// sign-magnitude form: the subtraction dp - dn.
//
// The N-digit borrow-save value dp - dn lies in [-(2**N - 1), 2**N - 1].
// The difference is formed in N+1 bits two's complement; its top bit is
// the sign and a conditional negation gives the N-bit magnitude. The
// method only requires that this conversion is a carry look-ahead adder
// running in parallel with the two trees; it is written here as the
// arithmetic operators, which leaves the choice of adder architecture to
// synthesis.
//
// Interface: dp, dn in (N bits); neg and mag out.
// Timing: combinational.
module bs_converter #(
  parameter int unsigned N = 54
) (
  input  logic [N-1:0] dp,
  input  logic [N-1:0] dn,
  output logic         neg,
  output logic [N-1:0] mag
);

  logic [N:0] diff;

  assign diff     = {1'b0, dp} - {1'b0, dn};
  assign neg      = diff[N];
  // The magnitude is below 2**N, so the low N bits of -diff suffice.
  assign mag      = neg ? (~diff[N-1:0] + N'(1)) : diff[N-1:0];

endmodule
