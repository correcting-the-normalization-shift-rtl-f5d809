// norm_shifter -- normalizing left shift in two steps.
//
// The coarse step shifts the N-bit magnitude left by the count taken from
// the recoded string (quasi-normalization); the fine step shifts one more
// position when the correction tree reports that the count was one short.
// For a nonzero input the result has its leading one in bit N-1. The total
// shift amount is also returned.
//
// Interface: mag, cnt (CW bits), corr in; norm and shamt out.
// Timing: combinational; the correction arrives only at the fine step, so
// it may come later than the count.
// The split into a coarse and a one-position fine shift follows the
// method; the widths and the explicit shift-amount output are this
// design's own.
module norm_shifter #(
  parameter int unsigned N  = 54,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  mag,
  input  logic [CW-1:0] cnt,
  input  logic          corr,
  output logic [N-1:0]  norm,
  output logic [CW:0]   shamt
);

  logic [N-1:0] coarse;

  assign coarse = mag << cnt;
  assign norm   = corr ? (coarse << 1) : coarse;
  assign shamt  = {1'b0, cnt} + {{CW{1'b0}}, corr};

endmodule
