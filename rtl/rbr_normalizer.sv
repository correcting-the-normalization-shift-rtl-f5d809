// rbr_normalizer -- normalization of a borrow-save (redundant binary)
// number with a leading-zero count and a concurrent one-position
// correction.
//
// A borrow-save number has many representations of the same value, so a
// leading-zero count taken directly from its digits can be far off. Here
// the digits are first recoded in constant time (bs_recoder) into
//   * a bit string w whose leading one is at the true leading-one position
//     of |value| or one position above it, and
//   * a 3-bit symbol per position.
// Three units then work side by side on the same input:
//   * lza_tree counts the leading zeros of w (quasi-normalization count),
//   * corr_tree decides from the symbols whether that count is one short,
//     and also gives the sign and a zero flag,
//   * bs_converter forms the non-redundant sign-magnitude value.
// norm_shifter finally shifts the magnitude left by the count and, if the
// correction is set, by one position more, which leaves the leading one in
// bit N-1.
//
// Interface (N digits, digit i = dp[i] - dn[i], bit N-1 most significant):
//   lza_cnt  quasi-normalization count from w
//   corr     count is one short
//   shamt    lza_cnt + corr, the full normalization shift
//   sign     sign of the value (from the correction tree)
//   conv_neg sign of the value as given by the converter (equal to sign
//            for every nonzero value)
//   zero     the value is zero (norm and shamt are then meaningless)
//   norm     normalized magnitude
// Timing: purely combinational; the correction is only needed by the
// final one-position shift.
// The recoding, the two trees and the two-step shift follow the method;
// the converter's adder architecture and the port set are this design's
// own.
module rbr_normalizer
  import rbr_pkg::*;
#(
  parameter int unsigned N = 54,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  dp,
  input  logic [N-1:0]  dn,
  output logic [CW-1:0] lza_cnt,
  output logic          corr,
  output logic [CW:0]   shamt,
  output logic          sign,
  output logic          conv_neg,
  output logic          zero,
  output logic [N-1:0]  norm
);

  logic [N-1:0][2:0] sym;
  logic [N-1:0]      w;
  logic              w_nonzero;
  logic [N-1:0]      mag;

  bs_recoder #(.N(N)) u_recoder (
    .dp  (dp),
    .dn  (dn),
    .sym (sym),
    .w   (w)
  );

  lza_tree #(.W(N)) u_lza (
    .w       (w),
    .cnt     (lza_cnt),
    .nonzero (w_nonzero)
  );

  corr_tree #(.N(N)) u_corr (
    .sym  (sym),
    .corr (corr),
    .sign (sign),
    .zero (zero)
  );

  bs_converter #(.N(N)) u_conv (
    .dp  (dp),
    .dn  (dn),
    .neg (conv_neg),
    .mag (mag)
  );

  norm_shifter #(.N(N), .CW(CW)) u_shift (
    .mag   (mag),
    .cnt   (lza_cnt),
    .corr  (corr),
    .norm  (norm),
    .shamt (shamt)
  );

  // w is nonzero exactly when the correction tree does not report zero.
  always_comb begin
    assert (w_nonzero == ~zero)
      else $error("rbr_normalizer: LZA tree and correction tree disagree on zero");
  end

endmodule
