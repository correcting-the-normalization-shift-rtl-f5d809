// bs_recoder -- constant-time recoding of a borrow-save number, one small
// PLA per digit position.
//
// Digit i has the value dp[i] - dn[i] in {-1,0,1}. Each position looks at
// digits i+1, i and i-1; a zero digit is supplied above the most
// significant and below the least significant position, as the method
// prescribes. From the three digits it forms the flags
//   e = digit is 0, p = digit is 1, m = digit is -1
// and the four mutually exclusive pattern flags of the method
//   u = (e[i+1] p[i] + ~e[i+1] m[i]) e[i-1]   isolated positive unit
//   s = (e[i+1] p[i] + ~e[i+1] m[i]) p[i-1]   positive, followed by +1
//   v = (e[i+1] m[i] + ~e[i+1] p[i]) e[i-1]   isolated negative unit
//   t = (e[i+1] m[i] + ~e[i+1] p[i]) m[i-1]   negative, followed by -1
// It outputs the 3-bit symbol {a,b,c} (s=001 u=010 z=100 v=110 t=111) and
// w = u|s|v|t. The leading one of w lies at the position of the leading
// one of |value| or one position above it.
//
// Interface: dp/dn in, sym/w out, all N wide, bit N-1 most significant.
// Timing: purely combinational, a few gate levels per position.
// The equations follow the method; the port names and the packed-array
// layout are this design's own.
module bs_recoder
  import rbr_pkg::*;
#(
  parameter int unsigned N = 54
) (
  input  logic [N-1:0]      dp,
  input  logic [N-1:0]      dn,
  output logic [N-1:0][2:0] sym,
  output logic [N-1:0]      w
);

  // Digit strings extended by one zero digit at each end: index j of the
  // extended vectors holds digit j-1.
  // e needs the zero digit on both ends, p and m only the lower one
  // (their top entry would be constant 0).
  logic [N+1:0] e;
  logic [N:0]   p, m;

  always_comb begin
    e = '1;
    p = '0;
    m = '0;
    for (int unsigned j = 0; j < N; j++) begin
      e[j+1] = ~(dp[j] ^ dn[j]);
      p[j+1] = dp[j] & ~dn[j];
      m[j+1] = ~dp[j] & dn[j];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_pla
    // Extended index of digit i is i+1; neighbours are i+2 (left) and i.
    logic pos_head, neg_head;
    logic u, s, v, t;
    assign pos_head = (e[i+2] & p[i+1]) | (~e[i+2] & m[i+1]);
    assign neg_head = (e[i+2] & m[i+1]) | (~e[i+2] & p[i+1]);
    assign u = pos_head & e[i];
    assign s = pos_head & p[i];
    assign v = neg_head & e[i];
    assign t = neg_head & m[i];
    assign sym[i] = {~(u | s), u | v | t, s | t};
    assign w[i]   = u | s | v | t;
  end

endmodule
