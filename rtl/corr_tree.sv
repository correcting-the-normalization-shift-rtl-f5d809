// corr_tree -- single binary tree that decides whether the leading-zero
// count taken from the recoded string is one short, and also yields the
// sign of the number and whether it is zero.
//
// Inputs are the 3-bit symbols of bs_recoder (sym[N-1] most significant).
// The tree looks for the two strings that need a correction:
//   X = z* u z+ (v|t) ...   an isolated positive unit followed, after
//                           zeros, by a string of negative value
//   Y = z* v z+ (u|s) ...   the mirror image for a negative number
// Sub-strings are classified as Z = z+, U = z*uz*, V = z*vz*,
// S = z*sz*..., T = z*tz*..., X and Y, encoded exactly like the leaf
// symbols, so every node maps two 3-bit codes to one (a 6-to-3 node):
//   left Z                 -> right
//   left S, T, X or Y      -> left
//   left U or V, right Z   -> left
//   left U or V, otherwise -> {a_left, a_right, 1}
//     (U then U/S/X -> S, U then V/T/Y -> X, V then V/T/Y -> T,
//      V then U/S/X -> Y)
// That is two selectors in series per node. At the root
//   corr = (a ^ b) & c    sign = a    zero = ~(b | c).
// The string is padded with z symbols on the least significant side to a
// power of two; z on the right is neutral for every node.
//
// Interface: sym in; corr, sign, zero out.
// Timing: combinational, clog2(N) node levels (6 for N = 54).
// The symbol encoding, the grammar and the root expressions follow the
// method; the node rule table above is this design's reconstruction from
// that grammar, checked against the value of the number in the testbenches.
module corr_tree
  import rbr_pkg::*;
#(
  parameter int unsigned N = 54,
  localparam int unsigned L = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned P = 1 << L
) (
  input  logic [N-1:0][2:0] sym,
  output logic              corr,
  output logic              sign,
  output logic              zero
);

  for (genvar lv = 0; lv <= L; lv++) begin : g_lvl
    localparam int unsigned NODES = P >> lv;
    logic [NODES-1:0][2:0] q;     // node k: class of its sub-string
    for (genvar k = 0; k < NODES; k++) begin : g_node
      if (lv == 0) begin : g_leaf
        if (k < N) begin : g_sym
          assign q[k] = sym[N-1-k];
        end else begin : g_pad
          assign q[k] = SYM_Z;
        end
      end else begin : g_inner
        assign q[k] = corr_node(g_lvl[lv-1].q[2*k], g_lvl[lv-1].q[2*k+1]);
      end
    end
  end

  corr_result_t res;
  assign res  = corr_root(g_lvl[L].q[0]);
  assign corr = res.corr;
  assign sign = res.sign;
  assign zero = res.zero;

endmodule
