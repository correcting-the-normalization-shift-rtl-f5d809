// lza_tree -- leading-zero counter built as a binary tree of LZA nodes.
//
// The W-bit string w (bit W-1 most significant) is padded with zeros on
// the least significant side to P = 2**L bits, L = clog2(W). Each leaf
// passes only a "nonzero" flag (its count is the empty string). A node
// receives (l, z_l) from its more significant child and (r, z_r) from the
// less significant one and returns
//   t = z_l ? {0, l} : {1, r}      z = z_l | z_r
// so the count grows by one bit per level and the root holds the L-bit
// number of leading zeros of a nonzero w. For an all-zero w, nonzero is 0
// and cnt is P-1.
//
// Interface: w in; cnt (L bits) and nonzero out.
// Timing: combinational, L levels of one 2:1 selector each.
// The node is the classic divide-and-conquer node of the method; the
// zero padding for a W that is no power of two is this design's choice.
module lza_tree #(
  parameter int unsigned W = 54,
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned P = 1 << L
) (
  input  logic [W-1:0] w,
  output logic [L-1:0] cnt,
  output logic         nonzero
);

  for (genvar lv = 0; lv <= L; lv++) begin : g_lvl
    localparam int unsigned NODES = P >> lv;
    logic [NODES-1:0]        z;   // node k: sub-string is nonzero
    logic [NODES-1:0][L-1:0] t;   // node k: its leading-zero count
    for (genvar k = 0; k < NODES; k++) begin : g_node
      if (lv == 0) begin : g_leaf
        // Leaf k (k = 0 leftmost) carries w[W-1-k], or a padding zero.
        if (k < W) begin : g_bit
          assign z[k] = w[W-1-k];
        end else begin : g_pad
          assign z[k] = 1'b0;
        end
        assign t[k] = '0;
      end else begin : g_inner
        logic          zl, zr;
        logic [L-1:0]  tl, tr;
        assign zl   = g_lvl[lv-1].z[2*k];
        assign zr   = g_lvl[lv-1].z[2*k+1];
        assign tl   = g_lvl[lv-1].t[2*k];
        assign tr   = g_lvl[lv-1].t[2*k+1];
        assign z[k] = zl | zr;
        // Bit lv-1 is the new most significant bit of the count.
        assign t[k] = zl ? tl : (tr | (L'(1) << (lv - 1)));
      end
    end
  end

  assign cnt     = g_lvl[L].t[0];
  assign nonzero = g_lvl[L].z[0];

endmodule
