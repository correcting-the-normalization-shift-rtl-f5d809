// rbr_pkg -- types and node functions shared by the normalization-shift
// logic for borrow-save (redundant binary) numbers.
//
// Every digit position is recoded into one of seven mutually exclusive
// symbols held in three bits {a,b,c}. The encoding is the one of the
// method: s=001, u=010, x=011, z=100, y=101, v=110, t=111 (000 unused).
//   z     : no significant digit here
//   u / v : an isolated positive / negative unit
//   s / t : a positive / negative position that is followed by a digit of
//           the same sign, so the sign and position are settled
//   x / y : a positive / negative leading unit followed, after zeros, by a
//           string of opposite sign -- the case that needs a correction
// In this encoding 'a' is the sign, b|c is "not zero" and (a^b)&c marks x
// and y.
//
// corr_node() is the 6-to-3 node of the correction tree. Its rule table is
// this design's reconstruction from the grammar of the method (see the
// module header of corr_tree). lza_node() is the classic leading-zero node:
// t = z_l ? 0.l : 1.r, z = z_l | z_r, where z means "sub-string nonzero".
package rbr_pkg;

  typedef enum logic [2:0] {
    SYM_NONE = 3'b000,
    SYM_S    = 3'b001,
    SYM_U    = 3'b010,
    SYM_X    = 3'b011,
    SYM_Z    = 3'b100,
    SYM_Y    = 3'b101,
    SYM_V    = 3'b110,
    SYM_T    = 3'b111
  } sym_t;

  // Borrow-save digit: value = p - n, so {p,n} = 00 and 11 both mean zero.
  typedef struct packed {
    logic p;
    logic n;
  } bs_digit_t;

  // Result of the correction tree at its root.
  typedef struct packed {
    logic corr;   // quasi-normalization shift is one short
    logic sign;   // 1: the value is negative
    logic zero;   // the value is zero
  } corr_result_t;

  // Combine the symbol of a more significant sub-string (l) with that of
  // the adjacent less significant sub-string (r).
  //   l in {s,x,y,t} (c=1): already decided, r is irrelevant.
  //   l in {u,v}     (b=1,c=0): r all zero keeps l; otherwise the result is
  //                  {a_l, a_r, 1}: same sign gives s/t, opposite sign x/y.
  //   l = z          : the result is r.
  function automatic logic [2:0] corr_node(logic [2:0] l, logic [2:0] r);
    logic r_zero;
    r_zero = ~(r[1] | r[0]);
    if (l[0])
      return l;
    else if (l[1])
      return r_zero ? l : {l[2], r[2], 1'b1};
    else
      return r;
  endfunction

  function automatic corr_result_t corr_root(logic [2:0] sym);
    corr_result_t res;
    res.corr = (sym[2] ^ sym[1]) & sym[0];
    res.sign = sym[2];
    res.zero = ~(sym[1] | sym[0]);
    return res;
  endfunction

endpackage
