// tb_rbr_normalizer -- end-to-end test of the normalizer at its default
// size (N = 54 digits), checked against the integer value of each input.
//
// Each stimulus is a digit string d[53..0] in {-1,0,1}, turned into a
// borrow-save pair with a random choice between the two encodings of a
// zero digit (00 or 11). The digit strings come from several generators:
// uniform digits, sparse digits, and strings built to cancel, such as
// 0..0 1 -1 -1 .. -1 tail or 0..0 1 0..0 -1 tail, which are the inputs
// where the quasi-normalization count is one short. For each, with
// value = sum d[i]*2**i and lz the leading zeros of |value| in 54 bits:
//   zero  == (value == 0)
//   sign  == conv_neg == (value < 0)           (value nonzero)
//   lza_cnt + corr == shamt == lz               (value nonzero)
//   norm  == |value| << lz                      (value nonzero)
// It also counts how often each case occurs -- positive and negative results with
// and without a correction, and zero -- failing if one never does.
module tb_rbr_normalizer;
  localparam int N = 54;

  logic [N-1:0] dp, dn, norm;
  logic [5:0]   lza_cnt;
  logic [6:0]   shamt;
  logic         corr, sign, conv_neg, zero;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;
  int n_pos = 0, n_neg = 0, n_pos_corr = 0, n_neg_corr = 0, n_zero = 0;

  rbr_normalizer dut (
    .dp(dp), .dn(dn), .lza_cnt(lza_cnt), .corr(corr), .shamt(shamt),
    .sign(sign), .conv_neg(conv_neg), .zero(zero), .norm(norm)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d [N];

  function automatic int rnd_digit(int pzero);
    if ($urandom_range(0, 99) < pzero) return 0;
    return ($urandom_range(0, 1) == 1) ? 1 : -1;
  endfunction

  task automatic make_digits(int kind);
    int top, pos, sgn;
    foreach (d[i]) d[i] = 0;
    top = $urandom_range(0, N-1);
    sgn = ($urandom_range(0, 1) == 1) ? 1 : -1;
    case (kind)
      0: foreach (d[i]) d[i] = rnd_digit(33);
      1: foreach (d[i]) d[i] = rnd_digit(85);
      2: begin  // 0..0 1 -1 .. -1 tail : leading non-significant units
        pos = top;
        d[pos] = sgn;
        pos--;
        for (int k = $urandom_range(0, 10); k > 0 && pos >= 0; k--) begin
          d[pos] = -sgn;
          pos--;
        end
        for (; pos >= 0; pos--) d[pos] = rnd_digit(50);
      end
      3: begin  // 0..0 1 0..0 -1 tail : isolated unit, then opposite sign
        pos = top;
        d[pos] = sgn;
        pos = pos - 1 - $urandom_range(1, 6);
        if (pos >= 0) d[pos] = -sgn;
        for (pos = pos - 1; pos >= 0; pos--) d[pos] = rnd_digit(50);
      end
      4: ;      // zero, encoded with random 00/11 digits
      default: foreach (d[i]) d[i] = rnd_digit(60);
    endcase
  endtask

  task automatic apply_and_check();
    longint v, m;
    int lz;
    logic [N-1:0] expn;
    for (int i = 0; i < N; i++) begin
      case (d[i])
        1:  begin dp[i] = 1'b1; dn[i] = 1'b0; end
        -1: begin dp[i] = 1'b0; dn[i] = 1'b1; end
        default: begin dp[i] = 1'($urandom); dn[i] = dp[i]; end
      endcase
    end
    @(posedge clk);
    v = 0;
    for (int i = N-1; i >= 0; i--) v = 2*v + longint'(d[i]);
    m = (v < 0) ? -v : v;
    lz = N;
    for (int i = N-1; i >= 0; i--)
      if (m[i] && lz == N) lz = N - 1 - i;
    expn = N'(m << lz);
    checks++;
    if (zero != (v == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL zero: dp=%h dn=%h value=%0d", dp, dn, v);
    end else if (v != 0) begin
      if (sign != (v < 0) || conv_neg != (v < 0) ||
          int'(lza_cnt) + int'(corr) != lz || int'(shamt) != lz || norm != expn) begin
        failures++;
        if (failures < 10)
          $display("FAIL dp=%h dn=%h value=%0d cnt=%0d corr=%b shamt=%0d sign=%b norm=%h exp lz=%0d",
                   dp, dn, v, lza_cnt, corr, shamt, sign, norm, lz);
      end
      if (v > 0 && !corr) n_pos++;
      if (v < 0 && !corr) n_neg++;
      if (v > 0 && corr) n_pos_corr++;
      if (v < 0 && corr) n_neg_corr++;
    end else begin
      n_zero++;
    end
  endtask

  initial begin
    for (int it = 0; it < 30000; it++) begin
      make_digits(it % 6);
      apply_and_check();
    end
    $display("cases: positive %0d, negative %0d, positive+corr %0d, negative+corr %0d, zero %0d",
             n_pos, n_neg, n_pos_corr, n_neg_corr, n_zero);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_pos_corr == 0 || n_neg_corr == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
