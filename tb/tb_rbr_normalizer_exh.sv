// tb_rbr_normalizer_exh -- exhaustive end-to-end test of the normalizer
// at N = 8 digits: all 4**8 borrow-save bit patterns (every digit string,
// with both encodings of a zero digit). Each result is checked against the
// integer value: zero flag, sign, total shift = lza_cnt + corr = leading
// zeros of |value|, and the normalized magnitude.
module tb_rbr_normalizer_exh;
  localparam int N  = 8;

  logic [N-1:0] dp, dn, norm;
  logic [2:0]   lza_cnt;
  logic [3:0]   shamt;
  logic         corr, sign, conv_neg, zero;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;
  int n_corr = 0;

  rbr_normalizer #(.N(N)) dut (
    .dp(dp), .dn(dn), .lza_cnt(lza_cnt), .corr(corr), .shamt(shamt),
    .sign(sign), .conv_neg(conv_neg), .zero(zero), .norm(norm)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, m, lz;
    logic [N-1:0] expn;
    for (int pat = 0; pat < (1 << (2*N)); pat++) begin
      dp = pat[N-1:0];
      dn = pat[2*N-1:N];
      @(posedge clk);
      v = int'(dp) - int'(dn);
      m = (v < 0) ? -v : v;
      lz = N;
      for (int i = N-1; i >= 0; i--)
        if (m[i] && lz == N) lz = N - 1 - i;
      expn = N'(m << lz);
      checks++;
      if (zero != (v == 0) ||
          (v != 0 && (sign != (v < 0) || conv_neg != (v < 0) ||
                      int'(lza_cnt) + int'(corr) != lz || int'(shamt) != lz || norm != expn))) begin
        failures++;
        if (failures < 10)
          $display("FAIL dp=%b dn=%b value=%0d cnt=%0d corr=%b sign=%b zero=%b norm=%b",
                   dp, dn, v, lza_cnt, corr, sign, zero, norm);
      end
      if (v != 0 && corr) n_corr++;
    end
    checks++;
    if (n_corr == 0) failures++;
    $display("corrections: %0d of %0d patterns", n_corr, 1 << (2*N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
