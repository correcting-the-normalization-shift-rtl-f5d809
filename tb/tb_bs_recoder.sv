// tb_bs_recoder -- exhaustive check of the per-digit recoding for a short
// word (N = 6, every one of the 4**6 borrow-save bit patterns, so each
// digit value occurs with both encodings of zero).
//
// Reference 1: the symbol of each position is recomputed from the integer
// digit values with the unfactored sums of products of the method
//   u = 0 1 0 | 1 -1 0 | -1 -1 0      (digits i+1, i, i-1)
//   s = 0 1 1 | 1 -1 1 | -1 -1 1
//   v = 0 -1 0 | -1 1 0 | 1 1 0
//   t = 0 -1 -1 | -1 1 -1 | 1 1 -1
// and mapped to s=001 u=010 z=100 v=110 t=111.
// Reference 2: the leading one of w must be at the leading-one position of
// |value| or one position above it, and w is zero only for value zero.
module tb_bs_recoder;
  import rbr_pkg::*;

  localparam int N = 6;

  logic [N-1:0]      dp, dn;
  logic [N-1:0][2:0] sym;
  logic [N-1:0]      w;
  logic              clk = 1'b0;
  int checks = 0;
  int failures = 0;

  bs_recoder #(.N(N)) dut (.dp(dp), .dn(dn), .sym(sym), .w(w));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dig(int j);
    if (j < 0 || j >= N) return 0;
    return int'(dp[j]) - int'(dn[j]);
  endfunction

  function automatic logic [2:0] ref_sym(int i);
    int a, b, c;
    a = dig(i+1); b = dig(i); c = dig(i-1);
    if ((a == 0 && b == 1 && c == 0) || (a == 1 && b == -1 && c == 0) ||
        (a == -1 && b == -1 && c == 0)) return 3'b010;
    if ((a == 0 && b == 1 && c == 1) || (a == 1 && b == -1 && c == 1) ||
        (a == -1 && b == -1 && c == 1)) return 3'b001;
    if ((a == 0 && b == -1 && c == 0) || (a == -1 && b == 1 && c == 0) ||
        (a == 1 && b == 1 && c == 0)) return 3'b110;
    if ((a == 0 && b == -1 && c == -1) || (a == -1 && b == 1 && c == -1) ||
        (a == 1 && b == 1 && c == -1)) return 3'b111;
    return 3'b100;
  endfunction

  initial begin
    int val, mag, msb_val, msb_w;
    for (int pat = 0; pat < (1 << (2*N)); pat++) begin
      dp = pat[N-1:0];
      dn = pat[2*N-1:N];
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (sym[i] !== ref_sym(i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL dp=%b dn=%b pos %0d sym=%b exp=%b", dp, dn, i, sym[i], ref_sym(i));
        end
      end
      val = 0;
      for (int i = N-1; i >= 0; i--) val = 2*val + dig(i);
      mag = (val < 0) ? -val : val;
      msb_val = -1;
      msb_w = -1;
      for (int i = 0; i < N; i++) begin
        if (mag[i]) msb_val = i;
        if (w[i]) msb_w = i;
      end
      checks++;
      if (!(msb_w == msb_val || (msb_val >= 0 && msb_w == msb_val + 1))) begin
        failures++;
        if (failures < 10)
          $display("FAIL dp=%b dn=%b value=%0d w=%b", dp, dn, val, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
