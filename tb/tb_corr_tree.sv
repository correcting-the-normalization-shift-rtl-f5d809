// tb_corr_tree -- checks the correction tree against a sequential scan of
// the symbol string.
//
// Symbol strings of N = 8 positions are drawn at random from the leaf
// alphabet s, u, z, v, t, with the rule that u and v are followed by z (as
// they always are after recoding, since they stand for a unit with a zero
// digit below it). A second, non-power-of-two instance (N = 11) exercises
// the padding. The reference walks from the most significant position:
//   all z                      -> zero
//   first non-z is s / t       -> positive / negative, no correction
//   first is u, next non-z is v or t -> positive, correction (string X)
//   first is v, next non-z is u or s -> negative, correction (string Y)
//   otherwise                  -> sign of the first, no correction
module tb_corr_tree;
  import rbr_pkg::*;

  localparam int NA = 8;
  localparam int NB = 11;

  logic [NA-1:0][2:0] sym_a;
  logic [NB-1:0][2:0] sym_b;
  logic corr_a, sign_a, zero_a, corr_b, sign_b, zero_b;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;
  int seen_x = 0, seen_y = 0, seen_zero = 0;

  corr_tree #(.N(NA)) dut_a (.sym(sym_a), .corr(corr_a), .sign(sign_a), .zero(zero_a));
  corr_tree #(.N(NB)) dut_b (.sym(sym_b), .corr(corr_b), .sign(sign_b), .zero(zero_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random legal symbol string, most significant symbol first in s[0].
  task automatic gen(int n, output logic [2:0] s [16]);
    logic [2:0] alpha [5] = '{3'b001, 3'b010, 3'b100, 3'b110, 3'b111};
    int zbias;
    zbias = $urandom_range(0, 3);
    for (int k = 0; k < n; k++) begin
      if (k > 0 && (s[k-1] == 3'b010 || s[k-1] == 3'b110))
        s[k] = 3'b100;
      else if ($urandom_range(0, 3) < zbias)
        s[k] = 3'b100;
      else
        s[k] = alpha[$urandom_range(0, 4)];
    end
  endtask

  task automatic ref_scan(int n, input logic [2:0] s [16],
                          output logic corr, output logic sign, output logic zero);
    int first, second;
    first = -1; second = -1;
    for (int k = 0; k < n; k++)
      if (s[k] != 3'b100) begin
        if (first < 0) first = k;
        else if (second < 0) second = k;
      end
    zero = (first < 0);
    corr = 1'b0;
    sign = 1'b1;
    if (first >= 0) begin
      sign = (s[first] == 3'b110 || s[first] == 3'b111);
      if (second >= 0) begin
        if (s[first] == 3'b010 && (s[second] == 3'b110 || s[second] == 3'b111)) corr = 1'b1;
        if (s[first] == 3'b110 && (s[second] == 3'b010 || s[second] == 3'b001)) corr = 1'b1;
      end
    end
  endtask

  initial begin
    logic [2:0] s [16];
    logic ec, es, ez;
    for (int it = 0; it < 20000; it++) begin
      gen(NA, s);
      for (int k = 0; k < NA; k++) sym_a[NA-1-k] = s[k];
      ref_scan(NA, s, ec, es, ez);
      gen(NB, s);
      for (int k = 0; k < NB; k++) sym_b[NB-1-k] = s[k];
      @(posedge clk);
      checks++;
      if (zero_a != ez || (!ez && (corr_a != ec || sign_a != es))) begin
        failures++;
        if (failures < 10) $display("FAIL A sym=%b corr=%b sign=%b zero=%b exp %b %b %b",
                                     sym_a, corr_a, sign_a, zero_a, ec, es, ez);
      end
      if (!ez && ec && !es) seen_x++;
      if (!ez && ec && es) seen_y++;
      if (ez) seen_zero++;
      ref_scan(NB, s, ec, es, ez);
      checks++;
      if (zero_b != ez || (!ez && (corr_b != ec || sign_b != es))) begin
        failures++;
        if (failures < 10) $display("FAIL B sym=%b corr=%b sign=%b zero=%b exp %b %b %b",
                                     sym_b, corr_b, sign_b, zero_b, ec, es, ez);
      end
    end
    checks++;
    if (seen_x == 0 || seen_y == 0 || seen_zero == 0) begin
      failures++;
      $display("FAIL coverage X=%0d Y=%0d zero=%0d", seen_x, seen_y, seen_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
