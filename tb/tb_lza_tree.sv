// tb_lza_tree -- checks the leading-zero tree at its default width
// (W = 54, padded to 64) and at W = 8, against a bit-by-bit scan.
// Inputs are random with a random number of leading zeros, so every count
// from 0 to W-1 occurs, plus the all-zero word.
module tb_lza_tree;
  localparam int WA = 54;
  localparam int WB = 8;

  logic [WA-1:0] w_a;
  logic [WB-1:0] w_b;
  logic [5:0]    cnt_a;
  logic [2:0]    cnt_b;
  logic          nz_a, nz_b;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;

  lza_tree dut_a (.w(w_a), .cnt(cnt_a), .nonzero(nz_a));
  lza_tree #(.W(WB)) dut_b (.w(w_b), .cnt(cnt_b), .nonzero(nz_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lz(logic [63:0] v, int width);
    for (int i = width - 1; i >= 0; i--)
      if (v[i]) return width - 1 - i;
    return width;
  endfunction

  initial begin
    int e;
    for (int it = 0; it < 20000; it++) begin
      w_a = 54'({$urandom, $urandom} >> $urandom_range(0, 64));
      w_a = (it == 0) ? '0 : w_a;
      w_b = 8'($urandom) >> $urandom_range(0, 8);
      @(posedge clk);
      e = lz(64'(w_a), WA);
      checks++;
      if (nz_a != (e < WA) || (e < WA && int'(cnt_a) != e)) begin
        failures++;
        if (failures < 10) $display("FAIL A w=%h cnt=%0d nz=%b exp %0d", w_a, cnt_a, nz_a, e);
      end
      e = lz(64'(w_b), WB);
      checks++;
      if (nz_b != (e < WB) || (e < WB && int'(cnt_b) != e)) begin
        failures++;
        if (failures < 10) $display("FAIL B w=%b cnt=%0d nz=%b exp %0d", w_b, cnt_b, nz_b, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
