// tb_bs_converter -- checks the borrow-save to sign-magnitude conversion
// at the default width N = 54 with random operands (including equal
// operands and one operand zero) against 64-bit integer arithmetic.
module tb_bs_converter;
  localparam int N = 54;

  logic [N-1:0] dp, dn, mag;
  logic         neg;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;

  bs_converter dut (.dp(dp), .dn(dn), .neg(neg), .mag(mag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, m;
    for (int it = 0; it < 20000; it++) begin
      dp = N'({$urandom, $urandom} >> $urandom_range(0, 60));
      dn = N'({$urandom, $urandom} >> $urandom_range(0, 60));
      if (it % 17 == 0) dn = dp;
      if (it % 23 == 0) dp = '0;
      @(posedge clk);
      v = longint'({10'b0, dp}) - longint'({10'b0, dn});
      m = (v < 0) ? -v : v;
      checks++;
      if (neg != (v < 0) || longint'({10'b0, mag}) != m) begin
        failures++;
        if (failures < 10) $display("FAIL dp=%h dn=%h neg=%b mag=%h exp %0d", dp, dn, neg, mag, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
