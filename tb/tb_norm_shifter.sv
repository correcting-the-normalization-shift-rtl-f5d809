// tb_norm_shifter -- checks the two-step normalizing shift at N = 54.
// For a random nonzero magnitude with leading-zero count lz, the shifter
// is given either (cnt = lz, corr = 0) or (cnt = lz - 1, corr = 1), the two
// cases the trees can report; the result must be mag << lz with bit N-1
// set, and shamt must be lz.
module tb_norm_shifter;
  localparam int N  = 54;
  localparam int CW = 6;

  logic [N-1:0]  mag, norm;
  logic [CW-1:0] cnt;
  logic          corr;
  logic [CW:0]   shamt;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;
  int n_corr = 0;

  norm_shifter dut (.mag(mag), .cnt(cnt), .corr(corr), .norm(norm), .shamt(shamt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lz;
    logic [N-1:0] expn;
    for (int it = 0; it < 20000; it++) begin
      lz  = $urandom_range(0, N-1);
      mag = N'({$urandom, $urandom});
      mag[N-1] = 1'b1;
      mag = mag >> lz;
      if (lz > 0 && $urandom_range(0, 1) == 1) begin
        cnt = CW'(lz - 1);
        corr = 1'b1;
        n_corr++;
      end else begin
        cnt = CW'(lz);
        corr = 1'b0;
      end
      @(posedge clk);
      expn = mag << lz;
      checks++;
      if (norm != expn || !norm[N-1] || int'(shamt) != lz) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%h cnt=%0d corr=%b norm=%h shamt=%0d", mag, cnt, corr, norm, shamt);
      end
    end
    checks++;
    if (n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
