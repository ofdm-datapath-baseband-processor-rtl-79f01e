// tb_soft_demapper: self-checking test of the max-log soft demapper.  Random
// bits are mapped by the constellation mapper, disturbed by noise well below
// half the constellation spacing, and demapped: every metric must have the
// sign of its bit (positive for a one), metrics of unused bit positions must
// be zero, and a noiseless point must give the exact piecewise-linear
// metrics (2d - |I| for the second 16-QAM bit).
module tb_soft_demapper;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0] kind [LANES]; logic [5:0] bits [LANES]; mod_e modu; cplx_t mapped [LANES];
  cplx_t sym; logic signed [17:0] llr [6];
  qam_mapper u_map (.kind, .bits, .pilot(1'b0), .modu, .sym(mapped));
  soft_demapper dut (.sym, .modu, .llr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    modu = MOD_BPSK; sym = '0;
    for (int l = 0; l < LANES; l++) begin kind[l] = 2'd1; bits[l] = '0; end
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int nb, d, nz;
      @(negedge clk);
      modu = mod_e'($urandom_range(0, 3));
      bits[0] = 6'($urandom);
      nb = (modu == MOD_BPSK) ? 1 : (modu == MOD_QPSK) ? 2 : (modu == MOD_QAM16) ? 4 : 6;
      d = (modu == MOD_BPSK) ? 2048 : (modu == MOD_QPSK) ? 1448 : (modu == MOD_QAM16) ? 648 : 316;
      nz = (t % 2 == 0) ? 0 : d * 8 / 10;
      #1;
      sym.re = mapped[0].re + 16'(int'($urandom_range(0, 2 * nz)) - nz);
      sym.im = (modu == MOD_BPSK) ? mapped[0].im : mapped[0].im + 16'(int'($urandom_range(0, 2 * nz)) - nz);
      #1;
      for (int b = 0; b < 6; b++) begin
        checks++;
        if (b >= nb) begin
          if (llr[b] != 0) begin failures++; if (failures < 10) $display("FAIL unused bit %0d nonzero", b); end
        end else if ((llr[b] > 0) != bits[0][b] || llr[b] == 0) begin
          failures++;
          if (failures < 10) $display("FAIL mod %0d bits %b sym %0d,%0d: llr[%0d]=%0d", modu, bits[0], sym.re, sym.im, b, llr[b]);
        end
      end
      if (nz == 0 && modu == MOD_QAM16) begin
        int ai;
        ai = (sym.re < 0) ? -int'(sym.re) : int'(sym.re);
        checks++;
        if (int'(llr[1]) != 2 * d - ai) begin failures++; $display("FAIL exact 16-QAM metric %0d exp %0d", llr[1], 2 * d - ai); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
