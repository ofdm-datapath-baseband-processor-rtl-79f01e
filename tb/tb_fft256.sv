// tb_fft256: self-checking test of the 256-point FFT built from four 64-point
// FFTs, a twiddle stage and a 4-point FFT, four samples per clock.  Sample
// 4m+l enters on lane l in beat m; bin k1+64*k2 leaves on lane k2 in beat
// k1.  Random blocks (and one impulse) go through a forward and an inverse
// instance with random output stalls; outputs are compared with a direct
// 256-point DFT divided by 16, within a fixed-point tolerance.  The input
// must accept a block in 64 clocks (4 samples per 100 MHz clock = 400 MSPS).
module tb_fft256;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cplx_t in_data [LANES], fo [LANES], io [LANES];
  logic in_valid, f_rdy, i_rdy, fv, iv, ff, if_, fl, il, out_ready;
  fft256 #(.INVERSE(1'b0)) u_f (.clk, .rst_n, .in_data, .in_valid, .in_ready(f_rdy),
    .out_data(fo), .out_valid(fv), .out_first(ff), .out_last(fl), .out_ready);
  fft256 #(.INVERSE(1'b1)) u_i (.clk, .rst_n, .in_data, .in_valid, .in_ready(i_rdy),
    .out_data(io), .out_valid(iv), .out_first(if_), .out_last(il), .out_ready);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [256], xi [256];

  task automatic cmp(cplx_t got, int k, bit inv);
    real er, ei, a;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < 256; n++) begin
      a = (inv ? 2.0 : -2.0) * 3.14159265358979 * real'((n * k) % 256) / 256.0;
      er += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
      ei += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
    end
    er /= 16.0; ei /= 16.0;
    checks++;
    if ((real'(got.re) - er) > 16.0 || (er - real'(got.re)) > 16.0 ||
        (real'(got.im) - ei) > 16.0 || (ei - real'(got.im)) > 16.0) begin
      failures++;
      if (failures < 10) $display("FAIL inv=%0b bin %0d got %0d,%0d exp %f,%f", inv, k, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    in_valid = 1'b0; out_ready = 1'b0;
    for (int l = 0; l < LANES; l++) in_data[l] = '0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 6; blk++) begin
      int kf, ki, t;
      for (int n = 0; n < 256; n++) begin
        if (blk == 0) begin xr[n] = (n == 3) ? 8000 : 0; xi[n] = 0; end
        else begin
          xr[n] = int'($urandom_range(0, 6000)) - 3000;
          xi[n] = int'($urandom_range(0, 6000)) - 3000;
        end
      end
      // wait until both units accept, then the block must go in without a gap
      @(negedge clk);
      while (!(f_rdy && i_rdy)) @(negedge clk);
      t = 0;
      for (int m = 0; m < 64; m++) begin
        in_valid = 1'b1;
        for (int l = 0; l < LANES; l++) begin
          in_data[l].re = 16'(xr[4*m+l]); in_data[l].im = 16'(xi[4*m+l]);
        end
        #1;
        checks++;
        if (!(f_rdy && i_rdy)) begin failures++; $display("FAIL input stalled in beat %0d", m); end
        @(negedge clk);
        t++;
      end
      in_valid = 1'b0;
      kf = 0; ki = 0;
      while (kf < 64 || ki < 64) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_ready && fv && kf < 64) begin
          for (int l = 0; l < LANES; l++) cmp(fo[l], kf + 64 * l, 1'b0);
          checks++;
          if (ff !== (kf == 0) || fl !== (kf == 63)) begin failures++; $display("FAIL first/last"); end
          kf++;
        end
        if (out_ready && iv && ki < 64) begin
          for (int l = 0; l < LANES; l++) cmp(io[l], ki + 64 * l, 1'b1);
          ki++;
        end
        @(negedge clk);
      end
      out_ready = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
