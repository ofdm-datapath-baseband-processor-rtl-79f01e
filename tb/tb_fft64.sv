// tb_fft64: self-checking test of the 64-point FFT core in both directions.
// Random complex blocks (plus a single impulse and a single tone) go through
// a forward and an inverse instance with random output stalls; every output
// is compared with a direct DFT computed in real arithmetic, divided by 8 as
// the core scales, within a small fixed-point tolerance, and out_last must
// mark the 64th output.
module tb_fft64;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cplx_t in_data, fo, io;
  logic in_valid, f_in_ready, i_in_ready, fv, iv, fl, il, out_ready;
  fft64 #(.INVERSE(1'b0)) u_f (.clk, .rst_n, .in_data, .in_valid(in_valid), .in_ready(f_in_ready),
    .out_data(fo), .out_valid(fv), .out_last(fl), .out_ready);
  fft64 #(.INVERSE(1'b1)) u_i (.clk, .rst_n, .in_data, .in_valid(in_valid), .in_ready(i_in_ready),
    .out_data(io), .out_valid(iv), .out_last(il), .out_ready);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [64], xi [64];
  real maxerr = 0.0;

  task automatic cmp(cplx_t got, int k, bit inv);
    real er, ei, a;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < 64; n++) begin
      a = (inv ? 2.0 : -2.0) * 3.14159265358979 * real'(n * k) / 64.0;
      er += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
      ei += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
    end
    er /= 8.0; ei /= 8.0;
    checks++;
    if ((real'(got.re) - er) > 12.0 || (er - real'(got.re)) > 12.0 ||
        (real'(got.im) - ei) > 12.0 || (ei - real'(got.im)) > 12.0) begin
      failures++;
      if (failures < 10) $display("FAIL inv=%0b bin %0d got %0d,%0d exp %f,%f", inv, k, got.re, got.im, er, ei);
    end
    if ((real'(got.re) - er) > maxerr) maxerr = real'(got.re) - er;
    if ((er - real'(got.re)) > maxerr) maxerr = er - real'(got.re);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; out_ready = 1'b0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 12; blk++) begin
      int kf, ki, t;
      for (int n = 0; n < 64; n++) begin
        if (blk == 0) begin xr[n] = (n == 0) ? 8000 : 0; xi[n] = 0; end
        else if (blk == 1) begin
          xr[n] = int'(4000.0 * $cos(2.0 * 3.14159265358979 * 5.0 * real'(n) / 64.0));
          xi[n] = int'(4000.0 * $sin(2.0 * 3.14159265358979 * 5.0 * real'(n) / 64.0));
        end else begin
          xr[n] = int'($urandom_range(0, 8000)) - 4000;
          xi[n] = int'($urandom_range(0, 8000)) - 4000;
        end
      end
      t = 0;
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data.re = 16'(xr[n]); in_data.im = 16'(xi[n]);
        #1;
        while (!(f_in_ready && i_in_ready)) begin @(negedge clk); #1; end
        t++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      kf = 0; ki = 0;
      while (kf < 64 || ki < 64) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_ready && fv && kf < 64) begin
          cmp(fo, kf, 1'b0);
          checks++;
          if (fl !== (kf == 63)) begin failures++; $display("FAIL out_last"); end
          kf++;
        end
        if (out_ready && iv && ki < 64) begin cmp(io, ki, 1'b1); ki++; end
        @(negedge clk);
      end
      out_ready = 1'b0;
    end
    $display("max real-part error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
