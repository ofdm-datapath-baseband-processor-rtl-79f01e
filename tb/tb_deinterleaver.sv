// tb_deinterleaver: self-checking test of the deinterleaver/depuncturer.
// Symbols of every modulation and code rate arrive as 48 beats of random
// 5-bit soft values (four subcarriers x six bits) with random gaps; the
// output pairs {A,B}, one per data bit, are read with random stalls and
// compared with a reference that inverts the 802.11a permutation (computed
// here independently) and puts a zero metric where the 802.11a puncturing
// pattern removed a bit.  out_last and out_term are checked as well.
module tb_deinterleaver;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic signed [SOFT_W-1:0] in_soft [LANES][6], out_a, out_b;
  sym_info_t in_info;
  logic in_last, in_valid, in_ready, out_last, out_term, out_valid, out_ready;
  deinterleaver dut (.clk, .rst_n, .in_soft, .in_info, .in_last, .in_valid, .in_ready,
    .out_a, .out_b, .out_last, .out_term, .out_valid, .out_ready);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int perm(int nb, int k);
    int n, s, i;
    n = 192 * nb;
    s = (nb / 2 > 1) ? nb / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  logic signed [SOFT_W-1:0] rx [1152];   // soft value at interleaved position

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_info = '0; out_ready = 1'b0;
    for (int l = 0; l < LANES; l++) for (int b = 0; b < 6; b++) in_soft[l][b] = '0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int sy = 0; sy < 24; sy++) begin
      int nb, ndb, k, p;
      mod_e m; int r;
      m = mod_e'(sy % 4);
      r = (sy / 4) % 3;
      nb = (m == MOD_BPSK) ? 1 : (m == MOD_QPSK) ? 2 : (m == MOD_QAM16) ? 4 : 6;
      ndb = (r == 0) ? 96 * nb : (r == 1) ? 128 * nb : 144 * nb;
      in_info = '0;
      in_info.modu = m; in_info.rate = rate_e'(r); in_info.term = 1'(sy % 2);
      in_info.stream = 4'(sy % 12);
      for (int beat = 0; beat < 48; beat++) begin
        @(negedge clk);
        in_valid = 1'b0;
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        for (int l = 0; l < LANES; l++)
          for (int b = 0; b < 6; b++) begin
            in_soft[l][b] = SOFT_W'($urandom_range(0, 30)) - SOFT_W'(15);
            if (b < nb) rx[(4 * beat + l) * nb + b] = in_soft[l][b];
          end
        in_valid = 1'b1; in_last = (beat == 47);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      in_valid = 1'b0;
      k = 0; p = 0;
      while (p < ndb) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_valid && out_ready) begin
          logic ka, kb;
          logic signed [SOFT_W-1:0] ea, eb;
          case (r)
            1: begin ka = 1'b1; kb = (p % 2 == 0); end
            2: begin ka = (p % 3 != 2); kb = (p % 3 != 1); end
            default: begin ka = 1'b1; kb = 1'b1; end
          endcase
          ea = '0; eb = '0;
          if (ka) begin ea = rx[perm(nb, k)]; k++; end
          if (kb) begin eb = rx[perm(nb, k)]; k++; end
          checks++;
          if (out_a !== ea || out_b !== eb || out_last !== (p == ndb - 1) || out_term !== in_info.term) begin
            failures++;
            if (failures < 10) $display("FAIL sym %0d bit %0d got %0d,%0d exp %0d,%0d", sy, p, out_a, out_b, ea, eb);
          end
          p++;
        end
        @(negedge clk);
      end
      out_ready = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
