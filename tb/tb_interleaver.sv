// tb_interleaver: self-checking test of the symbol interleaver.  Symbols of
// every modulation and code rate are written as punctured mother-code pairs
// (random data, keep flags from the 802.11a puncturing patterns) with random
// gaps, and read out with random stalls as 48 beats of four subcarriers.
// Each output bit is compared with a reference that places coded bit k at
// the position given by the two-step 802.11a permutation (16 columns),
// computed here independently of the RTL tables.  The read phase must take
// 48 beats and flag its first and last beat.
module tb_interleaver;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0] in_bits, in_keep; logic in_last, in_valid, in_ready; mod_e in_mod;
  logic [5:0] out_bits [LANES]; mod_e out_mod; logic out_first, out_last, out_valid, out_ready;
  interleaver dut (.clk, .rst_n, .in_bits, .in_keep, .in_last, .in_mod, .in_valid, .in_ready,
    .out_bits, .out_mod, .out_first, .out_last, .out_valid, .out_ready);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int perm(int nb, int k);   // 802.11a interleaver position
    int n, s, i;
    n = 192 * nb;
    s = (nb / 2 > 1) ? nb / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  logic exp_bits [1152];

  initial begin
    in_valid = 1'b0; in_bits = '0; in_keep = '0; in_last = 1'b0; in_mod = MOD_BPSK; out_ready = 1'b0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int sy = 0; sy < 24; sy++) begin
      int nb, ndb, k, beat;
      logic c [$];
      mod_e m; int r;
      m = mod_e'(sy % 4);
      r = (sy / 4) % 3;
      nb = (m == MOD_BPSK) ? 1 : (m == MOD_QPSK) ? 2 : (m == MOD_QAM16) ? 4 : 6;
      ndb = (r == 0) ? 96 * nb : (r == 1) ? 128 * nb : 144 * nb;
      k = 0;
      for (int p = 0; p < ndb; p++) begin
        logic ka, kb, a, b;
        a = 1'($urandom); b = 1'($urandom);
        case (r)
          1: begin ka = 1'b1; kb = (p % 2 == 0); end
          2: begin ka = (p % 3 != 2); kb = (p % 3 != 1); end
          default: begin ka = 1'b1; kb = 1'b1; end
        endcase
        if (ka) begin exp_bits[perm(nb, k)] = a; k++; end
        if (kb) begin exp_bits[perm(nb, k)] = b; k++; end
        @(negedge clk);
        in_valid = 1'b0;
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        in_valid = 1'b1; in_bits = {b, a}; in_keep = {kb, ka}; in_last = (p == ndb - 1); in_mod = m;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
      checks++;
      if (k != 192 * nb) begin failures++; $display("FAIL tb: %0d coded bits", k); end
      @(negedge clk);
      in_valid = 1'b0;
      beat = 0;
      while (beat < 48) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_valid && out_ready) begin
          for (int l = 0; l < LANES; l++)
            for (int i = 0; i < nb; i++) begin
              checks++;
              if (out_bits[l][i] !== exp_bits[(4 * beat + l) * nb + i]) begin
                failures++;
                if (failures < 10) $display("FAIL sym %0d beat %0d lane %0d bit %0d", sy, beat, l, i);
              end
            end
          checks++;
          if (out_first !== (beat == 0) || out_last !== (beat == 47) || out_mod !== m) begin
            failures++; $display("FAIL flags in beat %0d", beat);
          end
          beat++;
        end
        @(negedge clk);
      end
      out_ready = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
