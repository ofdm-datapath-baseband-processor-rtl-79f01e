// tb_symbol_calc: self-checking test of the symbol-count calculation.  For
// random frame configurations (length, modes, rates, 1..12 streams, N) the
// result is compared with a brute-force reference that, for n = 1, 2, ...,
// adds up the payload capacity of n symbols (data or reference mode, minus
// termination bytes) until it covers the frame length.  Also checks that the
// result appears within n+2 clocks of 'start'.
module tb_symbol_calc;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic start, done; frame_cfg_t cfg; logic [15:0] n_sym;
  symbol_calc dut (.clk, .rst_n, .start, .cfg, .n_sym, .done);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bytes_of(int m, int r);   // payload-capable bytes of a symbol
    int cb;
    cb = 192 * ((m == 0) ? 1 : (m == 1) ? 2 : (m == 2) ? 4 : 6);
    return (r == 0) ? cb / 16 : (r == 1) ? cb / 12 : cb * 3 / 32;
  endfunction

  function automatic int ref_n(frame_cfg_t c);
    int per, s;
    per = int'(c.n_data) + 4;
    s = int'(c.n_streams);
    for (int n = 1; n < 5000; n++) begin
      int total;
      total = 0;
      for (int d = 0; d < n; d++) begin
        int pos; bit isref, term;
        pos = d % per;
        isref = pos >= int'(c.n_data);
        // a stream ends in a reference group if its next symbol is past the group
        term = (isref && pos + s >= per) || (d + s >= n);
        total += (isref ? bytes_of(int'(c.ref_mod), int'(c.ref_rate)) : bytes_of(int'(c.data_mod), int'(c.data_rate))) - (term ? 1 : 0);
      end
      if (total >= int'(c.length)) return n;
    end
    return -1;
  endfunction

  initial begin
    start = 1'b0; cfg = '0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int exp_n, cyc;
      cfg.length    = 16'($urandom_range(1, (t < 30) ? 600 : 6000));
      cfg.data_mod  = mod_e'($urandom_range(0, 3));
      cfg.data_rate = rate_e'($urandom_range(0, 2));
      cfg.ref_mod   = mod_e'($urandom_range(0, 1));
      cfg.ref_rate  = rate_e'($urandom_range(0, 2));
      cfg.n_streams = 4'($urandom_range(1, 12));
      cfg.n_data    = 8'($urandom_range(1, 30));
      exp_n = ref_n(cfg);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (int'(n_sym) != exp_n) begin
        failures++;
        $display("FAIL cfg %p: n_sym %0d exp %0d", cfg, n_sym, exp_n);
      end
      checks++;
      if (cyc > exp_n + 2) begin failures++; $display("FAIL latency %0d for n=%0d", cyc, exp_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
