// tb_conv_encoder: self-checking test of the K=7 (133,171) encoder with
// puncturing flags.  Random bytes grouped into symbols of random length and
// code rate go in with random output stalls; every output pair is compared
// with a reference built from an explicit delay-line model of the two
// generator polynomials and the 802.11a puncturing tables.  Also checks the
// one-bit-per-clock rate when the output never stalls.
module tb_conv_encoder;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [7:0] in_byte; rate_e in_rate; logic in_first, in_last, in_valid, in_ready;
  logic [3:0] in_tag, out_tag; logic [1:0] out_bits, out_keep; logic out_last, out_valid, out_ready, clear;

  conv_encoder #(.TAG_W(4)) dut (.clk, .rst_n, .clear, .in_byte, .in_rate, .in_first, .in_last,
    .in_tag, .in_valid, .in_ready, .out_bits, .out_keep, .out_last, .out_tag, .out_valid, .out_ready);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {logic [7:0] b; rate_e r; logic f, l; logic [3:0] t;} item_t;
  item_t q[$];
  logic h [7];           // h[k] = input bit k steps ago
  int phase, bitn;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s got %0b exp %0b", what, got, exp); end
  endtask

  initial begin
    int nb, cyc, t0;
    logic ka, kb;
    clear = 1'b0; in_valid = 1'b0; out_ready = 1'b0; in_byte = '0; in_rate = RATE_1_2;
    in_first = 1'b0; in_last = 1'b0; in_tag = '0;
    for (int k = 0; k < 7; k++) h[k] = 1'b0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // build 60 symbols
    for (int s = 0; s < 60; s++) begin
      int len; rate_e r;
      len = 1 + int'($urandom_range(0, 20));
      r = rate_e'($urandom_range(0, 2));
      for (int i = 0; i < len; i++) q.push_back('{8'($urandom), r, i == 0, i == len - 1, 4'(s)});
    end
    nb = q.size();
    bitn = 0; phase = 0; cyc = 0;
    while (q.size() > 0) begin
      @(negedge clk);
      cyc++;
      out_ready = (cyc > 3000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_valid = 1'b1;
      in_byte = q[0].b; in_rate = q[0].r; in_first = q[0].f; in_last = q[0].l; in_tag = q[0].t;
      #1;
      if (out_valid && out_ready) begin
        logic b;
        b = q[0].b[bitn];
        if (q[0].f && bitn == 0) phase = 0;
        for (int k = 6; k > 0; k--) h[k] = h[k-1];
        h[0] = b;
        check("A", out_bits[0], h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6]);
        check("B", out_bits[1], h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6]);
        case (q[0].r)
          RATE_2_3: begin ka = 1'b1; kb = (phase % 2 == 0); end
          RATE_3_4: begin ka = (phase % 3 != 2); kb = (phase % 3 != 1); end
          default:  begin ka = 1'b1; kb = 1'b1; end
        endcase
        check("keepA", out_keep[0], ka);
        check("keepB", out_keep[1], kb);
        check("last", out_last, q[0].l && bitn == 7);
        check("tag", out_tag[0], q[0].t[0]);
        phase++;
        bitn++;
        if (bitn == 8) begin
          check("in_ready", in_ready, 1'b1);
          bitn = 0;
          void'(q.pop_front());
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    // rate: 10 bytes with no stall take 80 clocks
    for (int i = 0; i < 10; i++) q.push_back('{8'($urandom), RATE_1_2, i == 0, i == 9, 4'd0});
    t0 = 0;
    out_ready = 1'b1;
    while (q.size() > 0) begin
      in_valid = 1'b1; in_byte = q[0].b; in_rate = q[0].r; in_first = q[0].f; in_last = q[0].l;
      @(posedge clk);
      #1;
      t0++;
      if (dut.bitn == 3'd0) void'(q.pop_front());
      @(negedge clk);
    end
    in_valid = 1'b0;
    checks++;
    if (t0 != 80) begin failures++; $display("FAIL rate: %0d clocks for 80 bits", t0); end
    $display("encoded %0d bytes", nb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
