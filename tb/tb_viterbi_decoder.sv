// tb_viterbi_decoder: self-checking test of the Viterbi decoder.
//
// Random bytes are convolutionally encoded in the testbench (K=7, 133/171,
// independent reference model), mapped to soft metrics +-7 with occasional
// flipped or erased (zero) metrics, and fed as segments of varying length; a
// segment ends with a zero byte and the termination flag, as a terminated
// stream does.  The decoded bytes must equal the source bytes.  Also checked:
// the decoder sustains one source bit per clock over a long segment (two
// traceback units in parallel).
module tb_viterbi_decoder;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic signed [SOFT_W-1:0] in_a, in_b;
  logic in_last, in_term, in_valid, in_ready;
  logic [7:0] out_byte;
  logic out_valid;

  viterbi_decoder dut (.clk, .rst_n, .in_a, .in_b, .in_last, .in_term, .in_valid, .in_ready,
                       .out_byte, .out_valid, .out_ready(1'b1));

  int checks = 0, failures = 0;
  byte unsigned src [$];
  byte unsigned got [$];
  longint t0, t1;

  always @(posedge clk) if (out_valid) got.push_back(out_byte);

  task automatic send_segment(int nbytes, int nerr);
    logic [5:0] st;
    st = '0;
    for (int i = 0; i < nbytes; i++) begin
      byte unsigned v;
      v = (i == nbytes - 1) ? 8'd0 : byte'($urandom);
      src.push_back(v);
      for (int bt = 0; bt < 8; bt++) begin
        logic [1:0] c;
        logic       b;
        b = v[bt];
        // reference encoder: A = taps 1011011, B = taps 1111001 on {b, state}
        c[0] = ^({b, st} & 7'b1011011);
        c[1] = ^({b, st} & 7'b1111001);
        st = {b, st[5:1]};
        in_a <= c[0] ? 5'sd7 : -5'sd7;
        in_b <= c[1] ? 5'sd7 : -5'sd7;
        if (nerr > 0 && $urandom_range(0, 40) == 0) begin
          in_a <= c[0] ? -5'sd3 : 5'sd3;   // wrong decision
          nerr--;
        end else if ($urandom_range(0, 10) == 0) in_b <= '0;   // erasure
        in_last  <= (i == nbytes - 1) && (bt == 7);
        in_term  <= 1'b1;
        in_valid <= 1'b1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  endtask

  initial begin
    in_valid = 0; in_a = 0; in_b = 0; in_last = 0; in_term = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_segment(12, 0);
    send_segment(7, 2);
    send_segment(60, 5);
    // throughput: 600 bytes = 4800 bits
    t0 = $time;
    send_segment(600, 10);
    t1 = $time;
    send_segment(1, 0);
    repeat (400) @(posedge clk);
    checks++;
    if (got.size() != src.size()) begin
      failures++;
      $display("FAIL: %0d bytes decoded, %0d sent", got.size(), src.size());
    end
    for (int i = 0; i < src.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != src[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: byte %0d got %02h expected %02h", i, got[i], src[i]);
      end
    end
    // one bit per clock: 4800 bits in at most 4800 + 200 clocks
    checks++;
    if ((t1 - t0) / 10 > 5000) begin
      failures++;
      $display("FAIL: 4800 bits took %0d clocks", (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
