// tb_scrambler: self-checking test of the additive x^7+x^4+1 scrambler at
// its 32-bit transmitter width and at the 8-bit width used for
// descrambling.  Random words with random valid/ready gaps and occasional
// re-initialisation; outputs are compared with a bit-serial reference
// sequence x[n] = x[n-7] xor x[n-4] started from the all-ones seed, and the
// 8-bit unit descrambles the 32-bit unit's output back to the input.
module tb_scrambler;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic init, in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  scrambler #(.W(32)) dut (.clk, .rst_n, .init, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready);

  logic init8, v8, r8, ov8, or8;
  logic [7:0] d8, o8;
  scrambler #(.W(8)) dut8 (.clk, .rst_n, .init(init8), .in_data(d8), .in_valid(v8), .in_ready(r8),
    .out_data(o8), .out_valid(ov8), .out_ready(or8));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic seq [$];
  logic [31:0] expq [$];
  logic [31:0] plain [$];

  function automatic logic next_bit();
    logic b;
    b = seq[seq.size()-7] ^ seq[seq.size()-4];
    seq.push_back(b);
    return b;
  endfunction

  task automatic reseed();
    seq.delete();
    for (int k = 0; k < 7; k++) seq.push_back(1'b1);
  endtask

  initial begin
    int sent;
    init = 1'b0; in_valid = 1'b0; out_ready = 1'b0; in_data = '0;
    reseed();
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sent = 0;
    while (sent < 2000 || expq.size() > 0) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      init = 1'b0;
      if (sent < 2000 && sent % 250 == 249 && expq.size() == 0 && !out_valid) begin
        init = 1'b1; in_valid = 1'b0; reseed(); sent++;
      end else begin
        in_valid = (sent < 2000) && ($urandom_range(0, 2) != 0);
        in_data = $urandom;
      end
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL word got %h exp %h", out_data, expq[0]);
        end
        void'(expq.pop_front());
      end
      if (in_valid && in_ready) begin
        logic [31:0] m;
        for (int i = 0; i < 32; i++) m[i] = next_bit();
        expq.push_back(in_data ^ m);
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0; init = 1'b0;
    // round trip: 32-bit scrambler then 8-bit descrambler, both from the seed
    init = 1'b1; init8 = 1'b1;
    @(negedge clk);
    init = 1'b0; init8 = 1'b0;
    out_ready = 1'b1;
    for (int w = 0; w < 50; w++) begin
      in_valid = 1'b1; in_data = $urandom;
      plain.push_back(in_data);
      @(negedge clk);
      in_valid = 1'b0;
      for (int b = 0; b < 4; b++) begin
        v8 = 1'b1; d8 = out_data[8*b +: 8]; or8 = 1'b1;
        @(negedge clk);
        v8 = 1'b0;
        checks++;
        if (o8 !== plain[0][8*b +: 8]) begin failures++; if (failures < 10) $display("FAIL round trip"); end
      end
      void'(plain.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin init8 = 1'b0; v8 = 1'b0; or8 = 1'b1; d8 = '0; end
endmodule
