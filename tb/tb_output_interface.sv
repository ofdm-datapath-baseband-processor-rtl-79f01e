// tb_output_interface: self-checking test of the byte-to-word packer that
// hands received payload to the MAC.  Frames of random length (so that every
// partial last word occurs) are pushed with random gaps while the MAC side
// stalls at random; every word, byte-enable mask and end-of-frame flag is
// compared with the expected packing (first byte in bits 7:0).
module tb_output_interface;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [7:0] in_byte; logic in_last, in_valid, in_ready;
  logic [31:0] mac_data; logic [3:0] mac_be; logic mac_last, mac_valid, mac_ready;
  output_interface dut (.clk, .rst_n, .in_byte, .in_last, .in_valid, .in_ready,
    .mac_data, .mac_be, .mac_last, .mac_valid, .mac_ready);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {logic [31:0] d; logic [3:0] be; logic l;} word_t;
  word_t expw [$];
  logic [7:0] bq [$];
  logic lq [$];
  int partial = 0;

  initial begin
    in_valid = 1'b0; in_byte = '0; in_last = 1'b0; mac_ready = 1'b0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 80; f++) begin
      int len;
      word_t w;
      len = 1 + int'($urandom_range(0, 40));
      w = '{32'd0, 4'd0, 1'b0};
      for (int i = 0; i < len; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        bq.push_back(b); lq.push_back(i == len - 1);
        w.d[8*(i%4) +: 8] = b; w.be[i%4] = 1'b1;
        if (i % 4 == 3 || i == len - 1) begin
          w.l = (i == len - 1);
          expw.push_back(w);
          w = '{32'd0, 4'd0, 1'b0};
        end
      end
      if (len % 4 != 0) partial++;
    end
    while (expw.size() > 0) begin
      @(negedge clk);
      mac_ready = ($urandom_range(0, 2) != 0);
      in_valid = (bq.size() > 0) && ($urandom_range(0, 3) != 0);
      if (bq.size() > 0) begin in_byte = bq[0]; in_last = lq[0]; end
      #1;
      if (mac_valid && mac_ready) begin
        checks++;
        if ((mac_data & {{8{mac_be[3]}}, {8{mac_be[2]}}, {8{mac_be[1]}}, {8{mac_be[0]}}}) !== expw[0].d ||
            mac_be !== expw[0].be || mac_last !== expw[0].l) begin
          failures++;
          if (failures < 10) $display("FAIL word %h/%b/%b exp %h/%b/%b", mac_data, mac_be, mac_last, expw[0].d, expw[0].be, expw[0].l);
        end
        void'(expw.pop_front());
      end
      if (in_valid && in_ready) begin void'(bq.pop_front()); void'(lq.pop_front()); end
    end
    checks++;
    if (partial == 0) begin failures++; $display("FAIL no partial word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
