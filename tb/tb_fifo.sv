// tb_fifo: self-checking test of the synchronous FIFO.  Random pushes and
// pops (including simultaneous ones, a full FIFO and a clear) are compared
// with a queue model: data order, out_valid, in_ready and the occupancy
// count must all match.
module tb_fifo;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data; logic [4:0] count;
  fifo #(.W(8), .DEPTH(16)) dut (.clk, .rst_n, .clear, .in_data, .in_valid, .in_ready,
    .out_data, .out_valid, .out_ready, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [$];
  int fulls = 0;

  initial begin
    clear = 1'b0; in_valid = 1'b0; out_ready = 1'b0; in_data = '0;
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      int bias;
      @(negedge clk);
      bias = ((t / 500) % 2 == 0) ? 3 : 1;   // alternate filling and draining phases
      clear = (t == 2500);
      in_valid = ($urandom_range(0, 3) < bias);
      out_ready = ($urandom_range(0, 3) >= bias);
      in_data = 8'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || out_valid != (q.size() > 0) || in_ready != (q.size() < 16)) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d exp %0d", count, q.size());
      end
      if (q.size() == 16) fulls++;
      if (clear) q.delete();
      else begin
        if (out_valid && out_ready) begin
          checks++;
          if (out_data !== q[0]) begin failures++; if (failures < 10) $display("FAIL data"); end
          void'(q.pop_front());
        end
        if (in_valid && in_ready) q.push_back(in_data);
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
