// output_interface: hands the received payload to the MAC.
//
// Packs the descrambled byte stream into 32-bit words (first byte in bits
// 7:0), the same word width as the transmitter's input, with a byte-enable
// mask and an end-of-frame flag; the last word of a frame may be partial.
// The document only names this interface; word width and signalling are this
// design's own.  One word is assembled while the previous one waits for the
// MAC (valid/ready); a byte is accepted every clock unless a full word is
// still waiting.
module output_interface (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  in_byte,
  input  logic        in_last,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [31:0] mac_data,
  output logic [3:0]  mac_be,
  output logic        mac_last,
  output logic        mac_valid,
  input  logic        mac_ready
);
  logic [31:0] acc;
  logic [1:0]  n;

  assign in_ready = !mac_valid || mac_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; n <= '0; mac_data <= '0; mac_be <= '0; mac_last <= 1'b0; mac_valid <= 1'b0;
    end else begin
      if (mac_valid && mac_ready) mac_valid <= 1'b0;
      if (in_valid && in_ready) begin
        logic [31:0] w;
        w = acc;
        w[8*n +: 8] = in_byte;
        if (n == 2'd3 || in_last) begin
          mac_data  <= w;
          mac_be    <= 4'((1 << (int'(n) + 1)) - 1);
          mac_last  <= in_last;
          mac_valid <= 1'b1;
          acc <= '0;
          n   <= '0;
        end else begin
          acc <= w;
          n   <= n + 1'b1;
        end
      end
    end
  end
endmodule
