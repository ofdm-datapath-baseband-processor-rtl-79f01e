// scrambler: additive (synchronous) scrambler, W bits per clock.
//
// The transmitter scrambles the payload with it and the receiver's data
// collector descrambles with the same module, since the additive scrambler is
// its own inverse.  The document specifies a "32-bit" scrambler; here that is
// read as a 32-bit wide datapath (one 32-bit word per clock), and the
// generator x^7+x^4+1 with an all-ones seed is taken from IEEE 802.11a (own
// choice).  Bits are processed LSB first.  'init' reloads the seed at the
// start of a frame.  One register stage: a word accepted at clock n appears
// at the output after clock n; valid/ready handshake on both sides.
module scrambler
  import ofdm_pkg::*;
#(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,       // reload seed (frame start)
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready
);
  logic [6:0]   lfsr, lfsr_nx;
  logic [W-1:0] mask;

  // W steps of the LFSR: feedback bit = x7 xor x4 (bits 6 and 3)
  always_comb begin
    lfsr_nx = lfsr;
    for (int i = 0; i < W; i++) begin
      mask[i] = lfsr_nx[6] ^ lfsr_nx[3];
      lfsr_nx = {lfsr_nx[5:0], mask[i]};
    end
  end

  assign in_ready = (!out_valid || out_ready) && !init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SCRAMBLER_SEED;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (init) lfsr <= SCRAMBLER_SEED;
      else if (in_valid && in_ready) begin
        out_data  <= in_data ^ mask;
        out_valid <= 1'b1;
        lfsr      <= lfsr_nx;
      end
    end
  end
endmodule
