// conv_encoder: rate-1/2 K=7 convolutional encoder (generators 133/171 octal)
// with puncturing, one source bit per clock.
//
// There is one encoder per stream; its shift register carries over from one
// symbol of its stream to the next, and the zero termination byte at the end
// of a terminated symbol returns it to state zero, so no explicit flush is
// needed.  Bytes enter with their symbol's code rate, first/last flags and an
// opaque sideband tag that travels with the symbol.  Each clock one data bit
// (LSB first) is encoded into the mother-code pair {B,A} together with a
// keep mask {keepB,keepA}: rates 2/3 and 3/4 drop bits with the IEEE 802.11a
// patterns, restarted at every symbol (own choice; the document names only
// the code and shows rates 1/2 and 3/4).  out_last marks the pair of a
// symbol's last data bit.  1 bit per clock = 100 Mbit/s at 100 MHz, as in the
// document.  'clear' returns the encoder to state zero at frame start.
module conv_encoder
  import ofdm_pkg::*;
#(
  parameter int TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [7:0]       in_byte,
  input  rate_e            in_rate,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [1:0]       out_bits,   // {B, A}
  output logic [1:0]       out_keep,   // {keepB, keepA}
  output logic             out_last,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_valid,
  input  logic             out_ready
);
  logic [5:0]  state;
  logic [2:0]  bitn;
  logic [10:0] phase;     // data bit index within the symbol

  assign out_bits  = conv_out(in_byte[bitn], state);
  assign out_keep  = punct_keep(in_rate, int'(in_first && bitn == '0 ? 11'd0 : phase));
  assign out_last  = in_last && (bitn == 3'd7);
  assign out_tag   = in_tag;
  assign out_valid = in_valid;
  assign in_ready  = out_ready && (bitn == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0; bitn <= '0; phase <= '0;
    end else if (clear) begin
      state <= '0; bitn <= '0; phase <= '0;
    end else if (in_valid && out_ready) begin
      state <= conv_next(in_byte[bitn], state);
      bitn  <= bitn + 1'b1;
      phase <= ((in_first && bitn == '0) ? 11'd0 : phase) + 1'b1;
    end
  end
endmodule
