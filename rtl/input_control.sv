// input_control: front end of the transmitter.
//
// Accepts one frame at a time from the host side: a frame configuration
// (payload length, modes, number of streams, reference spacing) and then the
// payload as 32-bit words.  It forms the signal field (SIG_BYTES bytes holding
// the configuration, LSB first, followed by a CRC-8), starts the symbol count
// calculation, pulses 'frame_start' (scrambler seed reload) and forwards
// exactly ceil(length/4) payload words to the scrambler.  The CRC over the
// signal field and the start of the symbol calculation are the document's;
// the field layout, CRC polynomial and 32-bit input word are this design's
// own choices.  Signal bytes and payload words are forwarded independently,
// one per clock each, with valid/ready handshakes; a new configuration is
// accepted only when both streams of the previous frame are finished.
module input_control
  import ofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // frame configuration
  input  frame_cfg_t  cfg_in,
  input  logic        cfg_valid,
  output logic        cfg_ready,
  // payload words from the host
  input  logic [31:0] pay_in,
  input  logic        pay_in_valid,
  output logic        pay_in_ready,
  // to scrambler
  output logic [31:0] pay_out,
  output logic        pay_out_valid,
  input  logic        pay_out_ready,
  // signal field bytes (configuration + CRC) to symbol mapping
  output logic [7:0]  sig_byte,
  output logic        sig_valid,
  input  logic        sig_ready,
  // configuration of the current frame, start pulse for symbol calculation
  output frame_cfg_t  cfg,
  output logic        frame_start
);
  logic [2:0]  sig_cnt;
  logic [14:0] words_left;
  logic [7:0]  crc;
  logic [39:0] sig_bits;

  assign sig_bits     = {4'b0, cfg};
  assign cfg_ready    = (sig_cnt == 3'(SIG_BYTES + 1)) && (words_left == '0);
  assign sig_valid    = (sig_cnt <= 3'(SIG_BYTES));
  assign sig_byte     = (sig_cnt == 3'(SIG_BYTES)) ? crc : sig_bits[8*sig_cnt +: 8];
  assign pay_out      = pay_in;
  assign pay_out_valid = pay_in_valid && (words_left != '0);
  assign pay_in_ready  = pay_out_ready && (words_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_cnt     <= 3'(SIG_BYTES + 1);
      words_left  <= '0;
      crc         <= '0;
      cfg         <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (cfg_valid && cfg_ready) begin
        cfg         <= cfg_in;
        sig_cnt     <= '0;
        crc         <= '0;
        words_left  <= 15'((int'(cfg_in.length) + 3) / 4);
        frame_start <= 1'b1;
      end else begin
        if (sig_valid && sig_ready) begin
          sig_cnt <= sig_cnt + 1'b1;
          if (sig_cnt < 3'(SIG_BYTES)) crc <= crc8_byte(crc, sig_byte);
        end
        if (pay_out_valid && pay_out_ready) words_left <= words_left - 1'b1;
      end
    end
  end
endmodule
