// stream_interface: redistributes the coded bits of 1..12 encoders onto the
// fixed set of six interleavers ("Interface N_streams -> 6").
//
// Symbol g of the frame (g = 0 is the signal symbol, g = d+1 the data
// symbols) is encoded by the encoder of its stream and interleaved by
// interleaver g mod 6.  Each interleaver k keeps the stream whose symbol it
// expects next, src[k]: it starts at stream 0 for k = 0 and (k-1) mod S
// otherwise, and advances by 6 mod S after every symbol (interleaver 0
// moves from the signal symbol to data symbol 5).  Interleaver k
// accepts coded bits from encoder s only when src[k] == s and the symbol
// tag carried with the bits names k; this keeps every interleaver in frame
// order even when encoders run ahead.  That an interface maps N streams to six
// interleavers is the document's; this arbitration rule is this design's own.
// Purely combinational routing plus the src registers.
module stream_interface
  import ofdm_pkg::*;
#(
  parameter int N_ENC = MAX_STREAMS,
  parameter int N_OUT = N_ILV
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,          // frame start
  input  logic [3:0] n_streams,
  // from the encoders
  input  logic [1:0] enc_bits [N_ENC],
  input  logic [1:0] enc_keep [N_ENC],
  input  logic       enc_last [N_ENC],
  input  logic [2:0] enc_ilv  [N_ENC],
  input  mod_e       enc_mod  [N_ENC],
  input  logic       enc_valid[N_ENC],
  output logic       enc_ready[N_ENC],
  // to the interleavers
  output logic [1:0] il_bits [N_OUT],
  output logic [1:0] il_keep [N_OUT],
  output logic       il_last [N_OUT],
  output mod_e       il_mod  [N_OUT],
  output logic       il_valid[N_OUT],
  input  logic       il_ready[N_OUT]
);
  logic [3:0] src [N_OUT];
  logic       sig_pending;   // interleaver 0 still expects the signal symbol

  function automatic logic [3:0] mod_s(int unsigned v, logic [3:0] s);
    int unsigned r;
    r = v;
    for (int i = 0; i < 17; i++) if (s != 0 && r >= s) r = r - s;   // v <= 16
    return 4'(r);
  endfunction

  always_comb begin
    for (int s = 0; s < N_ENC; s++) enc_ready[s] = 1'b0;
    for (int k = 0; k < N_OUT; k++) begin
      il_bits[k]  = '0;
      il_keep[k]  = '0;
      il_last[k]  = 1'b0;
      il_mod[k]   = MOD_BPSK;
      il_valid[k] = 1'b0;
      for (int s = 0; s < N_ENC; s++) begin
        if (src[k] == 4'(s) && enc_ilv[s] == 3'(k)) begin
          il_bits[k]  = enc_bits[s];
          il_keep[k]  = enc_keep[s];
          il_last[k]  = enc_last[s];
          il_mod[k]   = enc_mod[s];
          il_valid[k] = enc_valid[s];
          enc_ready[s] = il_ready[k];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_OUT; k++) src[k] <= '0;
      sig_pending <= 1'b1;
    end else if (clear) begin
      sig_pending <= 1'b1;
      for (int k = 0; k < N_OUT; k++) src[k] <= (k == 0) ? 4'd0 : mod_s(k - 1, n_streams);
    end else begin
      for (int k = 0; k < N_OUT; k++)
        if (il_valid[k] && il_ready[k] && il_last[k]) begin
          if (k == 0 && sig_pending) begin
            src[k]      <= mod_s(N_OUT - 1, n_streams);   // symbol 6 = data symbol 5
            sig_pending <= 1'b0;
          end else src[k] <= mod_s(int'(src[k]) + N_OUT, n_streams);
        end
    end
  end
endmodule
