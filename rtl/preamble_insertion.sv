// preamble_insertion: transmitter back end.  Sends the preamble at the start
// of a frame, then the OFDM symbols from the IFFT, each with its cyclic
// prefix, four time samples per clock.
//
// The document multiplexes "stored preamble symbols" with the FFT output and
// fixes an eleven-symbol preamble and a 160 ns prefix (64 samples at
// 400 MSPS); the preamble waveform itself is not given.  Here the stored
// waveform is a reproducible pseudo-noise sequence (x^15+x^14+1, reloaded at
// every frame) giving +-1024 on I and Q, eleven symbols of 320 samples = 880
// clocks (own choice).  Each IFFT symbol arrives as four quarter-symbols in
// parallel (lane k2 carries sample 64*k2+k1 in clock k1); it is written into
// a 256-sample buffer and then read out in time order as 64 prefix samples
// (samples 192..255) followed by the 256 samples: 80 clocks per 800 ns symbol.
// Placing the cyclic prefix insertion here is this design's own choice.  The
// input is stalled while a symbol is read out.
module preamble_insertion
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  input  cplx_t in_data [LANES],
  input  logic  in_valid,
  output logic  in_ready,
  output cplx_t out_data [LANES],
  output logic  out_valid,
  output logic  out_preamble,   // current output is preamble
  input  logic  out_ready
);
  localparam int PRE_CLKS = N_PREAMBLE * (NFFT + N_CP) / LANES;   // 880
  localparam int SYM_CLKS = (NFFT + N_CP) / LANES;                 // 80

  typedef enum logic [1:0] {IDLE, PRE, LOAD, EMIT} state_e;
  state_e      st;
  cplx_t       buffer [NFFT];
  logic [9:0]  cnt;
  logic [14:0] pn;
  logic [14:0] pn_nx;
  logic [7:0]  pn_bits;

  // eight PN bits per clock: one I and one Q sign per lane
  always_comb begin
    pn_nx = pn;
    for (int i = 0; i < 8; i++) begin
      pn_bits[i] = pn_nx[14] ^ pn_nx[13];
      pn_nx      = {pn_nx[13:0], pn_bits[i]};
    end
  end

  assign in_ready     = (st == LOAD);
  assign out_valid    = (st == PRE) || (st == EMIT);
  assign out_preamble = (st == PRE);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int t;
      t = int'(cnt) * LANES + l;
      if (st == PRE) begin
        out_data[l].re = pn_bits[2*l]   ? 16'sd1024 : -16'sd1024;
        out_data[l].im = pn_bits[2*l+1] ? 16'sd1024 : -16'sd1024;
      end else if (t < N_CP) out_data[l] = buffer[NFFT - N_CP + t];
      else                   out_data[l] = buffer[(t - N_CP) % NFFT];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; pn <= '1;
      for (int i = 0; i < NFFT; i++) buffer[i] <= '0;
    end else if (frame_start) begin
      st <= PRE; cnt <= '0; pn <= '1;
    end else begin
      case (st)
        PRE: if (out_ready) begin
          pn  <= pn_nx;
          cnt <= cnt + 1'b1;
          if (cnt == 10'(PRE_CLKS - 1)) begin st <= LOAD; cnt <= '0; end
        end
        LOAD: if (in_valid) begin
          for (int l = 0; l < LANES; l++) buffer[64 * l + int'(cnt)] <= in_data[l];
          cnt <= cnt + 1'b1;
          if (cnt == 10'd63) begin st <= EMIT; cnt <= '0; end
        end
        EMIT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == 10'(SYM_CLKS - 1)) begin st <= LOAD; cnt <= '0; end
        end
        default: ;
      endcase
    end
  end
endmodule
