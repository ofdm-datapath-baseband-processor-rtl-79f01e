// subcarrier_mapper: places the interleaved bits of one symbol on the 256 FFT
// bins and inserts the pilots.
//
// It takes symbols from the six interleavers in frame order (interleaver
// g mod 6 for symbol g), collecting the 192 data subcarriers (four per clock,
// N_BPSC bits each) into a symbol register.  Then it emits the 256 bins in
// natural order, four per clock (bin 4c+l on lane l in clock c), each tagged
// as data (with its bits), pilot or zero.  Bins -106..106 are occupied, bins
// -2..2 and all outside that range are zero and every 13th remaining bin is a
// pilot (ofdm_pkg::bin_kind; own layout, the document gives only the counts
// 192/16/5).  Pilots are BPSK whose polarity changes from symbol to symbol
// with the x^7+x^4+1 sequence, seeded with ones at frame start (own choice).
// Latency: 48 clocks to load, then 64 clocks of output; input stalls while
// the symbol is emitted.
module subcarrier_mapper
  import ofdm_pkg::*;
#(
  parameter int N_IN = N_ILV
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [5:0] in_bits  [N_IN][LANES],
  input  mod_e       in_mod   [N_IN],
  input  logic       in_last  [N_IN],
  input  logic       in_valid [N_IN],
  output logic       in_ready [N_IN],
  output logic [1:0] out_kind [LANES],   // 0 zero, 1 data, 2 pilot
  output logic [5:0] out_bits [LANES],
  output logic       out_pilot,          // pilot polarity of this symbol
  output mod_e       out_mod,
  output logic       out_first,
  output logic       out_last,
  output logic       out_valid,
  input  logic       out_ready
);
  typedef logic [7:0] b2d_t [NFFT];
  typedef logic [1:0] kind_t [NFFT];
  function automatic b2d_t make_b2d();
    b2d_t t;
    int   j;
    j = 0;
    for (int f = -128; f < 128; f++) begin
      int bin;
      bin = (f < 0) ? f + NFFT : f;
      t[bin] = 8'(j);
      if (bin_kind(bin) == 2'd1) j++;
    end
    return t;
  endfunction
  function automatic kind_t make_kind();
    kind_t t;
    for (int b = 0; b < NFFT; b++) t[b] = bin_kind(b);
    return t;
  endfunction
  localparam b2d_t  B2D  = make_b2d();
  localparam kind_t KIND = make_kind();

  logic [5:0] sc [N_DATA_SC];
  logic [2:0] cur;
  logic [5:0] ld;          // load clock 0..47
  logic       emit;
  logic [5:0] oc;          // output clock 0..63
  logic [6:0] plfsr;
  mod_e       mod_q;

  always_comb begin
    for (int i = 0; i < N_IN; i++) in_ready[i] = !emit && (cur == 3'(i));
    out_valid = emit;
    out_first = (oc == '0);
    out_last  = (oc == 6'(NFFT / LANES - 1));
    out_mod   = mod_q;
    out_pilot = plfsr[6] ^ plfsr[3];
    for (int l = 0; l < LANES; l++) begin
      out_kind[l] = KIND[int'(oc) * LANES + l];
      out_bits[l] = (out_kind[l] == 2'd1) ? sc[B2D[int'(oc) * LANES + l]] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; ld <= '0; emit <= 1'b0; oc <= '0; plfsr <= 7'h7F; mod_q <= MOD_BPSK;
      for (int i = 0; i < N_DATA_SC; i++) sc[i] <= '0;
    end else if (clear) begin
      cur <= '0; ld <= '0; emit <= 1'b0; oc <= '0; plfsr <= 7'h7F;
    end else if (!emit) begin
      if (in_valid[cur]) begin
        for (int l = 0; l < LANES; l++) sc[int'(ld) * LANES + l] <= in_bits[cur][l];
        mod_q <= in_mod[cur];
        ld    <= ld + 1'b1;
        if (in_last[cur]) begin
          emit <= 1'b1;
          ld   <= '0;
          cur  <= (cur == 3'(N_IN - 1)) ? '0 : cur + 1'b1;
        end
      end
    end else if (out_ready) begin
      oc <= oc + 1'b1;
      if (out_last) begin
        emit  <= 1'b0;
        plfsr <= {plfsr[5:0], plfsr[6] ^ plfsr[3]};
      end
    end
  end
endmodule
