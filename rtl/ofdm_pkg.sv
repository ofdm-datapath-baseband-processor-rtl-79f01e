// ofdm_pkg: types, constants and pure functions shared by the transmitter and
// the receiver of the 1 Gbps OFDM baseband datapath.
//
// The OFDM numerology (256-point FFT, 192 data, 16 pilot and 5 zero
// subcarriers, 800 ns symbol with 160 ns cyclic prefix), the (133,171) K=7
// convolutional code, the modulation set BPSK..64-QAM, the stream
// time-division scheme with reference symbols in groups of four and the
// zero-byte stream termination follow the design description.  Everything
// else here is this design's own choice and is marked as such: the code-rate
// set and its puncturing patterns (taken from IEEE 802.11a), the subcarrier
// layout, the signal-field format and the exact termination rule.
package ofdm_pkg;

  // ---------------- numerology ----------------
  localparam int NFFT        = 256;   // FFT size
  localparam int N_DATA_SC   = 192;   // data subcarriers per symbol
  localparam int N_PILOT_SC  = 16;    // pilot subcarriers
  localparam int N_ZERO_SC   = 5;     // zero subcarriers around DC
  localparam int N_CP        = 64;    // 160 ns prefix at 400 MSPS
  localparam int LANES       = 4;     // samples / subcarriers per clock
  localparam int N_PREAMBLE  = 11;    // preamble length in OFDM symbols
  localparam int REF_GROUP   = 4;     // reference symbols per re-estimation group
  localparam int MAX_STREAMS = 12;    // encoders / decoders
  localparam int N_ILV       = 6;     // transmitter interleavers
  localparam int SIG_BYTES   = 5;     // signal field bytes without CRC
  localparam int SOFT_W      = 5;     // soft bit width at the decoder input
  localparam int SAMPLE_W    = 16;    // I or Q sample width
  localparam int MAX_CBPS    = 6 * N_DATA_SC;   // 1152 coded bits (64-QAM)
  localparam int MAX_SYM_BYTES = 108;           // 64-QAM rate 3/4

  typedef enum logic [1:0] {MOD_BPSK = 2'd0, MOD_QPSK = 2'd1, MOD_QAM16 = 2'd2, MOD_QAM64 = 2'd3} mod_e;
  typedef enum logic [1:0] {RATE_1_2 = 2'd0, RATE_2_3 = 2'd1, RATE_3_4 = 2'd2} rate_e;

  // Frame configuration carried in the signal field (own format).
  typedef struct packed {
    logic [15:0] length;     // payload bytes
    mod_e        data_mod;
    rate_e       data_rate;
    mod_e        ref_mod;    // BPSK or QPSK only
    rate_e       ref_rate;
    logic [3:0]  n_streams;  // 1..12
    logic [7:0]  n_data;     // normal data symbols between reference groups, >=1
  } frame_cfg_t;             // 36 bits, sent in SIG_BYTES bytes

  // Per-symbol control word of the symbol scheme.
  typedef struct packed {
    logic        is_sig;     // signal-field symbol (first symbol)
    logic [3:0]  stream;
    logic        is_ref;
    logic        term;       // last byte of the symbol is a zero termination byte
    mod_e        modu;
    rate_e       rate;
  } sym_info_t;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // ---------------- modulation / code helpers ----------------
  function automatic int unsigned nbpsc(mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 6;
    endcase
  endfunction

  function automatic int unsigned ncbps(mod_e m);
    return N_DATA_SC * nbpsc(m);
  endfunction

  // data bits per symbol: N_CBPS * R
  function automatic int unsigned ndbps(mod_e m, rate_e r);
    case (r)
      RATE_1_2: return ncbps(m) / 2;
      RATE_2_3: return ncbps(m) * 2 / 3;
      default:  return ncbps(m) * 3 / 4;
    endcase
  endfunction

  function automatic int unsigned sym_bytes(mod_e m, rate_e r);
    return ndbps(m, r) / 8;
  endfunction

  // Puncturing: which of the two mother-code bits (A,B) of data bit number
  // 'phase' within a symbol are sent.  Rates 2/3 and 3/4 use the 802.11a
  // patterns.  Returns {keepB, keepA}.
  function automatic logic [1:0] punct_keep(rate_e r, int unsigned phase);
    case (r)
      RATE_2_3: return (phase % 2 == 0) ? 2'b11 : 2'b01;
      RATE_3_4: return (phase % 3 == 0) ? 2'b11 : ((phase % 3 == 1) ? 2'b01 : 2'b10);
      default:  return 2'b11;
    endcase
  endfunction

  // K=7 code, generators 133 and 171 (octal).  reg7 = {input, state[5:0]},
  // state[5] being the most recent earlier input.  Returns {B, A}.
  function automatic logic [1:0] conv_out(logic b, logic [5:0] st);
    logic [6:0] r;
    r = {b, st};
    return {^(r & 7'b1111001), ^(r & 7'b1011011)};
  endfunction

  function automatic logic [5:0] conv_next(logic b, logic [5:0] st);
    return {b, st[5:1]};
  endfunction

  // ---------------- subcarrier layout (own choice) ----------------
  // Occupied bins are -106..+106 (213 = 192+16+5); bins -2..+2 are the zero
  // subcarriers; of the 208 remaining bins, taken from low to high
  // frequency, every 13th (position 6 mod 13) is a pilot.
  // kind: 0 = unused/zero, 1 = data, 2 = pilot
  function automatic logic [1:0] bin_kind(int unsigned bin);
    int f, j;
    f = (bin < NFFT/2) ? int'(bin) : int'(bin) - NFFT;
    if (f < -106 || f > 106 || (f >= -2 && f <= 2)) return 2'd0;
    j = (f < 0) ? f + 106 : f + 101;   // position among the 208 bins
    return (j % 13 == 6) ? 2'd2 : 2'd1;
  endfunction

  // ---------------- 802.11a-style interleaver ----------------
  // Position (within the symbol) of coded bit k after interleaving,
  // 16 columns, N_CBPS = 192*N_BPSC.
  function automatic int unsigned ilv_pos(mod_e m, int unsigned k);
    int unsigned n, s, i, j;
    n = ncbps(m);
    s = (nbpsc(m) / 2 > 1) ? nbpsc(m) / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    j = s * (i / s) + (i + n - (16 * i) / n) % s;
    return j;
  endfunction

  // ---------------- symbol scheme (own rule, after the stream figure) ----------------
  // Data symbol d (0-based, the signal symbol is not counted) belongs to
  // stream d mod S; it is a reference symbol when (d mod (N+4)) >= N.  A
  // reference symbol ends its stream (termination) when the next symbol of
  // the same stream lies beyond the reference group; every stream's last
  // symbol of the frame is terminated as well.
  function automatic logic ref_term(frame_cfg_t c, int unsigned d);
    int unsigned per, pos;
    per = int'(c.n_data) + REF_GROUP;
    pos = d % per;
    return (pos >= c.n_data) && (pos + int'(c.n_streams) >= per);
  endfunction

  function automatic sym_info_t data_sym_info(frame_cfg_t c, int unsigned d, int unsigned n_sym);
    sym_info_t s;
    int unsigned per;
    per        = int'(c.n_data) + REF_GROUP;
    s.is_sig   = 1'b0;
    s.stream   = 4'(d % c.n_streams);
    s.is_ref   = (d % per) >= c.n_data;
    s.term     = ref_term(c, d) || (d + int'(c.n_streams) >= n_sym);
    s.modu     = s.is_ref ? c.ref_mod  : c.data_mod;
    s.rate     = s.is_ref ? c.ref_rate : c.data_rate;
    return s;
  endfunction

  function automatic sym_info_t sig_sym_info();
    sym_info_t s;
    s.is_sig = 1'b1; s.stream = 4'd0; s.is_ref = 1'b0; s.term = 1'b1;
    s.modu = MOD_BPSK; s.rate = RATE_1_2;
    return s;
  endfunction

  // payload bytes a data symbol carries (its capacity less a termination byte)
  function automatic int unsigned payload_bytes(sym_info_t s);
    return sym_bytes(s.modu, s.rate) - (s.term ? 1 : 0);
  endfunction

  // ---------------- CRC-8 (x^8+x^2+x+1, own choice) ----------------
  function automatic logic [7:0] crc8_byte(logic [7:0] crc, logic [7:0] d);
    logic [7:0] c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

  // ---------------- scrambler x^7+x^4+1 (802.11a polynomial) ----------------
  localparam logic [6:0] SCRAMBLER_SEED = 7'h7F;

  // Mapper scale factors: unit amplitude 2^11 divided by the RMS of the
  // integer constellation (1, sqrt2, sqrt10, sqrt42).
  function automatic int mod_scale(mod_e m);
    case (m)
      MOD_BPSK:  return 2048;
      MOD_QPSK:  return 1448;
      MOD_QAM16: return 648;
      default:   return 316;
    endcase
  endfunction

endpackage
