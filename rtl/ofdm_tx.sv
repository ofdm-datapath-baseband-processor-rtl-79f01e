// ofdm_tx: the baseband transmitter datapath.
//
// Chain, as in the transmitter block diagram of the document: input control
// (signal field + CRC, symbol-count start) -> 32-bit scrambler -> symbol
// mapping (stream / reference / termination per symbol) -> one FIFO and one
// convolutional encoder per stream (N_ENC = 12) -> interface N_streams -> 6
// -> six interleavers -> subcarrier mapping and pilot insertion -> QAM mapper
// -> 256-point IFFT (4 x 64-point + 4-point) -> preamble and cyclic-prefix
// insertion.  The datapath is symbol oriented after the symbol mapping: every
// byte carries its symbol's control word, and every unit hands symbols on in
// frame order.  All handshakes are valid/ready; the output stream is four
// complex samples per clock ('out_valid' may have gaps since the internal
// buffers are single).  The frequency-domain symbols entering the IFFT are
// also brought out (fd_*) for observation.
module ofdm_tx
  import ofdm_pkg::*;
#(
  parameter int N_ENC   = MAX_STREAMS,
  parameter int Q_DEPTH = 128          // per-stream byte queue
) (
  input  logic        clk,
  input  logic        rst_n,
  input  frame_cfg_t  cfg_in,
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  logic [31:0] pay_in,
  input  logic        pay_in_valid,
  output logic        pay_in_ready,
  output cplx_t       out_data [LANES],
  output logic        out_valid,
  output logic        out_preamble,
  input  logic        out_ready,
  // frequency-domain symbols entering the IFFT
  output cplx_t       fd_data [LANES],
  output logic        fd_valid,
  output logic        fd_first,
  output logic        fd_ready
);
  frame_cfg_t  cfg;
  logic        frame_start;
  logic [31:0] ic_pay;   logic ic_pay_v, ic_pay_r;
  logic [7:0]  sig_b;    logic sig_v, sig_r;
  logic [31:0] scr_w;    logic scr_v, scr_r;
  logic [15:0] n_sym;    logic n_sym_done;
  logic [7:0]  sm_byte;  sym_info_t sm_info;
  logic        sm_first, sm_last, sm_valid, sm_ready, frame_done;
  logic [2:0]  sm_ilv;

  input_control u_ic (
    .clk, .rst_n, .cfg_in, .cfg_valid, .cfg_ready,
    .pay_in, .pay_in_valid, .pay_in_ready,
    .pay_out(ic_pay), .pay_out_valid(ic_pay_v), .pay_out_ready(ic_pay_r),
    .sig_byte(sig_b), .sig_valid(sig_v), .sig_ready(sig_r),
    .cfg, .frame_start
  );

  scrambler #(.W(32)) u_scr (
    .clk, .rst_n, .init(frame_start),
    .in_data(ic_pay), .in_valid(ic_pay_v), .in_ready(ic_pay_r),
    .out_data(scr_w), .out_valid(scr_v), .out_ready(scr_r)
  );

  symbol_calc u_calc (.clk, .rst_n, .start(frame_start), .cfg, .n_sym, .done(n_sym_done));

  symbol_mapping u_sm (
    .clk, .rst_n, .cfg, .frame_start,
    .sig_byte(sig_b), .sig_valid(sig_v), .sig_ready(sig_r),
    .n_sym, .n_sym_done,
    .pay_word(scr_w), .pay_valid(scr_v), .pay_ready(scr_r),
    .out_byte(sm_byte), .out_info(sm_info), .out_first(sm_first), .out_last(sm_last),
    .out_ilv(sm_ilv), .out_valid(sm_valid), .out_ready(sm_ready), .frame_done
  );

  // ---- per-stream queues and encoders ----
  localparam int QW = 8 + 2 + 2 + 1 + 1 + 3;   // byte, rate, mod, first, last, ilv
  logic [QW-1:0] q_in, q_out [N_ENC];
  logic          q_in_v [N_ENC], q_in_r [N_ENC], q_out_v [N_ENC], q_out_r [N_ENC];
  logic [1:0]    e_bits [N_ENC], e_keep [N_ENC];
  logic          e_last [N_ENC], e_valid [N_ENC], e_ready [N_ENC];
  logic [4:0]    e_tag  [N_ENC];
  logic [2:0]    e_ilv  [N_ENC];
  mod_e          e_mod  [N_ENC];

  assign q_in = {sm_byte, sm_info.rate, sm_info.modu, sm_first, sm_last, sm_ilv};
  always_comb begin
    sm_ready = 1'b0;
    for (int s = 0; s < N_ENC; s++) begin
      q_in_v[s] = sm_valid && (sm_info.stream == 4'(s));
      if (sm_info.stream == 4'(s)) sm_ready = q_in_r[s];
    end
  end

  for (genvar s = 0; s < N_ENC; s++) begin : g_enc
    logic [$clog2(Q_DEPTH+1)-1:0] unused_cnt;
    fifo #(.W(QW), .DEPTH(Q_DEPTH)) u_q (
      .clk, .rst_n, .clear(frame_start),
      .in_data(q_in), .in_valid(q_in_v[s]), .in_ready(q_in_r[s]),
      .out_data(q_out[s]), .out_valid(q_out_v[s]), .out_ready(q_out_r[s]), .count(unused_cnt)
    );
    conv_encoder #(.TAG_W(5)) u_enc (
      .clk, .rst_n, .clear(frame_start),
      .in_byte(q_out[s][QW-1 -: 8]), .in_rate(rate_e'(q_out[s][8:7])),
      .in_first(q_out[s][4]), .in_last(q_out[s][3]),
      .in_tag({q_out[s][6:5], q_out[s][2:0]}),
      .in_valid(q_out_v[s]), .in_ready(q_out_r[s]),
      .out_bits(e_bits[s]), .out_keep(e_keep[s]), .out_last(e_last[s]), .out_tag(e_tag[s]),
      .out_valid(e_valid[s]), .out_ready(e_ready[s])
    );
    assign e_ilv[s] = e_tag[s][2:0];
    assign e_mod[s] = mod_e'(e_tag[s][4:3]);
  end

  // ---- interface and interleavers ----
  logic [1:0] i_bits [N_ILV], i_keep [N_ILV];
  logic       i_last [N_ILV], i_valid [N_ILV], i_ready [N_ILV];
  mod_e       i_mod  [N_ILV];
  logic [5:0] il_bits [N_ILV][LANES];
  mod_e       il_mod  [N_ILV];
  logic       il_first [N_ILV], il_last [N_ILV], il_valid [N_ILV], il_ready [N_ILV];

  stream_interface #(.N_ENC(N_ENC), .N_OUT(N_ILV)) u_if (
    .clk, .rst_n, .clear(frame_start), .n_streams(cfg.n_streams),
    .enc_bits(e_bits), .enc_keep(e_keep), .enc_last(e_last), .enc_ilv(e_ilv), .enc_mod(e_mod),
    .enc_valid(e_valid), .enc_ready(e_ready),
    .il_bits(i_bits), .il_keep(i_keep), .il_last(i_last), .il_mod(i_mod),
    .il_valid(i_valid), .il_ready(i_ready)
  );

  for (genvar k = 0; k < N_ILV; k++) begin : g_ilv
    interleaver u_il (
      .clk, .rst_n,
      .in_bits(i_bits[k]), .in_keep(i_keep[k]), .in_last(i_last[k]), .in_mod(i_mod[k]),
      .in_valid(i_valid[k]), .in_ready(i_ready[k]),
      .out_bits(il_bits[k]), .out_mod(il_mod[k]), .out_first(il_first[k]), .out_last(il_last[k]),
      .out_valid(il_valid[k]), .out_ready(il_ready[k])
    );
  end

  // ---- subcarrier mapping, mapper, IFFT, preamble ----
  logic [1:0] sc_kind [LANES];
  logic [5:0] sc_bits [LANES];
  logic       sc_pilot, sc_first, sc_last, sc_valid, sc_ready;
  mod_e       sc_mod;
  cplx_t      ifft_out [LANES];
  logic       ifft_v, ifft_r, ifft_first, ifft_last;

  subcarrier_mapper #(.N_IN(N_ILV)) u_scm (
    .clk, .rst_n, .clear(frame_start),
    .in_bits(il_bits), .in_mod(il_mod), .in_last(il_last), .in_valid(il_valid), .in_ready(il_ready),
    .out_kind(sc_kind), .out_bits(sc_bits), .out_pilot(sc_pilot), .out_mod(sc_mod),
    .out_first(sc_first), .out_last(sc_last), .out_valid(sc_valid), .out_ready(sc_ready)
  );

  qam_mapper u_map (.kind(sc_kind), .bits(sc_bits), .pilot(sc_pilot), .modu(sc_mod), .sym(fd_data));
  assign fd_valid = sc_valid;
  assign fd_first = sc_first;
  assign fd_ready = sc_ready;

  fft256 #(.INVERSE(1'b1)) u_ifft (
    .clk, .rst_n, .in_data(fd_data), .in_valid(sc_valid), .in_ready(sc_ready),
    .out_data(ifft_out), .out_valid(ifft_v), .out_first(ifft_first), .out_last(ifft_last),
    .out_ready(ifft_r)
  );

  preamble_insertion u_pre (
    .clk, .rst_n, .frame_start,
    .in_data(ifft_out), .in_valid(ifft_v), .in_ready(ifft_r),
    .out_data, .out_valid, .out_preamble, .out_ready
  );
endmodule
