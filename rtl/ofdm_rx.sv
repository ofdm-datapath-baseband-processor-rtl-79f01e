// ofdm_rx: the baseband receiver datapath, from equalized data subcarriers to
// the MAC.
//
// Chain, as in the receiver block diagram of the document: demapper/weighting
// -> one deinterleaver and one Viterbi decoder per stream (N_DEC = 12) ->
// data collector (collect FIFOs + descrambler) -> output interface.  Decoder
// 1 (stream 0) first delivers the signal symbol to the signal field
// interpreter, which fills the two symbol scheme buffers: one gives the
// demapper each symbol's modulation, stream and termination, the other steers
// the data collector.  Symbols are streamed: every symbol goes to the
// deinterleaver/decoder of its own stream, so the twelve decoders each run at
// a twelfth of the rate.  'frame_start' (from the synchronization, outside
// this datapath) marks a new frame; the input carries the 192 data
// subcarriers of each symbol, four per clock, in ascending frequency order,
// with their estimated power weights (64 = 1.0).
module ofdm_rx
  import ofdm_pkg::*;
#(
  parameter int N_DEC     = MAX_STREAMS,
  parameter int SCH_DEPTH = 1024,
  parameter int BUF_DEPTH = 64,
  parameter int Q_DEPTH   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  cplx_t       in_sym [LANES],
  input  logic [7:0]  in_pow [LANES],
  input  logic        in_first,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [31:0] mac_data,
  output logic [3:0]  mac_be,
  output logic        mac_last,
  output logic        mac_valid,
  input  logic        mac_ready,
  output frame_cfg_t  rx_cfg,
  output logic        rx_cfg_valid,
  output logic        crc_error
);
  localparam int SAW = $clog2(SCH_DEPTH);

  // ---------------- signal field interpreter, scheme buffers ----------------
  logic [7:0]  sf_byte;  logic sf_valid, sf_ready;
  logic [15:0] n_sym;
  logic        sf_done, wr_en, sch_clear;
  logic [SAW-1:0] wr_addr;
  sym_info_t   wr_data;

  signal_field_interpreter #(.DEPTH(SCH_DEPTH)) u_sfi (
    .clk, .rst_n, .in_byte(sf_byte), .in_valid(sf_valid), .in_ready(sf_ready),
    .cfg(rx_cfg), .n_sym, .cfg_valid(rx_cfg_valid), .done(sf_done), .crc_error,
    .wr_en, .wr_addr, .wr_data, .sch_clear
  );

  logic [SAW-1:0] a_addr, b_addr;
  sym_info_t      a_info, b_info;
  logic           a_avail, b_avail;
  logic [SAW:0]   a_fill, b_fill;

  symbol_scheme_buffer #(.DEPTH(SCH_DEPTH)) u_sch_dm (
    .clk, .rst_n, .clear(sch_clear || frame_start), .wr_en, .wr_addr, .wr_data,
    .rd_addr(a_addr), .rd_data(a_info), .rd_avail(a_avail), .filled(a_fill)
  );
  symbol_scheme_buffer #(.DEPTH(SCH_DEPTH)) u_sch_dc (
    .clk, .rst_n, .clear(sch_clear || frame_start), .wr_en, .wr_addr, .wr_data,
    .rd_addr(b_addr), .rd_data(b_info), .rd_avail(b_avail), .filled(b_fill)
  );

  // ---------------- demapper / weighting ----------------
  logic [15:0] gi;            // symbol being demapped
  sym_info_t   ctl_info;
  logic        ctl_valid, ctl_next;
  logic signed [SOFT_W-1:0] dm_soft [LANES][6];
  sym_info_t   dm_info;
  logic        dm_first, dm_last, dm_valid, dm_ready;

  assign a_addr    = SAW'(gi);
  assign ctl_info  = (gi == '0) ? sig_sym_info() : a_info;
  assign ctl_valid = (gi == '0) || (a_avail && gi <= n_sym && sf_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           gi <= '0;
    else if (frame_start) gi <= '0;
    else if (ctl_next)    gi <= gi + 1'b1;
  end

  demapper_weighting #(.BUF_DEPTH(BUF_DEPTH)) u_dmw (
    .clk, .rst_n, .in_sym, .in_pow, .in_first, .in_valid, .in_ready,
    .ctl_info, .ctl_valid, .ctl_next,
    .out_soft(dm_soft), .out_info(dm_info), .out_first(dm_first), .out_last(dm_last),
    .out_valid(dm_valid), .out_ready(dm_ready)
  );

  // ---------------- per-stream deinterleavers and decoders ----------------
  logic       di_valid [N_DEC], di_ready [N_DEC];
  logic signed [SOFT_W-1:0] da [N_DEC], db [N_DEC];
  logic       d_last [N_DEC], d_term [N_DEC], d_valid [N_DEC], d_ready [N_DEC];
  logic [7:0] v_byte [N_DEC];
  logic       v_valid [N_DEC], v_ready [N_DEC];
  logic [7:0] c_byte [N_DEC];
  logic       c_valid [N_DEC], c_ready [N_DEC];

  always_comb begin
    dm_ready = 1'b0;
    for (int s = 0; s < N_DEC; s++) begin
      di_valid[s] = dm_valid && (dm_info.stream == 4'(s));
      if (dm_info.stream == 4'(s)) dm_ready = di_ready[s];
    end
  end

  for (genvar s = 0; s < N_DEC; s++) begin : g_dec
    deinterleaver u_dil (
      .clk, .rst_n, .in_soft(dm_soft), .in_info(dm_info), .in_last(dm_last),
      .in_valid(di_valid[s]), .in_ready(di_ready[s]),
      .out_a(da[s]), .out_b(db[s]), .out_last(d_last[s]), .out_term(d_term[s]),
      .out_valid(d_valid[s]), .out_ready(d_ready[s])
    );
    viterbi_decoder u_vit (
      .clk, .rst_n, .in_a(da[s]), .in_b(db[s]), .in_last(d_last[s]), .in_term(d_term[s]),
      .in_valid(d_valid[s]), .in_ready(d_ready[s]),
      .out_byte(v_byte[s]), .out_valid(v_valid[s]), .out_ready(v_ready[s])
    );
  end

  // decoder 1 feeds the signal field interpreter with the first symbol
  logic       sig_phase;
  logic [3:0] sig_cnt;
  always_comb begin
    for (int s = 0; s < N_DEC; s++) begin
      c_byte[s]  = v_byte[s];
      c_valid[s] = v_valid[s] && !(s == 0 && sig_phase);
      v_ready[s] = c_ready[s];
    end
    sf_byte  = v_byte[0];
    sf_valid = v_valid[0] && sig_phase;
    if (sig_phase) v_ready[0] = sf_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_phase <= 1'b0; sig_cnt <= '0;
    end else if (frame_start) begin
      sig_phase <= 1'b1; sig_cnt <= '0;
    end else if (sf_valid && sf_ready) begin
      sig_cnt <= sig_cnt + 1'b1;
      if (sig_cnt == 4'd11) sig_phase <= 1'b0;
    end
  end

  // ---------------- data collector, output interface ----------------
  logic       dc_start, cfg_valid_q;
  logic [7:0] dc_byte;
  logic       dc_last, dc_valid, dc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_valid_q <= 1'b0;
    else        cfg_valid_q <= rx_cfg_valid;
  end
  assign dc_start = rx_cfg_valid && !cfg_valid_q;

  data_collector #(.N_DEC(N_DEC), .Q_DEPTH(Q_DEPTH), .SCH_DEPTH(SCH_DEPTH)) u_dc (
    .clk, .rst_n, .start(dc_start), .cfg(rx_cfg), .n_sym,
    .dec_byte(c_byte), .dec_valid(c_valid), .dec_ready(c_ready),
    .sch_addr(b_addr), .sch_info(b_info), .sch_avail(b_avail),
    .out_byte(dc_byte), .out_last(dc_last), .out_valid(dc_valid), .out_ready(dc_ready)
  );

  output_interface u_oi (
    .clk, .rst_n, .in_byte(dc_byte), .in_last(dc_last), .in_valid(dc_valid), .in_ready(dc_ready),
    .mac_data, .mac_be, .mac_last, .mac_valid, .mac_ready
  );
endmodule
