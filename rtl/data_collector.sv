// data_collector: un-streams the decoded data and descrambles it.
//
// As in the document, the bytes of all decoders are stored in collect FIFOs
// (one per decoder, Q_DEPTH bytes) and the collector, steered by the symbol
// scheme, takes them back in transmission order: for data symbol g it reads
// the symbol's byte count from the FIFO of the symbol's stream, drops the
// termination byte of a terminated symbol and the zero padding after the
// frame's last payload byte, and passes the payload through the descrambler
// (the transmitter's scrambler, 8 bits per clock, seed reloaded at 'start').
// 'start' (with the frame's configuration valid) begins a frame; entries of
// the scheme are read from the buffer as they become available (sch_avail).
// Output: one byte per clock with valid/ready and a last-byte flag.
module data_collector
  import ofdm_pkg::*;
#(
  parameter int N_DEC   = MAX_STREAMS,
  parameter int Q_DEPTH = 256,
  parameter int SCH_DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  frame_cfg_t                   cfg,
  input  logic [15:0]                  n_sym,
  // decoded bytes
  input  logic [7:0]                   dec_byte  [N_DEC],
  input  logic                         dec_valid [N_DEC],
  output logic                         dec_ready [N_DEC],
  // symbol scheme
  output logic [$clog2(SCH_DEPTH)-1:0] sch_addr,
  input  sym_info_t                    sch_info,
  input  logic                         sch_avail,
  // descrambled payload
  output logic [7:0]                   out_byte,
  output logic                         out_last,
  output logic                         out_valid,
  input  logic                         out_ready
);
  logic [7:0]  q_byte  [N_DEC];
  logic        q_valid [N_DEC];
  logic        q_ready [N_DEC];
  logic        active;
  logic [15:0] g, left, out_left;
  logic [6:0]  b, cap;
  logic        cur_v, pop, is_term, to_dsc;
  logic        d_ready;
  logic [7:0]  cur_b;

  for (genvar s = 0; s < N_DEC; s++) begin : g_q
    logic [$clog2(Q_DEPTH+1)-1:0] unused_cnt;
    fifo #(.W(8), .DEPTH(Q_DEPTH)) u_collect (
      .clk, .rst_n, .clear(1'b0),
      .in_data(dec_byte[s]), .in_valid(dec_valid[s]), .in_ready(dec_ready[s]),
      .out_data(q_byte[s]), .out_valid(q_valid[s]), .out_ready(q_ready[s]), .count(unused_cnt)
    );
  end

  assign sch_addr = ($clog2(SCH_DEPTH))'(g);

  always_comb begin
    cap     = 7'(sym_bytes(sch_info.modu, sch_info.rate));
    is_term = sch_info.term && (b == cap - 1'b1);
    cur_v   = 1'b0;
    cur_b   = '0;
    for (int s = 0; s < N_DEC; s++) begin
      q_ready[s] = 1'b0;
      if (sch_info.stream == 4'(s)) begin
        cur_v = q_valid[s];
        cur_b = q_byte[s];
      end
    end
    to_dsc = !is_term && (left != '0);
    pop    = active && sch_avail && cur_v && (!to_dsc || d_ready);
    for (int s = 0; s < N_DEC; s++)
      if (sch_info.stream == 4'(s)) q_ready[s] = pop;
  end

  scrambler #(.W(8)) u_dsc (
    .clk, .rst_n, .init(start),
    .in_data(cur_b), .in_valid(pop && to_dsc), .in_ready(d_ready),
    .out_data(out_byte), .out_valid, .out_ready
  );
  assign out_last = (out_left == 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; g <= '0; b <= '0; left <= '0; out_left <= '0;
    end else if (start) begin
      active <= 1'b1; g <= 16'd1; b <= '0; left <= cfg.length; out_left <= cfg.length;
    end else begin
      if (out_valid && out_ready) out_left <= out_left - 1'b1;
      if (pop) begin
        if (to_dsc) left <= left - 1'b1;
        if (b == cap - 1'b1) begin
          b <= '0;
          g <= g + 1'b1;
          if (g == n_sym) active <= 1'b0;
        end else b <= b + 1'b1;
      end
    end
  end
endmodule
