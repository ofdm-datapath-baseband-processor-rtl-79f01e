// demapper_weighting: the receiver's soft demapper with power weighting.
//
// Structure as in the document's demapper figure: a symbol buffer, four
// parallel soft demappers (one per subcarrier lane), power weighting of the
// bit metrics with the estimated subcarrier power, a correction multiplier
// with one constant per modulation and quantization by rounding to 5-bit soft
// values.  Input beats carry four equalized data subcarriers and their power
// weights (unsigned, 64 = 1.0); 48 beats form a symbol, in_first marks the
// first.  The symbol buffer (BUF_DEPTH beats) absorbs stalls of the
// deinterleavers and decoders.  The modulation of each symbol comes from the
// symbol scheme (ctl_info, ctl_valid); a beat leaves the buffer only when the
// control word of its symbol is available, and ctl_next pulses after the last
// beat of a symbol.  Fixed point (own choice): metric * weight * c_mod / 2^18,
// c_mod = round(2^12 * 8 / d) so that an undisturbed outer BPSK point gives
// +-8; the result saturates to +-15.  One register stage at the output.
module demapper_weighting
  import ofdm_pkg::*;
#(
  parameter int BUF_DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cplx_t                    in_sym  [LANES],
  input  logic [7:0]               in_pow  [LANES],
  input  logic                     in_first,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  sym_info_t                ctl_info,
  input  logic                     ctl_valid,
  output logic                     ctl_next,
  output logic signed [SOFT_W-1:0] out_soft [LANES][6],
  output sym_info_t                out_info,
  output logic                     out_first,
  output logic                     out_last,
  output logic                     out_valid,
  input  logic                     out_ready
);
  localparam int BW = LANES * (2 * SAMPLE_W + 8) + 1;
  logic [BW-1:0] b_in, b_out;
  logic          b_valid, b_ready;
  logic [$clog2(BUF_DEPTH+1)-1:0] b_cnt;
  cplx_t         s_sym [LANES];
  logic [7:0]    s_pow [LANES];
  logic          s_first;
  logic [5:0]    beat;
  logic          take;
  logic signed [17:0] llr [LANES][6];

  always_comb begin
    b_in = '0;
    for (int l = 0; l < LANES; l++) b_in[l*40 +: 40] = {in_sym[l], in_pow[l]};
    b_in[BW-1] = in_first;
    for (int l = 0; l < LANES; l++) {s_sym[l], s_pow[l]} = b_out[l*40 +: 40];
    s_first = b_out[BW-1];
  end

  fifo #(.W(BW), .DEPTH(BUF_DEPTH)) u_symbuf (
    .clk, .rst_n, .clear(1'b0),
    .in_data(b_in), .in_valid, .in_ready,
    .out_data(b_out), .out_valid(b_valid), .out_ready(b_ready), .count(b_cnt)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_dm
    soft_demapper u_dm (.sym(s_sym[l]), .modu(ctl_info.modu), .llr(llr[l]));
  end

  function automatic int corr(mod_e m);
    case (m)
      MOD_BPSK:  return 16;
      MOD_QPSK:  return 23;
      MOD_QAM16: return 51;
      default:   return 104;
    endcase
  endfunction

  assign take     = b_valid && ctl_valid && (!out_valid || out_ready);
  assign b_ready  = take;
  assign ctl_next = take && (beat == 6'd47);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_first <= 1'b0; out_last <= 1'b0; out_info <= '0; beat <= '0;
      for (int l = 0; l < LANES; l++) for (int b = 0; b < 6; b++) out_soft[l][b] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        logic [5:0] bt;
        bt = s_first ? 6'd0 : beat;
        beat      <= (bt == 6'd47) ? 6'd0 : bt + 1'b1;
        out_valid <= 1'b1;
        out_first <= (bt == 6'd0);
        out_last  <= (bt == 6'd47);
        out_info  <= ctl_info;
        for (int l = 0; l < LANES; l++)
          for (int b = 0; b < 6; b++) begin
            logic signed [47:0] p;
            logic signed [47:0] q;
            // power weighting, correction multiplier, rounding, saturation
            p = 48'(llr[l][b]) * 48'(signed'({1'b0, s_pow[l]})) * 48'(corr(ctl_info.modu));
            q = (p + 48'sd131072) >>> 18;
            if (b >= int'(nbpsc(ctl_info.modu))) out_soft[l][b] <= '0;
            else if (q > 48'sd15)  out_soft[l][b] <= 5'sd15;
            else if (q < -48'sd15) out_soft[l][b] <= -5'sd15;
            else                   out_soft[l][b] <= SOFT_W'(q);
          end
      end
    end
  end
endmodule
