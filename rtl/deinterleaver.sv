// deinterleaver: reverses the transmitter's symbol interleaving on soft bits
// and depunctures the code stream by inserting zero (erasure) metrics.
//
// As in the document, soft bits of four subcarriers arrive per clock (up to
// 24 soft bits for 64-QAM) and the permutation comes from address tables
// holding the pattern of every mode (the same 802.11a-style tables as the
// interleaver, own choice).  Write phase: 48 beats fill the symbol buffer in
// subcarrier order.  Read phase: one data bit per clock, i.e. one mother-code
// pair {A,B} for the Viterbi decoder; a position removed by puncturing gets a
// zero metric, so the puncturing pattern is set only by the pattern table
// (ofdm_pkg::punct_keep).  out_last marks the pair of the symbol's last data
// bit and out_term repeats whether the symbol ends in a termination byte.
// The input is stalled during the read phase (single buffer).
module deinterleaver
  import ofdm_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [SOFT_W-1:0] in_soft [LANES][6],
  input  sym_info_t                in_info,
  input  logic                     in_last,
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic signed [SOFT_W-1:0] out_a,
  output logic signed [SOFT_W-1:0] out_b,
  output logic                     out_last,
  output logic                     out_term,
  output logic                     out_valid,
  input  logic                     out_ready
);
  localparam int AW = $clog2(MAX_CBPS);
  typedef logic [AW-1:0] tab_t [4*MAX_CBPS];   // entry m*MAX_CBPS+k
  function automatic tab_t make_tab();
    tab_t t;
    for (int m = 0; m < 4; m++)
      for (int k = 0; k < MAX_CBPS; k++)
        t[m*MAX_CBPS+k] = (k < int'(ncbps(mod_e'(m)))) ? AW'(ilv_pos(mod_e'(m), k)) : '0;
    return t;
  endfunction
  localparam tab_t TAB = make_tab();

  logic signed [SOFT_W-1:0] mem [MAX_CBPS];
  logic        rd;
  logic [5:0]  beat;
  logic [10:0] n;        // data bit index
  logic [10:0] k;        // coded bit index
  sym_info_t   info;
  logic [1:0]  keep;
  int unsigned nb, base;

  assign in_ready  = !rd;
  assign out_valid = rd;
  assign nb        = nbpsc(in_info.modu);
  assign base      = int'(info.modu) * MAX_CBPS;
  assign keep      = punct_keep(info.rate, int'(n));
  assign out_a     = keep[0] ? mem[TAB[base + int'(k)]] : '0;
  assign out_b     = keep[1] ? mem[TAB[base + int'(k) + int'(keep[0])]] : '0;
  assign out_last  = rd && (int'(n) == int'(ndbps(info.modu, info.rate)) - 1);
  assign out_term  = info.term;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= 1'b0; beat <= '0; n <= '0; k <= '0; info <= '0;
      for (int i = 0; i < MAX_CBPS; i++) mem[i] <= '0;
    end else if (!rd) begin
      if (in_valid) begin
        for (int l = 0; l < LANES; l++)
          for (int b = 0; b < 6; b++)
            if (b < int'(nb)) mem[(int'(beat) * LANES + l) * int'(nb) + b] <= in_soft[l][b];
        info <= in_info;
        beat <= beat + 1'b1;
        if (in_last) begin
          rd <= 1'b1; beat <= '0; n <= '0; k <= '0;
        end
      end
    end else if (out_ready) begin
      n <= n + 1'b1;
      k <= k + 11'(keep[0]) + 11'(keep[1]);
      if (out_last) rd <= 1'b0;
    end
  end
endmodule
