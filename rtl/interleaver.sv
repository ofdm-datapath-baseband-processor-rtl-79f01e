// interleaver: block interleaver over one OFDM symbol, driven by address
// tables.
//
// As in the document, the permutation of every transmission mode is held in
// an address table, so the pattern changes from symbol to symbol without
// recomputation; the tables here are filled at elaboration from the IEEE
// 802.11a two-step permutation with 16 columns and N_CBPS = 192*N_BPSC (own
// choice; the document gives no pattern).  Write phase: up to two punctured
// coded bits per clock (the kept bits of one mother-code pair, A first) are
// written to their permuted positions.  After the pair flagged 'in_last' the
// unit switches to the read phase: 48 clocks, each delivering the N_BPSC
// bits of four consecutive data subcarriers (LANES = 4, up to 24 bits).  The
// input is stalled during the read phase (single buffer).
module interleaver
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_bits,     // {B, A}
  input  logic [1:0] in_keep,
  input  logic       in_last,
  input  mod_e       in_mod,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [5:0] out_bits [LANES],   // bit i of subcarrier = out_bits[l][i]
  output mod_e       out_mod,
  output logic       out_first,
  output logic       out_last,
  output logic       out_valid,
  input  logic       out_ready
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

  logic [MAX_CBPS-1:0] mem;
  logic [AW-1:0]       k;        // next coded bit index
  logic                rd;       // read phase
  logic [5:0]          cyc;      // read clock 0..47
  mod_e                mod_q;
  int unsigned         nb;

  assign in_ready  = !rd;
  assign out_valid = rd;
  assign out_mod   = mod_q;
  assign out_first = (cyc == '0);
  assign out_last  = (cyc == 6'(N_DATA_SC / LANES - 1));
  assign nb        = nbpsc(mod_q);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      out_bits[l] = '0;
      for (int i = 0; i < 6; i++)
        if (i < int'(nb)) out_bits[l][i] = mem[(int'(cyc) * LANES + l) * int'(nb) + i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0; k <= '0; rd <= 1'b0; cyc <= '0; mod_q <= MOD_BPSK;
    end else if (!rd) begin
      if (in_valid) begin
        mod_q <= in_mod;
        case (in_keep)
          2'b01: mem[TAB[int'(in_mod)*MAX_CBPS + int'(k)]] <= in_bits[0];
          2'b10: mem[TAB[int'(in_mod)*MAX_CBPS + int'(k)]] <= in_bits[1];
          2'b11: begin
            mem[TAB[int'(in_mod)*MAX_CBPS + int'(k)]]        <= in_bits[0];
            mem[TAB[int'(in_mod)*MAX_CBPS + int'(k) + 1]] <= in_bits[1];
          end
          default: ;
        endcase
        k <= k + AW'(in_keep[0]) + AW'(in_keep[1]);
        if (in_last) begin
          rd  <= 1'b1;
          cyc <= '0;
        end
      end
    end else if (out_ready) begin
      cyc <= cyc + 1'b1;
      if (out_last) begin
        rd <= 1'b0;
        k  <= '0;
      end
    end
  end
endmodule
