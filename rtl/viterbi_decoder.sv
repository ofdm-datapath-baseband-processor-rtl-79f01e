// viterbi_decoder: 64-state Viterbi decoder for the K=7 (133,171) code with
// sliding-window traceback from the zero state, one source bit per clock.
//
// Structure after the document: an input (add-compare-select) unit takes the
// two soft metrics of one source bit per clock and writes the 64 survivor
// decisions into the trellis memory; a master issues traceback commands;
// NTB = 2 traceback units, served one after the other, each trace back
// TB_LEN = 96 steps from the zero state and deliver the oldest TB_OUT = 48
// bits (half a bit per clock per unit, one bit per clock together); the bits,
// produced in reverse order, are collected in a shift register, copied to an
// output register and read out by the output arbiter 8 bits per clock,
// strictly in command order.  No best-state search is done, as in the
// document: the window is long enough for the paths to merge.  When a
// terminated segment ends (in_last with in_term: the stream's zero byte has
// driven the encoder to state 0), the master issues a final traceback from
// state 0 over all remaining bits, and the path metrics restart at state 0.
// Own choices: path metrics are 12-bit modular numbers compared by signed
// difference, a 256-entry trellis memory, the command queue reduced to the
// unit assignment register, output bytes LSB first.  in_ready drops while a
// termination is being flushed or the trellis memory is full.
module viterbi_decoder
  import ofdm_pkg::*;
#(
  parameter int TB_LEN = 96,
  parameter int TB_OUT = 48,
  parameter int NTB    = 2,
  parameter int DEPTH  = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [SOFT_W-1:0] in_a,
  input  logic signed [SOFT_W-1:0] in_b,
  input  logic                     in_last,    // last pair of a symbol
  input  logic                     in_term,    // the symbol is terminated
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic [7:0]               out_byte,
  output logic                     out_valid,
  input  logic                     out_ready
);
  localparam int AW = $clog2(DEPTH);
  localparam int PW = 16;                 // bit position counters
  localparam int OB = TB_LEN;             // traceback shift register bits

  // ---------------- add-compare-select ----------------
  logic [11:0] pm [64];
  logic [11:0] pm_n [64];
  logic [63:0] dec;
  logic [63:0] dmem [DEPTH];
  logic [PW-1:0] wp, ip, fp;             // write, next-issue, free pointers
  logic        end_pend;
  logic        acc;

  function automatic logic signed [6:0] bm(logic [1:0] c, logic signed [SOFT_W-1:0] a,
                                             logic signed [SOFT_W-1:0] b);
    return (c[0] ? 7'(a) : -7'(a)) + (c[1] ? 7'(b) : -7'(b));
  endfunction

  always_comb begin
    for (int ns = 0; ns < 64; ns++) begin
      logic [5:0]  p0, p1;
      logic        bb;
      logic [11:0] c0, c1, d;
      bb = ns[5];
      p0 = {ns[4:0], 1'b0};
      p1 = {ns[4:0], 1'b1};
      c0 = pm[p0] + 12'(bm(conv_out(bb, p0), in_a, in_b));
      c1 = pm[p1] + 12'(bm(conv_out(bb, p1), in_a, in_b));
      d  = c1 - c0;
      dec[ns]  = !d[11] && (d != '0);
      pm_n[ns] = dec[ns] ? c1 : c0;
    end
  end

  assign in_ready = !end_pend && ((wp - fp) < PW'(DEPTH - 1));
  assign acc      = in_valid && in_ready;

  always_ff @(posedge clk) if (acc) dmem[AW'(wp)] <= dec;

  // ---------------- traceback units ----------------
  logic          u_busy [NTB], u_full [NTB];
  logic [5:0]    u_st   [NTB];
  logic [PW-1:0] u_pos  [NTB], u_base [NTB];
  logic [7:0]    u_left [NTB], u_nout [NTB];
  logic [OB-1:0] u_buf  [NTB];
  logic [$clog2(NTB)-1:0] issue_u, out_u;
  logic          issue, issue_flush;
  logic [PW-1:0] avail;

  assign avail       = wp - ip;
  assign issue_flush = end_pend && (avail < PW'(TB_LEN));
  assign issue       = !u_busy[issue_u] && !u_full[issue_u] &&
                       ((avail >= PW'(TB_LEN)) || (issue_flush && avail != '0));

  // ---------------- output register ----------------
  logic [OB-1:0] oreg;
  logic [4:0]    obytes;
  assign out_valid = (obytes != '0);
  assign out_byte  = oreg[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 64; s++) pm[s] <= (s == 0) ? 12'd0 : 12'hF00;
      wp <= '0; ip <= '0; fp <= '0; end_pend <= 1'b0;
      issue_u <= '0; out_u <= '0; oreg <= '0; obytes <= '0;
      for (int u = 0; u < NTB; u++) begin
        u_busy[u] <= 1'b0; u_full[u] <= 1'b0; u_st[u] <= '0; u_pos[u] <= '0;
        u_base[u] <= '0; u_left[u] <= '0; u_nout[u] <= '0; u_buf[u] <= '0;
      end
    end else begin
      // ACS
      if (acc) begin
        wp <= wp + 1'b1;
        if (in_last && in_term) begin
          end_pend <= 1'b1;
          for (int s = 0; s < 64; s++) pm[s] <= (s == 0) ? 12'd0 : 12'hF00;
        end else
          for (int s = 0; s < 64; s++) pm[s] <= pm_n[s];
      end
      // master: issue a traceback command to the next unit
      if (issue) begin
        u_busy[issue_u] <= 1'b1;
        u_st[issue_u]   <= '0;
        u_base[issue_u] <= ip;
        if (avail >= PW'(TB_LEN)) begin
          u_pos[issue_u]  <= ip + PW'(TB_LEN - 1);
          u_left[issue_u] <= 8'(TB_LEN);
          u_nout[issue_u] <= 8'(TB_OUT);
          ip <= ip + PW'(TB_OUT);
        end else begin
          u_pos[issue_u]  <= wp - 1'b1;
          u_left[issue_u] <= 8'(avail);
          u_nout[issue_u] <= 8'(avail);
          ip <= wp;
          end_pend <= 1'b0;
        end
        issue_u <= (int'(issue_u) == NTB - 1) ? '0 : issue_u + 1'b1;
      end else if (end_pend && avail == '0) end_pend <= 1'b0;
      // traceback steps: one per clock per unit
      for (int u = 0; u < NTB; u++) begin
        if (u_busy[u]) begin
          logic [63:0] dw;
          logic [PW-1:0] rel;
          dw  = dmem[AW'(u_pos[u])];
          rel = u_pos[u] - u_base[u];
          if (rel < PW'(u_nout[u])) u_buf[u][rel[$clog2(OB)-1:0]] <= u_st[u][5];
          u_st[u]   <= {u_st[u][4:0], dw[u_st[u]]};
          u_pos[u]  <= u_pos[u] - 1'b1;
          u_left[u] <= u_left[u] - 1'b1;
          if (u_left[u] == 8'd1) begin
            u_busy[u] <= 1'b0;
            u_full[u] <= 1'b1;
          end
        end
      end
      // output arbiter: take units in issue order, 8 bits per clock
      if (out_valid && out_ready) begin
        oreg   <= oreg >> 8;
        obytes <= obytes - 1'b1;
      end
      if (u_full[out_u] && (obytes == '0 || (obytes == 5'd1 && out_ready))) begin
        oreg          <= u_buf[out_u];
        obytes        <= 5'(u_nout[out_u] / 8);
        u_full[out_u] <= 1'b0;
        fp            <= u_base[out_u] + PW'(u_nout[out_u]);
        out_u         <= (int'(out_u) == NTB - 1) ? '0 : out_u + 1'b1;
      end
    end
  end
endmodule
