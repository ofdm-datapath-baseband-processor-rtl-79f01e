// symbol_calc: number of data OFDM symbols a frame needs.
//
// The capacity of a symbol depends on its position: normal data symbols use
// the data mode, every group of four reference symbols the reference mode,
// and terminated symbols lose one byte to the zero termination byte.  The
// unit walks the symbol scheme one symbol per clock and stops at the first
// count n whose total payload capacity reaches the frame length.  It keeps
// P(n) = sum of (capacity - reference termination) over the first n symbols
// and a shift register of the last MAX_STREAMS "not terminated by a reference
// group" flags: the end-of-frame termination of each stream's last symbol
// costs one byte for every flag set among the last S symbols.  That the
// transmitter calculates the number of symbols is from the document; this
// procedure is this design's own.  Latency: n+1 clocks after 'start'.
module symbol_calc
  import ofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  frame_cfg_t  cfg,
  output logic [15:0] n_sym,   // data symbols (signal symbol not counted)
  output logic        done     // level: result valid
);
  logic        busy;
  logic [23:0] psum;
  logic [MAX_STREAMS-1:0] win;
  logic [23:0] cap_n;
  logic [MAX_STREAMS-1:0] wmask;
  sym_info_t   si;
  logic        rt;

  always_comb begin
    wmask = '0;
    for (int i = 0; i < MAX_STREAMS; i++) wmask[i] = (i < int'(cfg.n_streams));
    cap_n = psum - 24'($countones(win & wmask));
    rt    = ref_term(cfg, int'(n_sym));
    si    = data_sym_info(cfg, int'(n_sym), 32'hFFFF_FFFF);   // no end-of-frame term
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; psum <= '0; win <= '0; n_sym <= '0;
    end else if (start) begin
      busy <= 1'b1; done <= 1'b0; psum <= '0; win <= '0; n_sym <= '0;
    end else if (busy) begin
      if (n_sym != '0 && cap_n >= 24'(cfg.length)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        psum  <= psum + 24'(sym_bytes(si.modu, si.rate)) - (rt ? 24'd1 : 24'd0);
        win   <= {win[MAX_STREAMS-2:0], !rt};
        n_sym <= n_sym + 1'b1;
      end
    end
  end
endmodule
