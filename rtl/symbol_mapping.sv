// symbol_mapping: distributes the byte stream of a frame onto OFDM symbols.
//
// The first symbol carries the signal field (configuration and CRC, sent
// unscrambled, BPSK rate 1/2, stream 0, terminated).  Then, once the symbol
// count is known, it walks the data symbols d = 0..n_sym-1 and for each one
// decides, as the document describes, its stream, whether it is a data or a
// reference symbol (and hence its modulation and code rate) and whether it is
// terminated; a terminated symbol ends with an inserted zero byte.  Bytes of
// scrambled payload fill the symbol; after the payload is exhausted the
// symbol is padded with zero bytes.  Every output byte is tagged with the
// symbol's control word, first/last flags and the interleaver (symbol number
// mod 6) that will take the symbol.  The exact scheme rule and the padding
// are this design's own (see ofdm_pkg).  One byte per clock, valid/ready.
module symbol_mapping
  import ofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  frame_cfg_t  cfg,
  input  logic        frame_start,
  // signal field bytes
  input  logic [7:0]  sig_byte,
  input  logic        sig_valid,
  output logic        sig_ready,
  // number of data symbols
  input  logic [15:0] n_sym,
  input  logic        n_sym_done,
  // scrambled payload words
  input  logic [31:0] pay_word,
  input  logic        pay_valid,
  output logic        pay_ready,
  // tagged byte stream
  output logic [7:0]  out_byte,
  output sym_info_t   out_info,
  output logic        out_first,
  output logic        out_last,
  output logic [2:0]  out_ilv,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        frame_done
);
  typedef enum logic [1:0] {S_IDLE, S_SIG, S_WAIT, S_DATA} state_e;
  state_e      st;
  logic [15:0] d;          // data symbol index
  logic [6:0]  b;          // byte index within the symbol
  logic [1:0]  wb;         // byte index within the payload word
  logic [15:0] left;       // payload bytes not yet sent
  logic [6:0]  cap;
  logic        is_term_byte, use_pay;
  sym_info_t   info;

  always_comb begin
    info         = (st == S_SIG) ? sig_sym_info() : data_sym_info(cfg, int'(d), int'(n_sym));
    cap          = 7'(sym_bytes(info.modu, info.rate));
    is_term_byte = info.term && (b == cap - 1'b1);
    use_pay      = (st == S_DATA) && !is_term_byte && (left != '0);
    out_info     = info;
    out_first    = (b == '0);
    out_last     = (b == cap - 1'b1);
    out_byte     = '0;
    out_valid    = 1'b0;
    sig_ready    = 1'b0;
    pay_ready    = 1'b0;
    case (st)
      S_SIG: begin
        if (b < 7'(SIG_BYTES + 1)) begin
          out_byte  = sig_byte;
          out_valid = sig_valid;
          sig_ready = out_ready;
        end else out_valid = 1'b1;
      end
      S_DATA: begin
        if (use_pay) begin
          out_byte  = pay_word[8*wb +: 8];
          out_valid = pay_valid;
          pay_ready = out_ready && (wb == 2'd3 || left == 16'd1);
        end else out_valid = 1'b1;
      end
      default: ;
    endcase
  end

  assign frame_done = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; d <= '0; b <= '0; wb <= '0; left <= '0; out_ilv <= '0;
    end else if (frame_start) begin
      st <= S_SIG; d <= '0; b <= '0; wb <= '0; left <= cfg.length; out_ilv <= '0;
    end else if (out_valid && out_ready) begin
      if (use_pay) begin
        wb   <= wb + 1'b1;
        left <= left - 1'b1;
      end
      if (out_last) begin
        b       <= '0;
        out_ilv <= (out_ilv == 3'(N_ILV - 1)) ? '0 : out_ilv + 1'b1;
        if (st == S_SIG) st <= S_WAIT;
        else begin
          d <= d + 1'b1;
          if (d + 1'b1 == n_sym) st <= S_IDLE;
        end
      end else b <= b + 1'b1;
    end else if (st == S_WAIT && n_sym_done) st <= S_DATA;
  end
endmodule
