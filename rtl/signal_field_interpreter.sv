// signal_field_interpreter: decodes the signal field of a received frame and
// computes the frame's symbol scheme.
//
// It takes the decoded bytes of the first symbol from decoder 1 (stream 0):
// SIG_BYTES configuration bytes, the CRC-8 and padding up to the 12 bytes a
// BPSK rate-1/2 symbol holds.  If the CRC matches it starts the symbol count
// calculation (the same unit as the transmitter's) and then writes the
// control word of every symbol, the signal symbol first, into the symbol
// scheme buffers, one per clock.  That the signal field is analysed to find
// the streaming order and the reference and termination symbols, and stored
// in scheme buffers, is from the document; the field format and CRC are this
// design's own (ofdm_pkg).  'busy' is high from the first byte until the
// scheme is complete; crc_error pulses and the frame is dropped on a mismatch.
module signal_field_interpreter
  import ofdm_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [7:0]               in_byte,
  input  logic                     in_valid,
  output logic                     in_ready,
  output frame_cfg_t               cfg,
  output logic [15:0]              n_sym,
  output logic                     cfg_valid,   // configuration decoded and checked
  output logic                     done,        // whole scheme written
  output logic                     crc_error,
  output logic                     wr_en,
  output logic [$clog2(DEPTH)-1:0] wr_addr,
  output sym_info_t                wr_data,
  output logic                     sch_clear
);
  localparam int SYM0_BYTES = 12;   // BPSK rate 1/2
  typedef enum logic [1:0] {RECV, CALC, WRITE, DONE} state_e;
  state_e      st;
  logic [3:0]  cnt;
  logic [39:0] sig;
  logic [7:0]  crc, crc_rx;
  logic        calc_start, calc_done;
  logic [15:0] calc_n;
  logic [15:0] g;

  assign in_ready = (st == RECV);
  assign cfg      = frame_cfg_t'(sig[35:0]);

  symbol_calc u_calc (.clk, .rst_n, .start(calc_start), .cfg, .n_sym(calc_n), .done(calc_done));

  assign wr_en   = (st == WRITE);
  assign wr_addr = ($clog2(DEPTH))'(g);
  assign wr_data = (g == '0) ? sig_sym_info() : data_sym_info(cfg, int'(g) - 1, int'(n_sym));
  assign done    = (st == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= RECV; cnt <= '0; sig <= '0; crc <= '0; crc_rx <= '0; calc_start <= 1'b0;
      n_sym <= '0; g <= '0; crc_error <= 1'b0; cfg_valid <= 1'b0; sch_clear <= 1'b0;
    end else begin
      calc_start <= 1'b0;
      crc_error  <= 1'b0;
      sch_clear  <= 1'b0;
      case (st)
        RECV: if (in_valid) begin
          if (cnt == '0) begin
            cfg_valid <= 1'b0;
            sch_clear <= 1'b1;
            crc       <= crc8_byte(8'd0, in_byte);
          end else if (cnt < 4'(SIG_BYTES)) crc <= crc8_byte(crc, in_byte);
          if (cnt < 4'(SIG_BYTES)) sig[8*cnt +: 8] <= in_byte;
          if (cnt == 4'(SIG_BYTES)) crc_rx <= in_byte;
          cnt <= cnt + 1'b1;
          if (cnt == 4'(SYM0_BYTES - 1)) begin
            cnt <= '0;
            if (crc_rx == crc && sig[11:8] != '0 && sig[11:8] <= 4'(MAX_STREAMS) && sig[7:0] != '0) begin
              st <= CALC; calc_start <= 1'b1; cfg_valid <= 1'b1;
            end else crc_error <= 1'b1;
          end
        end
        CALC: if (calc_done && !calc_start) begin
          n_sym <= calc_n; g <= '0; st <= WRITE;
        end
        WRITE: begin
          g <= g + 1'b1;
          if (g == n_sym) st <= DONE;
        end
        default: if (in_valid) st <= RECV;   // next frame's signal field
      endcase
    end
  end
endmodule
