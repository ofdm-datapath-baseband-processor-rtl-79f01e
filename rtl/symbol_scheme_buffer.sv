// symbol_scheme_buffer: memory holding the symbol scheme of the current frame
// (one control word per symbol: stream, data/reference, termination,
// modulation and code rate), written by the signal field interpreter and
// read by the receiver units that need it.
//
// The receiver keeps two of them, as in the document's receiver diagram: one
// steers the demapper/deinterleaver side, the other the data collector, so
// both can read independently.  One write port, one asynchronous read port;
// 'filled' counts the entries written since 'clear' so a reader can wait for
// an entry that is not yet there.  DEPTH is this design's choice (the
// document gives no size); a frame needs one entry per symbol.
module symbol_scheme_buffer
  import ofdm_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  sym_info_t                wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output sym_info_t                rd_data,
  output logic                     rd_avail,   // entry rd_addr has been written
  output logic [$clog2(DEPTH):0]   filled
);
  sym_info_t mem [DEPTH];

  always_ff @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      filled <= '0;
    else if (clear)  filled <= '0;
    else if (wr_en)  filled <= filled + 1'b1;
  end

  assign rd_data  = mem[rd_addr];
  assign rd_avail = ({1'b0, rd_addr} < filled);

  // entries are written in order
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> ({1'b0, wr_addr} == filled));
endmodule
