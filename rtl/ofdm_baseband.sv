// ofdm_baseband: the OFDM datapath baseband processor, transmitter and
// receiver side by side.
//
// The transmitter turns MAC frames (configuration + 32-bit payload words)
// into time-domain samples, four per clock (400 MSPS at 100 MHz), preamble
// and cyclic prefix included.  The receiver takes the equalized data
// subcarriers and power weights delivered by the synchronization and channel
// estimation (not part of this datapath) and returns the payload words to the
// MAC.  The two halves share only clock and reset; the transmitter's
// frequency-domain symbols are brought out as well (fd_*), which lets a
// testbench close the loop over an ideal channel.
module ofdm_baseband
  import ofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // transmitter: MAC side
  input  frame_cfg_t  tx_cfg,
  input  logic        tx_cfg_valid,
  output logic        tx_cfg_ready,
  input  logic [31:0] tx_data,
  input  logic        tx_data_valid,
  output logic        tx_data_ready,
  // transmitter: to the DAC / IF
  output cplx_t       tx_samples [LANES],
  output logic        tx_samples_valid,
  output logic        tx_preamble,
  input  logic        tx_samples_ready,
  output cplx_t       tx_fd_data [LANES],
  output logic        tx_fd_valid,
  output logic        tx_fd_first,
  output logic        tx_fd_ready,
  // receiver: from synchronization / channel estimation
  input  logic        rx_frame_start,
  input  cplx_t       rx_sym [LANES],
  input  logic [7:0]  rx_pow [LANES],
  input  logic        rx_first,
  input  logic        rx_valid,
  output logic        rx_ready,
  // receiver: MAC side
  output logic [31:0] rx_data,
  output logic [3:0]  rx_be,
  output logic        rx_last,
  output logic        rx_data_valid,
  input  logic        rx_data_ready,
  output frame_cfg_t  rx_cfg,
  output logic        rx_cfg_valid,
  output logic        rx_crc_error
);
  ofdm_tx u_tx (
    .clk, .rst_n, .cfg_in(tx_cfg), .cfg_valid(tx_cfg_valid), .cfg_ready(tx_cfg_ready),
    .pay_in(tx_data), .pay_in_valid(tx_data_valid), .pay_in_ready(tx_data_ready),
    .out_data(tx_samples), .out_valid(tx_samples_valid), .out_preamble(tx_preamble),
    .out_ready(tx_samples_ready),
    .fd_data(tx_fd_data), .fd_valid(tx_fd_valid), .fd_first(tx_fd_first), .fd_ready(tx_fd_ready)
  );

  ofdm_rx u_rx (
    .clk, .rst_n, .frame_start(rx_frame_start),
    .in_sym(rx_sym), .in_pow(rx_pow), .in_first(rx_first), .in_valid(rx_valid), .in_ready(rx_ready),
    .mac_data(rx_data), .mac_be(rx_be), .mac_last(rx_last), .mac_valid(rx_data_valid),
    .mac_ready(rx_data_ready),
    .rx_cfg, .rx_cfg_valid, .crc_error(rx_crc_error)
  );
endmodule
