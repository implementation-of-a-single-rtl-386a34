// hdlc_controller: single-channel full-duplex HDLC controller.
//
// The transmitter (hdlc_tx, clocked by txclk) and the receiver (hdlc_rx,
// clocked by rxclk) stand side by side and share nothing but the CRC size
// select crc_sel (0: CRC-16, 1: CRC-32), which must only change between
// frames. The transmit FIFO and the host processor are outside: their
// signals (tx_data_in, tx_end_of_file, tx_load, tx_start, tx_abort and
// the receive data/status outputs) are ports. Connecting txdata to rxdata
// with a common clock gives a loopback of the whole controller.
module hdlc_controller
  import hdlc_pkg::*;
#(
  parameter logic [15:0] POLY16 = POLY16_DEFAULT,
  parameter logic [31:0] POLY32 = POLY32_DEFAULT
) (
  input  logic       crc_sel,
  // transmit side
  input  logic       txclk,
  input  logic       txreset,
  input  logic       tx_start,
  input  logic       tx_abort,
  input  logic [7:0] tx_data_in,
  input  logic       tx_end_of_file,
  output logic       tx_load,
  output logic       txdata,
  output tx_state_t  tx_state,
  // receive side
  input  logic       rxclk,
  input  logic       rxreset,
  input  logic       rxdata,
  output logic [7:0] rx_data_out,
  output logic       rx_data_valid,
  output logic       rx_status_valid,
  output logic       rx_sop,
  output logic       rx_eop,
  output rx_state_t  rx_state,
  output logic       rx_length_packet
);
  hdlc_tx #(.POLY16(POLY16), .POLY32(POLY32)) u_tx (
    .txclk, .txreset, .tx_start, .tx_abort, .crc_sel, .tx_data_in,
    .tx_end_of_file, .tx_load, .txdata, .tx_state);

  hdlc_rx #(.POLY16(POLY16), .POLY32(POLY32)) u_rx (
    .rxclk, .rxreset, .rxdata, .crc_sel, .rx_data_out, .rx_data_valid,
    .rx_status_valid, .sop(rx_sop), .eop(rx_eop), .rx_state,
    .length_packet(rx_length_packet));
endmodule
