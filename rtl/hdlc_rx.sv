// hdlc_rx: single-channel HDLC receiver.
//
// Wires receiver unit U1 (hdlc_rx_fa_detect: flag/abort detection and the
// frame FSM) to unit U2 (hdlc_rx_unstuff_crc: zero removal, bytes, CRC and
// status). Everything runs on rxclk, one line bit per clock. Output to the
// host: rx_data_out with rx_data_valid for one clock per byte (FCS bytes
// included), sop on the first byte, eop on the last, then eight clocks
// later the status byte with rx_data_valid and rx_status_valid. crc_sel
// selects CRC-16 (0) or CRC-32 (1). rx_state and length_packet expose the
// receive FSM. A byte is delivered once the following byte is complete
// (or the closing flag is seen): about 8 bits after it, plus 10 clocks (8
// in Reg_buffer, one register stage in each unit).
module hdlc_rx
  import hdlc_pkg::*;
#(
  parameter logic [15:0] POLY16 = POLY16_DEFAULT,
  parameter logic [31:0] POLY32 = POLY32_DEFAULT
) (
  input  logic       rxclk,
  input  logic       rxreset,
  input  logic       rxdata,
  input  logic       crc_sel,
  output logic [7:0] rx_data_out,
  output logic       rx_data_valid,
  output logic       rx_status_valid,
  output logic       sop,
  output logic       eop,
  output rx_state_t  rx_state,
  output logic       length_packet
);
  logic bit_valid, bit_out, frame_start, frame_end, abort_det;

  hdlc_rx_fa_detect u1_fad (
    .clk(rxclk), .rst(rxreset), .rxdata, .state(rx_state), .length_packet,
    .bit_valid, .bit_out, .frame_start, .frame_end, .abort_det);

  hdlc_rx_unstuff_crc #(.POLY16(POLY16), .POLY32(POLY32)) u2_zuc (
    .clk(rxclk), .rst(rxreset), .crc_sel, .frame_start, .frame_end,
    .abort_det, .bit_valid, .bit_in(bit_out), .rx_data_out, .rx_data_valid,
    .rx_status_valid, .sop, .eop);
endmodule
