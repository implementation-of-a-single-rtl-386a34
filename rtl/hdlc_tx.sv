// hdlc_tx: single-channel HDLC transmitter.
//
// Wires the four transmitter units: U1 hdlc_tx_control (FSM), U2
// hdlc_tx_buffer_crc (Reg_in, Latch_Buffer, serializer and FCS), U3
// hdlc_tx_zero_insert and U4 hdlc_tx_flag_gen. Everything runs on txclk,
// one line bit per clock. Host side: pulse tx_start for one clock when a
// frame is ready; keep the frame's next byte on tx_data_in with
// tx_end_of_file set on its last byte; the transmitter takes that byte on
// each clock where tx_load is high. tx_abort cancels the current frame
// with an abort sequence. crc_sel selects CRC-16 (0) or CRC-32 (1) and
// must not change during a frame. txdata is the serial line output,
// fields LSB first; after reset it carries idle 1s.
module hdlc_tx
  import hdlc_pkg::*;
#(
  parameter logic [15:0] POLY16 = POLY16_DEFAULT,
  parameter logic [31:0] POLY32 = POLY32_DEFAULT
) (
  input  logic       txclk,
  input  logic       txreset,
  input  logic       tx_start,
  input  logic       tx_abort,
  input  logic       crc_sel,
  input  logic [7:0] tx_data_in,
  input  logic       tx_end_of_file,
  output logic       tx_load,
  output logic       txdata,
  output tx_state_t  tx_state
);
  flaggen_t flaggen;
  logic start_flag, flag_last, end_abort;
  logic load_data, crc_send, crc_init, zi_enable, shift_en, fcs_sent;
  logic ser_bit, byte_done, fcs_last, reg_eof;
  logic zi_bit, stop_reading, stuff_next;

  hdlc_tx_control u1_ctrl (
    .clk(txclk), .rst(txreset), .tx_start, .tx_abort,
    .start_flag, .flag_last, .end_abort, .byte_done, .fcs_last,
    .stuff_next, .stop_reading, .reg_eof,
    .state(tx_state), .flaggen, .txload(tx_load), .load_data, .crc_send,
    .crc_init, .zi_enable, .shift_en, .fcs_sent);

  hdlc_tx_buffer_crc #(.POLY16(POLY16), .POLY32(POLY32)) u2_buf (
    .clk(txclk), .rst(txreset), .crc_sel, .txload(tx_load),
    .data_in(tx_data_in), .eof_in(tx_end_of_file), .load_data, .crc_send,
    .crc_init, .shift_en, .bit_out(ser_bit), .byte_done, .fcs_last, .reg_eof);

  hdlc_tx_zero_insert u3_zi (
    .clk(txclk), .rst(txreset), .enable(zi_enable), .bit_in(ser_bit),
    .bit_out(zi_bit), .stop_reading, .stuff_next);

  hdlc_tx_flag_gen u4_fg (
    .clk(txclk), .rst(txreset), .flaggen, .data_bit(zi_bit),
    .txdata, .start_flag, .flag_last, .end_abort);
endmodule
