// hdlc_pkg: types and constants shared by the HDLC transmitter and receiver.
//
// Holds the flag-generator select code (FLAGGEN), the two FSM state types,
// the special sequences (flag 0x7E, abort 0xFE as sent LSB first, i.e. the
// line pattern 0 1111111) and the reflected CRC helpers. CRCs are kept in
// reflected (LSB-first) form, as HDLC sends every field least significant
// bit first. The CRC-16 code is the CCITT polynomial x^16+x^12+x^5+1 (the
// HDLC FCS-16); the CRC-32 code is the usual x^32+...+1 polynomial.
package hdlc_pkg;

  localparam logic [7:0] FLAG_SEQ  = 8'h7E;
  localparam logic [7:0] ABORT_SEQ = 8'hFE;

  // Reflected generator polynomials.
  localparam logic [15:0] POLY16_DEFAULT = 16'h8408;  // x^16+x^12+x^5+1
  localparam logic [31:0] POLY32_DEFAULT = 32'hEDB88320;

  // FLAGGEN: what the flag generator puts on TxData.
  typedef enum logic [1:0] {
    FG_IDLE  = 2'd0,  // continuous 1s
    FG_FLAG  = 2'd1,  // repeated 0x7E
    FG_ABORT = 2'd2,  // one 0xFE abort sequence
    FG_DATA  = 2'd3   // bits from the zero-insertion unit
  } flaggen_t;

  typedef enum logic [2:0] {
    TX_READY   = 3'd0,
    TX_SYNCHRO = 3'd1,
    TX_DATA    = 3'd2,
    TX_SEND_CRC= 3'd3,
    TX_ABORT   = 3'd4
  } tx_state_t;

  typedef enum logic [1:0] {
    RX_IDLE      = 2'd0,
    RX_SYNCHRO   = 2'd1,
    RX_RECEIVING = 2'd2,
    RX_ABORT     = 2'd3
  } rx_state_t;

  // Status byte bit positions.
  localparam int ST_CRC_ERR   = 0;
  localparam int ST_OCTET_ERR = 1;
  localparam int ST_ABORT     = 2;

  // One byte, LSB first, through a reflected CRC of width w (16 or 32,
  // held in the low bits of a 32-bit word).
  function automatic logic [31:0] crc_byte(input logic [31:0] crc,
                                           input logic [7:0]  data,
                                           input logic        sel32,
                                           input logic [15:0] poly16,
                                           input logic [31:0] poly32);
    logic [31:0] c;
    logic        fb;
    c = sel32 ? crc : {16'h0, crc[15:0]};
    for (int i = 0; i < 8; i++) begin
      fb = c[0] ^ data[i];
      c  = c >> 1;
      if (fb) c = c ^ (sel32 ? poly32 : {16'h0, poly16});
    end
    return c;
  endfunction

  // Value the CRC register holds after a frame and its complemented FCS
  // have passed through it: the CRC, started from 0, of w one-bits.
  function automatic logic [31:0] crc_residue(input logic        sel32,
                                              input logic [15:0] poly16,
                                              input logic [31:0] poly32);
    logic [31:0] c;
    c = '0;
    for (int i = 0; i < (sel32 ? 4 : 2); i++) c = crc_byte(c, 8'hFF, sel32, poly16, poly32);
    return c;
  endfunction

endpackage
