// hdlc_crc_par: byte-parallel FCS next-state logic.
//
// Combinational. Given the current CRC register and one byte, it returns
// the register after the byte's eight bits (LSB first) have been processed,
// so a whole byte is absorbed in one clock, as the transmitter and receiver
// both update their FCS once per byte. crc_sel picks CRC-16 (0, result in
// crc_out[15:0], upper half zero) or CRC-32 (1). The polynomials are
// parameters in reflected form; the defaults are the CCITT CRC-16 used as
// the HDLC FCS-16 and the standard CRC-32. The XOR network is the unrolled
// serial LFSR; how the parallel equations are derived is this design's own.
module hdlc_crc_par
  import hdlc_pkg::*;
#(
  parameter logic [15:0] POLY16 = POLY16_DEFAULT,
  parameter logic [31:0] POLY32 = POLY32_DEFAULT
) (
  input  logic [31:0] crc_in,
  input  logic [7:0]  data,
  input  logic        crc_sel,
  output logic [31:0] crc_out
);
  always_comb crc_out = crc_byte(crc_in, data, crc_sel, POLY16, POLY32);
endmodule
