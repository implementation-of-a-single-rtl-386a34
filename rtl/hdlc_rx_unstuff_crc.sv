// hdlc_rx_unstuff_crc: zero removal, serial-to-parallel conversion, CRC
// check, octet check and status reporting (receiver unit U2).
//
// Frame bits from the flag/abort detector pass through the zero remover
// into the 8-bit R_buffer (LSB first). When it is full the byte is folded
// into the CRC with the byte-parallel CRC unit and held back: it is put on
// rx_data_out, with rx_data_valid for one clock, when the next byte is
// complete, or with eop when the closing flag arrives, so the last whole
// byte carries eop even if stray bits follow it. If the closing flag
// comes on the very bit that completes a byte, the held byte goes out at
// once and the new one, with eop, on the next clock. The first byte of a frame carries sop
// (driven by a start register). The FCS bytes are delivered as data like
// any other. On the closing flag the CRC register must equal the fixed
// residue left by a correct FCS (0xF0B8 for CRC-16, 0xDEBB20E3 for CRC-32
// with the default polynomials) and the bit count must be a multiple of 8.
// Eight clocks after eop the status byte (bit 0 CRC error, bit 1 octet
// error, bit 2 abort) is put on rx_data_out with both rx_data_valid and
// rx_status_valid high. After an abort the status byte 0x04 follows one
// clock later and a byte held back is discarded. The status layout, the
// eight-clock delay and the flags follow the original specification; the hold-back of the
// last byte and the residue check are this design's way of doing it.
module hdlc_rx_unstuff_crc
  import hdlc_pkg::*;
#(
  parameter logic [15:0] POLY16 = POLY16_DEFAULT,
  parameter logic [31:0] POLY32 = POLY32_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       crc_sel,
  input  logic       frame_start,
  input  logic       frame_end,
  input  logic       abort_det,
  input  logic       bit_valid,
  input  logic       bit_in,
  output logic [7:0] rx_data_out,
  output logic       rx_data_valid,
  output logic       rx_status_valid,
  output logic       sop,
  output logic       eop
);
  logic        dv, db;
  logic [7:1]  r_buf;
  logic [7:0]  new_rbuf, pend, second, status_byte;
  logic [2:0]  bitcnt, bitcnt_after;
  logic [31:0] crc, crc_nxt, crc_after, residue, crc_masked;
  logic        byte_done, pend_valid, second_valid, start, crc_err;
  logic [3:0]  status_cnt;

  localparam logic [31:0] RESIDUE16 = crc_residue(1'b0, POLY16, POLY32);
  localparam logic [31:0] RESIDUE32 = crc_residue(1'b1, POLY16, POLY32);

  hdlc_rx_zero_remove u_zr (
    .clk, .rst, .clear(frame_start), .bit_valid, .bit_in,
    .out_valid(dv), .out_bit(db));

  hdlc_crc_par #(.POLY16(POLY16), .POLY32(POLY32)) u_crc (
    .crc_in(crc), .data(new_rbuf), .crc_sel, .crc_out(crc_nxt));

  always_comb begin
    new_rbuf     = {db, r_buf[7:1]};
    byte_done    = dv && (bitcnt == 3'd7);
    bitcnt_after = dv ? bitcnt + 3'd1 : bitcnt;
    crc_after    = byte_done ? crc_nxt : crc;
    crc_masked   = crc_sel ? crc_after : {16'h0, crc_after[15:0]};
    residue      = crc_sel ? RESIDUE32 : RESIDUE16;
    crc_err      = (crc_masked != residue);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r_buf           <= '0;
      bitcnt          <= '0;
      crc             <= '1;
      pend            <= '0;
      pend_valid      <= 1'b0;
      second          <= '0;
      second_valid    <= 1'b0;
      start           <= 1'b0;
      status_byte     <= '0;
      status_cnt      <= '0;
      rx_data_out     <= '0;
      rx_data_valid   <= 1'b0;
      rx_status_valid <= 1'b0;
      sop             <= 1'b0;
      eop             <= 1'b0;
    end else begin
      rx_data_valid   <= 1'b0;
      rx_status_valid <= 1'b0;
      sop             <= 1'b0;
      eop             <= 1'b0;
      if (status_cnt != 4'd0) begin
        status_cnt <= status_cnt - 4'd1;
        if (status_cnt == 4'd1) begin
          rx_data_out     <= status_byte;
          rx_data_valid   <= 1'b1;
          rx_status_valid <= 1'b1;
        end
      end
      if (second_valid) begin
        rx_data_out   <= second;
        rx_data_valid <= 1'b1;
        eop           <= 1'b1;
        second_valid  <= 1'b0;
      end
      if (frame_start) begin
        bitcnt     <= '0;
        crc        <= '1;
        pend_valid <= 1'b0;
        start      <= 1'b1;
      end else if (abort_det) begin
        pend_valid  <= 1'b0;
        start       <= 1'b0;
        status_byte <= 8'h01 << ST_ABORT;
        status_cnt  <= 4'd1;
      end else begin
        if (dv) begin
          r_buf  <= new_rbuf[7:1];
          bitcnt <= bitcnt_after;
        end
        if (byte_done) crc <= crc_nxt;
        if (frame_end) begin
          if (byte_done || pend_valid) begin
            rx_data_out   <= pend_valid ? pend : new_rbuf;
            rx_data_valid <= 1'b1;
            eop           <= !(byte_done && pend_valid);
            sop           <= start;
          end
          second       <= new_rbuf;
          second_valid <= byte_done && pend_valid;
          start        <= 1'b0;
          pend_valid   <= 1'b0;
          status_byte  <= 8'((crc_err ? 1 : 0) << ST_CRC_ERR) |
                          8'(((bitcnt_after != 3'd0) ? 1 : 0) << ST_OCTET_ERR);
          status_cnt   <= (byte_done && pend_valid) ? 4'd9 : 4'd8;
        end else if (byte_done) begin
          if (pend_valid) begin
            rx_data_out   <= pend;
            rx_data_valid <= 1'b1;
            sop           <= start;
            start         <= 1'b0;
          end
          pend       <= new_rbuf;
          pend_valid <= 1'b1;
        end
      end
    end
  end

  // sop and eop only ever accompany a data byte.
  assert property (@(posedge clk) disable iff (rst) (sop || eop) |-> (rx_data_valid && !rx_status_valid));
endmodule
