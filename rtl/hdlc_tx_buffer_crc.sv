// hdlc_tx_buffer_crc: transmit buffers, parallel-to-serial conversion and
// FCS generation (transmitter unit U2).
//
// Reg_in captures the byte on the data bus, with its TxEndOfile flag, on
// the clock where txload is high. load_data moves Reg_in into the
// Latch_Buffer and, in the same clock, folds the byte into the CRC through
// the byte-parallel CRC unit. shift_en shifts the Latch_Buffer out LSB
// first; byte_done marks the clock its eighth bit leaves. crc_send loads
// the complemented CRC into the FCS shift register (16 or 32 bits by
// crc_sel) and re-initialises the CRC to all ones for the next frame;
// fcs_last marks the clock the last FCS bit leaves. bit_out is the current
// bit of whichever register is being sent. crc_init (all ones) is driven by
// the controller when no frame is in progress. crc_sel must stay constant
// during a frame. Register names follow the original specification; the counter and the
// single bit-count shared by data and FCS are this design's choice.
module hdlc_tx_buffer_crc
  import hdlc_pkg::*;
#(
  parameter logic [15:0] POLY16 = POLY16_DEFAULT,
  parameter logic [31:0] POLY32 = POLY32_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       crc_sel,
  input  logic       txload,
  input  logic [7:0] data_in,
  input  logic       eof_in,
  input  logic       load_data,
  input  logic       crc_send,
  input  logic       crc_init,
  input  logic       shift_en,
  output logic       bit_out,
  output logic       byte_done,
  output logic       fcs_last,
  output logic       reg_eof
);
  logic [7:0]  reg_in;
  logic [7:0]  latch_buf;
  logic [31:0] crc, crc_nxt, fcs_sh;
  logic        fcs_phase;
  logic [4:0]  cnt;

  hdlc_crc_par #(.POLY16(POLY16), .POLY32(POLY32)) u_crc (
    .crc_in(crc), .data(reg_in), .crc_sel(crc_sel), .crc_out(crc_nxt));

  always_comb begin
    bit_out   = fcs_phase ? fcs_sh[0] : latch_buf[0];
    byte_done = shift_en && !fcs_phase && (cnt == 5'd7);
    fcs_last  = shift_en &&  fcs_phase && (cnt == (crc_sel ? 5'd31 : 5'd15));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_in    <= '0;
      reg_eof   <= 1'b0;
      latch_buf <= '0;
      crc       <= '1;
      fcs_sh    <= '0;
      fcs_phase <= 1'b0;
      cnt       <= '0;
    end else begin
      if (txload) begin
        reg_in  <= data_in;
        reg_eof <= eof_in;
      end
      if (load_data) begin
        latch_buf <= reg_in;
        crc       <= crc_nxt;
        fcs_phase <= 1'b0;
        cnt       <= '0;
      end else if (crc_send) begin
        fcs_sh    <= ~crc;
        crc       <= '1;
        fcs_phase <= 1'b1;
        cnt       <= '0;
      end else begin
        if (crc_init) crc <= '1;
        if (shift_en) begin
          if (fcs_phase) fcs_sh    <= fcs_sh >> 1;
          else           latch_buf <= latch_buf >> 1;
          cnt <= cnt + 5'd1;
        end
      end
    end
  end
endmodule
