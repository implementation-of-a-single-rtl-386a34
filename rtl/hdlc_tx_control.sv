// hdlc_tx_control: transmit finite state machine (transmitter unit U1).
//
// States: TX_READY (after reset or an abort; idle 1s on the line),
// TX_SYNCHRO (flags), TX_DATA (data bytes), TX_SEND_CRC (last byte, then
// the FCS) and TX_ABORT (one abort sequence). A one-clock tx_start pulse
// requests a frame. In TX_SYNCHRO, at the first bit of a flag
// (start_flag) the controller pulses txload to fetch the first byte; at
// the flag's last bit it pulses load_data to move that byte into the
// Latch_Buffer, and data follows the flag with no gap. Each time a byte's
// last bit leaves (byte_done) the next byte is loaded and txload is pulsed
// one clock later to refill Reg_in. When the byte loaded carries
// TxEndOfile the FSM enters TX_SEND_CRC; when that byte is out, crc_send
// loads the FCS, and when the FCS is out (plus a stuffed 0 if its last
// five bits were 1s) fcs_sent returns the FSM to TX_SYNCHRO for the
// closing flag. A frame requested meanwhile starts after that one flag
// (shared flag); otherwise flags fill the line. tx_abort from TX_SYNCHRO,
// TX_DATA or TX_SEND_CRC sends the abort sequence, then end_abort leads
// back to TX_READY. The state names and handshakes follow the original
// specification; the pending/refill bookkeeping is this design's own.
// The host must present the next byte on the data bus whenever txload
// is pulsed (show-ahead FIFO).
module hdlc_tx_control
  import hdlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      tx_start,
  input  logic      tx_abort,
  input  logic      start_flag,
  input  logic      flag_last,
  input  logic      end_abort,
  input  logic      byte_done,
  input  logic      fcs_last,
  input  logic      stuff_next,
  input  logic      stop_reading,
  input  logic      reg_eof,
  output tx_state_t state,
  output flaggen_t  flaggen,
  output logic      txload,
  output logic      load_data,
  output logic      crc_send,
  output logic      crc_init,
  output logic      zi_enable,
  output logic      shift_en,
  output logic      fcs_sent
);
  logic pending;   // a frame has been requested but not started
  logic have_byte; // Reg_in holds the first byte of the next frame
  logic refill;    // pulse txload this clock to refill Reg_in
  logic tail;      // FCS out, waiting for the last stuffed 0
  logic abort_ok;

  always_comb begin
    unique case (state)
      TX_READY:    flaggen = FG_IDLE;
      TX_SYNCHRO:  flaggen = FG_FLAG;
      TX_ABORT:    flaggen = FG_ABORT;
      default:     flaggen = FG_DATA;
    endcase
    zi_enable = (state == TX_DATA) || (state == TX_SEND_CRC);
    shift_en  = zi_enable && !stop_reading && !tail;
    load_data = ((state == TX_SYNCHRO) && flag_last && have_byte) ||
                ((state == TX_DATA) && byte_done);
    crc_send  = (state == TX_SEND_CRC) && byte_done;
    fcs_sent  = (state == TX_SEND_CRC) &&
                ((fcs_last && !stuff_next) || (tail && stop_reading));
    txload    = ((state == TX_SYNCHRO) && start_flag && pending && !have_byte) || refill;
    crc_init  = (state == TX_READY) || (state == TX_ABORT);
    abort_ok  = tx_abort && ((state == TX_SYNCHRO) || (state == TX_DATA) ||
                             (state == TX_SEND_CRC));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= TX_READY;
      pending   <= 1'b0;
      have_byte <= 1'b0;
      refill    <= 1'b0;
      tail      <= 1'b0;
    end else if (abort_ok) begin
      state     <= TX_ABORT;
      pending   <= 1'b0;
      have_byte <= 1'b0;
      refill    <= 1'b0;
      tail      <= 1'b0;
    end else begin
      refill <= 1'b0;
      if (tx_start && state != TX_ABORT) pending <= 1'b1;
      unique case (state)
        TX_READY: if (tx_start) state <= TX_SYNCHRO;
        TX_SYNCHRO: begin
          if (txload) begin
            have_byte <= 1'b1;
            pending   <= tx_start;
          end
          if (load_data) begin
            have_byte <= 1'b0;
            refill    <= !reg_eof;
            state     <= reg_eof ? TX_SEND_CRC : TX_DATA;
          end
        end
        TX_DATA: if (load_data) begin
          refill <= !reg_eof;
          if (reg_eof) state <= TX_SEND_CRC;
        end
        TX_SEND_CRC: begin
          if (fcs_last && stuff_next) tail <= 1'b1;
          if (fcs_sent) begin
            tail  <= 1'b0;
            state <= TX_SYNCHRO;
          end
        end
        TX_ABORT: if (end_abort) state <= TX_READY;
        default:  state <= TX_READY;
      endcase
    end
  end

  // Data and FCS bits only move while the zero inserter is enabled.
  assert property (@(posedge clk) disable iff (rst) shift_en |-> zi_enable);
  // The two buffer commands never coincide.
  assert property (@(posedge clk) disable iff (rst) !(load_data && crc_send));
endmodule
