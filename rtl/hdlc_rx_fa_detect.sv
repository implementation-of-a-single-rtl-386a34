// hdlc_rx_fa_detect: receive flag/abort/idle detector and frame FSM
// (receiver unit U1).
//
// Every rxclk the line bit enters the 8-bit Reg_buffer (LSB first: the
// newest bit goes in at bit 7). A flag is seen when the register holds
// 0x7E; an abort when its newest seven bits are all 1. The register doubles
// as an 8-bit delay line: the bit that leaves it is passed on to the
// unstuffing unit, so by the time a closing flag is recognised every frame
// bit, and no flag bit, has been passed on.
// FSM (rx_state_t): RX_IDLE until a flag; RX_SYNCHRO after a flag, where
// another flag keeps it waiting, seven 1s (abort or idle line) send it back
// to RX_IDLE, and eight bits that are not a flag make the last flag an
// opening flag and start RX_RECEIVING (frame_start). In RX_RECEIVING each
// leaving bit is passed on with bit_valid; a flag ends the frame
// (frame_end, same clock as the frame's last bit) and returns to
// RX_SYNCHRO, so a closing flag may open the next frame; seven 1s go to
// RX_ABORT for one clock (abort_det) and then to RX_IDLE. All outputs are
// registered, one clock after the line bit that caused them.
// length_packet is high while a frame is being received. The detection
// rules and states follow the original specification; the delay-line use of
// Reg_buffer and the 8-bit wait in RX_SYNCHRO are this design's reading.
module hdlc_rx_fa_detect
  import hdlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      rxdata,
  output rx_state_t state,
  output logic      length_packet,
  output logic      bit_valid,
  output logic      bit_out,
  output logic      frame_start,
  output logic      frame_end,
  output logic      abort_det
);
  logic [7:0] sr, new_sr;
  logic [2:0] cnt;
  logic       flag_now, ones7;

  always_comb begin
    new_sr   = {rxdata, sr[7:1]};
    flag_now = (new_sr == FLAG_SEQ);
    ones7    = &new_sr[7:1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sr          <= '1;
      cnt         <= '0;
      state       <= RX_IDLE;
      bit_valid   <= 1'b0;
      bit_out     <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      abort_det   <= 1'b0;
    end else begin
      sr          <= new_sr;
      bit_valid   <= 1'b0;
      bit_out     <= sr[0];
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      abort_det   <= 1'b0;
      unique case (state)
        RX_IDLE: if (flag_now) begin
          state <= RX_SYNCHRO;
          cnt   <= '0;
        end
        RX_SYNCHRO: begin
          if (flag_now)          cnt <= '0;
          else if (ones7)        state <= RX_IDLE;
          else if (cnt == 3'd7) begin
            state       <= RX_RECEIVING;
            frame_start <= 1'b1;
          end else               cnt <= cnt + 3'd1;
        end
        RX_RECEIVING: begin
          if (ones7) begin
            state     <= RX_ABORT;
            abort_det <= 1'b1;
          end else begin
            bit_valid <= 1'b1;
            if (flag_now) begin
              state     <= RX_SYNCHRO;
              cnt       <= '0;
              frame_end <= 1'b1;
            end
          end
        end
        RX_ABORT: state <= RX_IDLE;
        default:  state <= RX_IDLE;
      endcase
    end
  end

  assign length_packet = (state == RX_RECEIVING);
endmodule
