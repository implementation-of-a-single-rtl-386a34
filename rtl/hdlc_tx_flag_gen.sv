// hdlc_tx_flag_gen: Idle, Flag and Abort sequence generator and TxData
// output multiplexer (transmitter unit U4).
//
// The FLAGGEN select from the transmit controller chooses what goes on the
// line: continuous 1s (idle), repeated flags 0x7E, one abort sequence 0xFE,
// or the bit stream coming out of the zero-insertion unit. Sequences are
// sent LSB first from a 3-bit bit counter that indexes the pattern; the
// counter is held at 0 in idle and data modes, so every flag or abort
// starts at its first bit. start_flag marks the first bit of each flag
// (it tells the controller to fetch the first byte from the FIFO),
// flag_last its last bit, end_abort the last bit of the abort sequence.
// TxData is registered: it shows the selected bit one clock after the
// select and data_bit are presented. The sequences and the signal names
// follow the original specification; the counter form is this design's own.
module hdlc_tx_flag_gen
  import hdlc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,        // synchronous, active high
  input  flaggen_t flaggen,
  input  logic     data_bit,   // from the zero-insertion unit
  output logic     txdata,
  output logic     start_flag,
  output logic     flag_last,
  output logic     end_abort
);
  logic [2:0] cnt;
  logic       seq_mode;
  logic       next_bit;

  always_comb begin
    seq_mode   = (flaggen == FG_FLAG) || (flaggen == FG_ABORT);
    start_flag = (flaggen == FG_FLAG)  && (cnt == 3'd0);
    flag_last  = (flaggen == FG_FLAG)  && (cnt == 3'd7);
    end_abort  = (flaggen == FG_ABORT) && (cnt == 3'd7);
    unique case (flaggen)
      FG_IDLE:  next_bit = 1'b1;
      FG_FLAG:  next_bit = FLAG_SEQ[cnt];
      FG_ABORT: next_bit = ABORT_SEQ[cnt];
      FG_DATA:  next_bit = data_bit;
      default:  next_bit = 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      txdata <= 1'b1;
    end else begin
      cnt    <= seq_mode ? cnt + 3'd1 : 3'd0;
      txdata <= next_bit;
    end
  end
endmodule
