// hdlc_tx_zero_insert: transmit zero insertion (bit stuffing, unit U3).
//
// A 5-bit shift register holds the last five bits sent. When all five are
// 1, the next bit out is a forced 0 and stop_reading is raised for that
// clock so the serializer and FCS shifter hold their bit instead of losing
// it. The inserted 0 enters the history, so the count restarts. bit_out
// and stop_reading are combinational from the history and bit_in;
// stuff_next tells the controller that the bit now being sent is the fifth
// 1, so a 0 must still follow before a closing flag may start. While
// enable is low (flags, idle, abort) the history is cleared. Follows the
// original specification: a 0 after five consecutive 1s, made with shift
// registers.
module hdlc_tx_zero_insert (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic bit_in,
  output logic bit_out,
  output logic stop_reading,
  output logic stuff_next
);
  logic [4:0] hist;

  always_comb begin
    stop_reading = enable && (&hist);
    bit_out      = stop_reading ? 1'b0 : bit_in;
    stuff_next   = enable && !stop_reading && bit_in && (&hist[3:0]);
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) hist <= '0;
    else                hist <= {hist[3:0], bit_out};
  end
endmodule
