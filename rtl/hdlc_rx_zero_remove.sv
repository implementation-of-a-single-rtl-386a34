// hdlc_rx_zero_remove: receive zero deletion (bit unstuffing).
//
// A counter of consecutive 1s, saturating at 5, and a comparator: a 0
// that arrives when the counter is at 5 is the stuffed 0 and is dropped
// (out_valid low); every other bit passes through unchanged on the same
// clock. Any 0 clears the counter; clear (start of frame) resets it. A
// sixth 1 cannot occur inside a frame (it would be part of a flag or an
// abort, both caught upstream), so the saturating count is this design's
// reading of the counter-and-comparator mechanism of the original specification.
module hdlc_rx_zero_remove (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic out_valid,
  output logic out_bit
);
  logic [2:0] ones;
  logic       drop;

  always_comb begin
    drop      = bit_valid && !bit_in && (ones == 3'd5);
    out_valid = bit_valid && !drop;
    out_bit   = bit_in;
  end

  always_ff @(posedge clk) begin
    if (rst || clear)     ones <= '0;
    else if (bit_valid) begin
      if (!bit_in)            ones <= '0;
      else if (ones != 3'd5)  ones <= ones + 3'd1;
    end
  end
endmodule
