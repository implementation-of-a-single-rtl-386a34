// tb_hdlc_rx_zero_remove: stuffs random bytes (rich in 1s) with the
// reference stuffer, feeds the stuffed bits with random idle clocks in
// between, and checks that the bits passed on are exactly the original
// bits, that one bit is dropped per inserted 0 and that clear resets the
// run of 1s.
module tb_hdlc_rx_zero_remove;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1, clear = 0, bit_valid = 0, bit_in = 0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0, drops = 0;

  hdlc_rx_zero_remove dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_q_t d;
    bit_q_t s, src, got;
    for (int i = 0; i < 300; i++) d.push_back(($urandom % 3 == 0) ? 8'($urandom) : 8'hFF ^ 8'(1 << ($urandom % 16)));
    foreach (d[k]) for (int i = 0; i < 8; i++) src.push_back(d[k][i]);
    s = stuff(d);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (s[k]) begin
      while ($urandom % 4 == 0) begin bit_valid = 0; @(posedge clk); #1; end
      bit_valid = 1; bit_in = s[k];
      #1;
      if (out_valid) got.push_back(out_bit); else drops++;
      @(posedge clk); #1;
    end
    bit_valid = 0;
    checks++;
    if (got.size() != src.size()) begin failures++; $display("FAIL length %0d vs %0d", got.size(), src.size()); end
    else begin
      int bad;
      bad = 0;
      foreach (src[k]) begin
        checks++;
        if (got[k] !== src[k]) begin
          failures++;
          if (bad++ == 0) $display("FAIL first wrong bit %0d", k);
        end
      end
    end
    checks++;
    if (drops != stuffed_zeros(d)) begin failures++; $display("FAIL drops %0d", drops); end
    // five 1s, clear, then a 0 must pass
    for (int i = 0; i < 5; i++) begin bit_valid = 1; bit_in = 1; @(posedge clk); #1; end
    bit_valid = 0; clear = 1; @(posedge clk); #1 clear = 0;
    bit_valid = 1; bit_in = 0; #1;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL clear did not reset the count"); end
    @(posedge clk); #1;
    for (int i = 0; i < 5; i++) begin bit_valid = 1; bit_in = 1; @(posedge clk); #1; end
    bit_in = 0; #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL 0 after five 1s not dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
