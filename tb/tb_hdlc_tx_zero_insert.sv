// tb_hdlc_tx_zero_insert: feeds random bits (biased towards 1s so long runs
// occur) to the zero inserter, holding the input bit while stop_reading is
// high as the serializer does, and checks the output stream against the
// reference stuffing of hdlc_tb_pkg. Also checks that stuff_next
// announces each insertion one clock ahead and that enable low clears the
// history.
module tb_hdlc_tx_zero_insert;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1, enable = 0, bit_in = 0;
  logic bit_out, stop_reading, stuff_next;
  int checks = 0, failures = 0, stalls = 0;

  hdlc_tx_zero_insert dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_q_t d;
    bit_q_t src, exp, got;
    int idx;
    logic prev_stuff_next;
    for (int i = 0; i < 200; i++) d.push_back(($urandom % 3 == 0) ? 8'($urandom) : 8'hFF ^ 8'(1 << ($urandom % 16)));
    foreach (d[k]) for (int i = 0; i < 8; i++) src.push_back(d[k][i]);
    exp = stuff(d);
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1 enable = 1; idx = 0; prev_stuff_next = 0;
    while (idx < src.size()) begin
      bit_in = src[idx];
      #1;
      got.push_back(bit_out);
      checks++;
      if (stop_reading !== prev_stuff_next) begin
        failures++; $display("FAIL stuff_next did not announce stop_reading at bit %0d", idx);
      end
      prev_stuff_next = stuff_next;
      if (stop_reading) stalls++; else idx++;
      @(posedge clk); #1;
    end
    // a stuffed 0 may still be owed after the last source bit
    #1;
    if (stop_reading) begin got.push_back(bit_out); @(posedge clk); #1; end
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL length %0d vs %0d", got.size(), exp.size()); end
    else foreach (exp[k]) if (got[k] !== exp[k]) begin failures++; $display("FAIL bit %0d", k); break; end
    checks++;
    if (stalls != stuffed_zeros(d)) begin failures++; $display("FAIL stalls %0d vs %0d", stalls, stuffed_zeros(d)); end
    // disable clears the history: four 1s, disable, then 1s again
    enable = 0; @(posedge clk); #1;
    enable = 1; bit_in = 1;
    for (int i = 0; i < 4; i++) begin @(posedge clk); #1; end
    enable = 0; @(posedge clk); #1;
    enable = 1;
    for (int i = 0; i < 5; i++) begin
      #1 checks++;
      if (stop_reading) begin failures++; $display("FAIL history not cleared"); end
      @(posedge clk); #1;
    end
    #1 checks++;
    if (!stop_reading || bit_out) begin failures++; $display("FAIL no 0 after five 1s"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
