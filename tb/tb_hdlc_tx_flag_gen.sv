// tb_hdlc_tx_flag_gen: drives each FLAGGEN mode and checks the line output
// one clock later: idle gives 1s, flag mode repeats 0,1,1,1,1,1,1,0 with
// start_flag on the first and flag_last on the last bit of each flag,
// abort gives 0 then seven 1s with end_abort on the last bit, and data
// mode passes the data bit.
module tb_hdlc_tx_flag_gen;
  import hdlc_pkg::*;
  logic clk = 0, rst = 1;
  flaggen_t flaggen;
  logic data_bit, txdata, start_flag, flag_last, end_abort;
  int checks = 0, failures = 0;

  hdlc_tx_flag_gen dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input logic got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pat;
    flaggen = FG_IDLE; data_bit = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1 chk("reset idle", txdata, 1'b1);
    for (int i = 0; i < 10; i++) begin @(posedge clk); #1 chk("idle", txdata, 1'b1); end
    // flags, three in a row
    flaggen = FG_FLAG;
    pat = 8'b0111_1110;
    for (int f = 0; f < 3; f++) for (int i = 0; i < 8; i++) begin
      #1 chk("start_flag", start_flag, i == 0);
      chk("flag_last", flag_last, i == 7);
      @(posedge clk); #1 chk("flag bit", txdata, pat[i]);
    end
    // abort
    flaggen = FG_ABORT;
    for (int i = 0; i < 8; i++) begin
      #1 chk("end_abort", end_abort, i == 7);
      chk("no start_flag in abort", start_flag, 1'b0);
      @(posedge clk); #1 chk("abort bit", txdata, i != 0);
    end
    // data
    flaggen = FG_DATA;
    for (int i = 0; i < 40; i++) begin
      logic b;
      b = 1'($urandom);
      data_bit = b;
      @(posedge clk); #1 chk("data bit", txdata, b);
    end
    // flag restarts at its first bit after data
    flaggen = FG_FLAG;
    #1 chk("start_flag after data", start_flag, 1'b1);
    @(posedge clk); #1 chk("first flag bit", txdata, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
