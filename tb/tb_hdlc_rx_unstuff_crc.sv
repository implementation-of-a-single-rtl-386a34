// tb_hdlc_rx_unstuff_crc: drives the byte/CRC unit directly with
// frame_start, stuffed frame bits (random idle clocks in between) and
// frame_end on the last bit, as the flag detector does. Checks the bytes
// delivered (FCS included) with sop on the first and eop on the last, the
// status byte eight clocks after eop: 0x00 for a good frame, 0x01 for a
// corrupted byte, 0x02 for three extra bits, for CRC-16 and CRC-32; and
// for an abort, the bytes before the last one, then status 0x04.
module tb_hdlc_rx_unstuff_crc;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1, crc_sel = 0;
  logic frame_start = 0, frame_end = 0, abort_det = 0, bit_valid = 0, bit_in = 0;
  logic [7:0] rx_data_out;
  logic rx_data_valid, rx_status_valid, sop, eop;
  int checks = 0, failures = 0;

  byte_q_t got;
  logic    got_sop[$], got_eop[$];
  logic [7:0] status[$];
  int      eop_t, status_gap[$], cyc = 0;

  hdlc_rx_unstuff_crc dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rx_data_valid && rx_status_valid) begin
      status.push_back(rx_data_out);
      status_gap.push_back(cyc - eop_t);
    end else if (rx_data_valid) begin
      got.push_back(rx_data_out); got_sop.push_back(sop); got_eop.push_back(eop);
      if (eop) eop_t = cyc;
    end
  end

  task automatic chk(input string what, input int g, e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 good, 1 crc error, 2 octet error, 3 abort
  task automatic frame(input logic sel, input int kind);
    byte_q_t m, w;
    bit_q_t s;
    int nb;
    crc_sel = sel;
    nb = 2 + $urandom % 10;
    for (int i = 0; i < nb; i++) m.push_back(($urandom % 2) ? 8'hFF : 8'($urandom));
    w = with_fcs(m, sel);
    if (kind == 1) w[0] = w[0] ^ 8'h10;
    s = stuff(w);
    if (kind == 2) begin s.push_back(0); s.push_back(1); s.push_back(0); end
    got = {}; got_sop = {}; got_eop = {}; status = {}; status_gap = {};
    frame_start = 1; @(posedge clk); #1 frame_start = 0;
    foreach (s[k]) begin
      while ($urandom % 5 == 0) begin bit_valid = 0; @(posedge clk); #1; end
      bit_valid = 1; bit_in = s[k];
      frame_end = (kind != 3) && (k == s.size() - 1);
      @(posedge clk); #1;
    end
    bit_valid = 0; frame_end = 0;
    if (kind == 3) begin abort_det = 1; @(posedge clk); #1 abort_det = 0; end
    repeat (12) @(posedge clk);
    #1;
    chk("one status", status.size(), 1);
    if (kind == 3) begin
      chk("bytes before abort", got.size(), w.size() - 1);
      if (status.size() == 1) chk("abort status", status[0], 8'h04);
    end else begin
      chk("bytes", got.size(), w.size());
      if (status.size() == 1) begin
        chk("status", status[0], kind == 0 ? 0 : kind == 1 ? 1 : 2);
        chk("status 8 clocks after eop", status_gap[0], 8);
      end
      foreach (got[k]) if (k < w.size()) begin
        chk("byte", got[k], w[k]);
        chk("sop", got_sop[k], k == 0);
        chk("eop", got_eop[k], k == w.size() - 1);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 8; t++) for (int kind = 0; kind < 4; kind++) frame(t[0], kind);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
