// tb_hdlc_rx: end-to-end test of the receiver. A line of idle 1s, flags
// and frames built by the reference framer (good, CRC error, octet error
// and aborted frames, CRC-16 and CRC-32, shared and repeated flags) is
// sent one bit per clock. Checks per frame: the bytes delivered (FCS
// included), sop on the first and eop on the last byte, and the status
// byte (0x00, 0x01, 0x02 or 0x04) with rx_status_valid eight clocks after
// eop; for an aborted frame the bytes delivered must be a prefix of it.
module tb_hdlc_rx;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1, rxdata = 1, crc_sel = 0;
  logic [7:0] rx_data_out;
  logic rx_data_valid, rx_status_valid, sop, eop, length_packet;
  rx_state_t rx_state;
  int checks = 0, failures = 0, cyc = 0, eop_t = 0;

  byte_q_t    got;
  logic       got_sop[$], got_eop[$];
  logic [7:0] status[$];
  int         gap[$];

  hdlc_rx dut (.rxclk(clk), .rxreset(rst), .*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rx_data_valid && rx_status_valid) begin status.push_back(rx_data_out); gap.push_back(cyc - eop_t); end
    else if (rx_data_valid) begin
      got.push_back(rx_data_out); got_sop.push_back(sop); got_eop.push_back(eop);
      if (eop) eop_t = cyc;
    end
  end

  task automatic chk(input string what, input int g, e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic sel, input int kind, input int nflags);
    byte_q_t m, w;
    bit_q_t s, line;
    crc_sel = sel;
    for (int i = 0; i < 1 + $urandom % 10; i++) m.push_back(($urandom % 2) ? 8'hFF : 8'($urandom));
    s = frame_bits(m, sel, kind, w);
    for (int i = 0; i < nflags; i++) push_byte(line, 8'h7E);
    foreach (s[k]) line.push_back(s[k]);
    if (kind != 3) push_byte(line, 8'h7E);
    got = {}; got_sop = {}; got_eop = {}; status = {}; gap = {};
    foreach (line[k]) begin rxdata = line[k]; @(posedge clk); #1; end
    // the closing flag may open the next frame: keep flags going while
    // the status comes out
    for (int i = 0; i < 24; i++) begin rxdata = 8'h7E >> (i % 8); @(posedge clk); #1; end
    chk("one status", status.size(), 1);
    if (kind == 3) begin
      if (status.size() == 1) chk("abort status", status[0], 8'h04);
      checks++;
      if (got.size() >= w.size()) begin failures++; $display("FAIL aborted frame delivered whole"); end
      foreach (got[k]) chk("aborted prefix", got[k], w[k]);
    end else begin
      chk("bytes", got.size(), w.size());
      if (status.size() == 1) begin
        chk("status", status[0], kind);
        chk("status 8 clocks after eop", gap[0], 8);
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
    repeat (16) @(posedge clk);
    for (int t = 0; t < 24; t++) one(t[0], (t / 2) % 3, 1 + (t % 3));
    // aborts: the line goes idle afterwards and needs a fresh flag
    for (int t = 0; t < 4; t++) begin
      one(t[0], 3, 1);
      for (int i = 0; i < 10; i++) begin rxdata = 1; @(posedge clk); #1; end
      chk("idle after abort", rx_state, RX_IDLE);
    end
    one(1'b0, 0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
