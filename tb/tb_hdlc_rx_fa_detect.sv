// tb_hdlc_rx_fa_detect: sends a line made of idle 1s, runs of flags and
// frames (some sharing a flag, some aborted) and checks that the bits the
// detector passes on between frame_start and frame_end are exactly each
// frame's stuffed bits, that frame_end comes with the last of them, that
// each aborted frame gives one abort_det and no frame_end, that idle 1s
// return the FSM to RX_IDLE and that flags alone start no frame.
module tb_hdlc_rx_fa_detect;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1, rxdata = 1;
  rx_state_t state;
  logic length_packet, bit_valid, bit_out, frame_start, frame_end, abort_det;
  int checks = 0, failures = 0;
  int n_start = 0, n_end = 0, n_abort = 0;
  bit_q_t cur, frames_got[$];
  logic in_fr = 0;

  hdlc_rx_fa_detect dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (frame_start) begin n_start++; cur = {}; in_fr = 1; end
    if (bit_valid) cur.push_back(bit_out);
    if (frame_end) begin n_end++; frames_got.push_back(cur); in_fr = 0; end
    if (abort_det) begin n_abort++; in_fr = 0; end
  end

  task automatic chk(input string what, input int g, e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic send(input bit_q_t q);
    foreach (q[k]) begin rxdata = q[k]; @(posedge clk); #1; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_q_t line, flag, exp_fr[$];
    int n_good, n_ab;
    byte_q_t w;
    push_byte(flag, 8'h7E);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 20; i++) line.push_back(1);
    for (int i = 0; i < 3; i++) foreach (flag[k]) line.push_back(flag[k]);
    n_good = 0; n_ab = 0;
    for (int f = 0; f < 16; f++) begin
      byte_q_t m;
      bit_q_t s;
      int kind;
      kind = (f % 4 == 3) ? 3 : 0;
      for (int i = 0; i < 1 + $urandom % 8; i++) m.push_back(($urandom % 2) ? 8'hFF : 8'($urandom));
      s = frame_bits(m, f[1], kind, w);
      foreach (s[k]) line.push_back(s[k]);
      if (kind == 3) begin
        n_ab++;
        foreach (flag[k]) line.push_back(flag[k]);
      end else begin
        n_good++;
        exp_fr.push_back(s);
        // closing flag; every other frame gets an extra flag in between
        foreach (flag[k]) line.push_back(flag[k]);
        if (f % 2 == 0) foreach (flag[k]) line.push_back(flag[k]);
      end
    end
    send(line);
    for (int i = 0; i < 12; i++) begin rxdata = 1; @(posedge clk); #1; end
    chk("state idle after 1s", state, RX_IDLE);
    repeat (4) @(posedge clk);
    chk("frame_end count", n_end, n_good);
    chk("abort count", n_abort, n_ab);
    chk("frame_start count", n_start, n_good + n_ab);
    foreach (frames_got[f]) if (f < exp_fr.size()) begin
      int bad;
      bad = 0;
      chk("frame bit count", frames_got[f].size(), exp_fr[f].size());
      if (frames_got[f].size() == exp_fr[f].size())
        foreach (exp_fr[f][k]) if (frames_got[f][k] !== exp_fr[f][k]) bad++;
      chk("frame bits", bad, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
