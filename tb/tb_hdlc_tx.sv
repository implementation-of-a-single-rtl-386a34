// tb_hdlc_tx: end-to-end test of the transmitter. A show-ahead FIFO model
// holds the frames' bytes and advances on each tx_load. Frames are started
// with a one-clock tx_start, the next one requested while the current one
// is still being sent so frames share a flag. The line output is recorded
// and parsed by the reference deframer; the frames must come back with the
// reference FCS appended, for CRC-16 and CRC-32, with no odd-length frame.
// The opening flag must begin right after tx_start and every bit between
// the flags must be back-to-back (the bit count is checked against the
// reference stuffing). An abort mid-frame must put seven 1s on the line
// and return the transmitter to idle 1s.
module tb_hdlc_tx;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic tx_start = 0, tx_abort = 0, crc_sel = 0;
  logic [7:0] tx_data_in;
  logic tx_end_of_file, tx_load, txdata;
  tx_state_t tx_state;
  int checks = 0, failures = 0;

  byte_q_t fifo;
  int      eof_at[$];   // indices of last bytes
  int      rd = 0;
  bit_q_t  line;
  logic    rec = 0;

  hdlc_tx dut (.txclk(clk), .txreset(rst), .*);
  always #5 clk = ~clk;

  assign tx_data_in     = (rd < fifo.size()) ? fifo[rd] : 8'h00;
  always_comb begin
    tx_end_of_file = 0;
    foreach (eof_at[k]) if (eof_at[k] == rd) tx_end_of_file = 1;
  end
  always @(posedge clk) begin
    if (tx_load) rd <= rd + 1;
    if (rec) line.push_back(txdata);
  end

  task automatic chk(input string what, input int got, exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frames(input logic sel, input int nframes);
    byte_q_t frames[$];
    byte_q_t exp, got;
    int lens[$], aborts, odd, base;
    crc_sel = sel;
    fifo = {}; eof_at = {}; line = {};
    @(posedge clk); #1 rd = 0;
    for (int f = 0; f < nframes; f++) begin
      byte_q_t m;
      for (int i = 0; i < 1 + ($urandom % 12); i++)
        m.push_back(($urandom % 2) ? 8'hFF : 8'($urandom));
      frames.push_back(m);
      foreach (m[k]) fifo.push_back(m[k]);
      eof_at.push_back(fifo.size() - 1);
    end
    rec = 1;
    base = 0;
    for (int f = 0; f < nframes; f++) begin
      tx_start = 1; @(posedge clk); #1 tx_start = 0;
      base += frames[f].size();
      // request the next frame while this one is on the line
      while (rd < base) @(posedge clk);
      #1;
    end
    wait (tx_state == TX_SYNCHRO && rd == fifo.size());
    repeat (40) @(posedge clk);
    rec = 0;
    deframe(line, got, lens, aborts, odd);
    foreach (frames[f]) begin
      byte_q_t w;
      w = with_fcs(frames[f], sel);
      foreach (w[k]) exp.push_back(w[k]);
    end
    chk("frames seen", lens.size(), nframes);
    chk("bytes seen", got.size(), exp.size());
    chk("aborts", aborts, 0);
    chk("odd frames", odd, 0);
    if (got.size() == exp.size()) begin
      int bad;
      bad = 0;
      foreach (exp[k]) if (got[k] !== exp[k]) bad++;
      chk("byte mismatches", bad, 0);
    end
  endtask

  initial begin
    bit_q_t exp_line;
    byte_q_t m;
    int start_t, n;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (10) begin @(posedge clk); #1 chk("idle ones after reset", txdata, 1); end
    // single frame: exact line bits and timing
    m = {8'hFE, 8'h02};
    fifo = m; eof_at = {1}; rd = 0; line = {};
    rec = 1;
    tx_start = 1; @(posedge clk); #1 tx_start = 0;
    repeat (8 + 40 + 8 + 4) @(posedge clk);
    rec = 0;
    exp_line = {};
    push_byte(exp_line, 8'h7E);
    begin bit_q_t s; s = stuff(with_fcs(m, 1'b0)); foreach (s[k]) exp_line.push_back(s[k]); end
    push_byte(exp_line, 8'h7E);
    // line[0] is the bit shown in the clock after tx_start's edge
    n = 0;
    foreach (exp_line[k]) if (line[k + 2] !== exp_line[k]) n++;
    chk("exact line bits of one frame (FE 02, CRC-16)", n, 0);
    chk("tx state after frame", tx_state, TX_SYNCHRO);
    // many frames, both CRC sizes
    run_frames(1'b0, 12);
    run_frames(1'b1, 12);
    // abort during data
    fifo = {}; eof_at = {}; line = {};
    for (int i = 0; i < 20; i++) fifo.push_back(8'($urandom));
    eof_at = {19};
    @(posedge clk); #1 rd = 0;
    rec = 1;
    tx_start = 1; @(posedge clk); #1 tx_start = 0;
    repeat (60) @(posedge clk);
    #1 tx_abort = 1; @(posedge clk); #1 tx_abort = 0;
    chk("abort state", tx_state, TX_ABORT);
    repeat (8) @(posedge clk);
    #1 chk("ready after abort", tx_state, TX_READY);
    repeat (20) @(posedge clk);
    rec = 0;
    begin
      int run, maxrun;
      run = 0; maxrun = 0;
      foreach (line[k]) begin run = line[k] ? run + 1 : 0; if (run > maxrun) maxrun = run; end
      checks++;
      if (maxrun < 7) begin failures++; $display("FAIL no abort on the line"); end
      checks++;
      if (line[line.size()-1] !== 1'b1) begin failures++; $display("FAIL not idle after abort"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
