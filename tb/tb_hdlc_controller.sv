// tb_hdlc_controller: end-to-end loopback of the full controller at its
// default parameters. The transmitter's line output feeds the receiver
// through a channel model (one clock of delay) that can flip a bit or
// insert extra bits. A host model keeps a show-ahead FIFO of frames and
// pulses tx_start; a second host model collects received bytes and status.
// Frames run back to back (one shared flag) and with flag fill between
// them, with CRC-16 and CRC-32; then a frame with a flipped line bit, one
// with three extra line bits, one aborted by tx_abort, and a good frame
// after the abort. Every good frame must come back byte for byte (FCS
// included) with status 0x00; the damaged ones with the CRC-error,
// octet-error and abort status bits. Each mechanism (zero insertion with
// its stall, zero deletion, shared flag, flag fill, both CRC sizes, CRC
// error, octet error, abort sent and detected, abort between frames
// returning the receiver to idle) is counted and must occur at least once.
module tb_hdlc_controller;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic crc_sel = 0, tx_start = 0, tx_abort = 0;
  logic [7:0] tx_data_in;
  logic tx_end_of_file, tx_load, txdata;
  tx_state_t tx_state;
  logic rxdata;
  logic [7:0] rx_data_out;
  logic rx_data_valid, rx_status_valid, rx_sop, rx_eop, rx_length_packet;
  rx_state_t rx_state;
  int checks = 0, failures = 0;

  hdlc_controller dut (.txclk(clk), .txreset(rst), .rxclk(clk), .rxreset(rst), .*);
  always #5 clk = ~clk;

  // transmit host: show-ahead FIFO
  byte_q_t fifo;
  int eof_at[$];
  int rd = 0;
  assign tx_data_in = (rd < fifo.size()) ? fifo[rd] : 8'h00;
  always_comb begin
    tx_end_of_file = 0;
    foreach (eof_at[k]) if (eof_at[k] == rd) tx_end_of_file = 1;
  end
  always @(posedge clk) if (tx_load) rd <= rd + 1;

  // channel
  bit_q_t ch;
  int flip_req = 0, insert_req = 0;
  logic prev_tx = 0;
  initial rxdata = 1;
  always @(posedge clk) begin
    logic b;
    b = txdata;
    if (flip_req > 0 && tx_state == TX_DATA && b && !prev_tx) begin b = 0; flip_req--; end
    ch.push_back(b);
    if (insert_req > 0 && tx_state == TX_DATA) begin
      repeat (3) ch.push_back(1'b0);
      insert_req--;
    end
    prev_tx <= txdata;
    rxdata <= ch.pop_front();
  end

  // receive host
  byte_q_t    rx_frames[$];
  logic [7:0] rx_status[$];
  byte_q_t    cur;
  int         n_sop = 0, n_eop = 0;
  always @(posedge clk) if (!rst && rx_data_valid) begin
    if (rx_status_valid) begin
      rx_status.push_back(rx_data_out);
      rx_frames.push_back(cur);
      cur = {};
    end else begin
      if (rx_sop) begin n_sop++; cur = {}; end
      if (rx_eop) n_eop++;
      cur.push_back(rx_data_out);
    end
  end

  // mechanism counters
  int m_stuff = 0, m_unstuff = 0, m_shared = 0, m_fill = 0, m_crc16 = 0, m_crc32 = 0;
  int m_crc_err = 0, m_octet_err = 0, m_abort_tx = 0, m_abort_rx = 0, m_idle = 0;
  int since_fcs = 1000;
  always @(posedge clk) if (!rst) begin
    if (dut.u_tx.stop_reading) m_stuff++;
    if (dut.u_rx.u2_zuc.u_zr.bit_valid && !dut.u_rx.u2_zuc.u_zr.out_valid) m_unstuff++;
    if (dut.u_tx.fcs_sent) since_fcs = 0; else if (since_fcs < 1000) since_fcs++;
    if (dut.u_tx.load_data && tx_state == TX_SYNCHRO) begin
      if (since_fcs <= 8) m_shared++; else if (since_fcs < 1000) m_fill++;
    end
    if (dut.u_tx.crc_send) begin if (crc_sel) m_crc32++; else m_crc16++; end
    if (tx_state == TX_ABORT && dut.u_tx.end_abort) m_abort_tx++;
    if (dut.u_rx.u1_fad.abort_det) m_abort_rx++;
    if (rx_status_valid && rx_data_out[ST_CRC_ERR]) m_crc_err++;
    if (rx_status_valid && rx_data_out[ST_OCTET_ERR]) m_octet_err++;
    if (rx_state == RX_SYNCHRO && dut.u_rx.u1_fad.ones7) m_idle++;
  end

  task automatic chk(input string what, input int g, e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic mech(input string what, input int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte_q_t rand_frame(input int maxlen);
    byte_q_t m;
    for (int i = 0; i < 1 + $urandom % maxlen; i++) m.push_back(($urandom % 2) ? 8'hFF : 8'($urandom));
    return m;
  endfunction

  // Queue frames and send them; back_to_back requests each next frame
  // while the current one is on the line.
  task automatic send(input byte_q_t frames[$], input bit back_to_back);
    int base;
    fifo = {}; eof_at = {};
    @(posedge clk); #1 rd = 0;
    foreach (frames[f]) begin
      foreach (frames[f][k]) fifo.push_back(frames[f][k]);
      eof_at.push_back(fifo.size() - 1);
    end
    base = 0;
    foreach (frames[f]) begin
      tx_start = 1; @(posedge clk); #1 tx_start = 0;
      base += frames[f].size();
      while (rd < base) begin @(posedge clk); #1; end
      if (!back_to_back) begin
        while (tx_state != TX_SYNCHRO) begin @(posedge clk); #1; end
        repeat (24 + $urandom % 16) @(posedge clk);
        #1;
      end
    end
    while (tx_state != TX_SYNCHRO) begin @(posedge clk); #1; end
    repeat (60) @(posedge clk);
    #1;
  endtask

  task automatic expect_good(input byte_q_t frames[$], input logic sel);
    chk("frames received", rx_frames.size(), frames.size());
    foreach (frames[f]) if (f < rx_frames.size()) begin
      byte_q_t w;
      int bad;
      w = with_fcs(frames[f], sel);
      bad = 0;
      chk("frame length", rx_frames[f].size(), w.size());
      if (rx_frames[f].size() == w.size()) foreach (w[k]) if (rx_frames[f][k] !== w[k]) bad++;
      chk("frame bytes", bad, 0);
      chk("status", rx_status[f], 8'h00);
    end
    rx_frames = {}; rx_status = {};
  endtask

  initial begin
    byte_q_t fr[$];
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);
    #1;
    for (int pass = 0; pass < 2; pass++) begin
      crc_sel = pass[0];
      fr = {};
      fr.push_back({8'hFE, 8'h02});
      for (int i = 0; i < 5; i++) fr.push_back(rand_frame(16));
      send(fr, 1);
      expect_good(fr, crc_sel);
      fr = {};
      for (int i = 0; i < 4; i++) fr.push_back(rand_frame(16));
      send(fr, 0);
      expect_good(fr, crc_sel);
    end
    // flipped bit: CRC error
    crc_sel = 0;
    flip_req = 1;
    fr = {}; fr.push_back(rand_frame(8) ); fr[0].push_back(8'h0F); fr[0].push_back(8'h0F);
    send(fr, 0);
    chk("crc error frames", rx_status.size(), 1);
    if (rx_status.size() == 1) chk("crc error bit", rx_status[0][ST_CRC_ERR], 1);
    rx_frames = {}; rx_status = {};
    // three extra bits: octet error
    insert_req = 1;
    fr = {}; fr.push_back(rand_frame(8)); fr[0].push_back(8'h0F); fr[0].push_back(8'h0F);
    send(fr, 0);
    chk("octet error frames", rx_status.size(), 1);
    if (rx_status.size() == 1) chk("octet error bit", rx_status[0][ST_OCTET_ERR], 1);
    rx_frames = {}; rx_status = {};
    // abort
    fifo = {}; eof_at = {};
    for (int i = 0; i < 30; i++) fifo.push_back(8'($urandom));
    eof_at = {29};
    @(posedge clk); #1 rd = 0;
    tx_start = 1; @(posedge clk); #1 tx_start = 0;
    while (rd < 6) begin @(posedge clk); #1; end
    tx_abort = 1; @(posedge clk); #1 tx_abort = 0;
    repeat (60) @(posedge clk);
    #1;
    chk("tx ready after abort", tx_state, TX_READY);
    chk("rx idle after abort", rx_state, RX_IDLE);
    chk("abort status count", rx_status.size(), 1);
    if (rx_status.size() == 1) chk("abort status", rx_status[0], 8'h04);
    rx_frames = {}; rx_status = {};
    // good frame after the abort
    crc_sel = 1;
    fr = {}; fr.push_back(rand_frame(16));
    send(fr, 0);
    expect_good(fr, 1);
    // abort while only flags are being sent: the receiver drops back to
    // idle without a status byte
    tx_abort = 1; @(posedge clk); #1 tx_abort = 0;
    repeat (30) @(posedge clk);
    #1;
    chk("rx idle after abort between frames", rx_state, RX_IDLE);
    chk("no status for abort between frames", rx_status.size(), 0);
    chk("sop per eop (one aborted frame)", n_sop, n_eop + 1);
    mech("zero insertion (stall)", m_stuff);
    mech("zero deletion", m_unstuff);
    mech("shared flag", m_shared);
    mech("flag fill between frames", m_fill);
    mech("CRC-16 frames", m_crc16);
    mech("CRC-32 frames", m_crc32);
    mech("CRC error", m_crc_err);
    mech("octet error", m_octet_err);
    mech("abort sent", m_abort_tx);
    mech("abort detected", m_abort_rx);
    mech("abort between frames (to idle)", m_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
