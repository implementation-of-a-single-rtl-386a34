// tb_hdlc_tx_control: tests the transmit FSM with the real buffer, zero
// inserter and flag generator around it and a show-ahead FIFO model.
// Checks, for frames of random length and both CRC sizes: the state
// sequence TX_READY -> TX_SYNCHRO -> TX_DATA (or straight to TX_SEND_CRC
// for a one-byte frame) -> TX_SEND_CRC -> TX_SYNCHRO; one txload per byte;
// the first load_data on the last bit of a flag with a byte fetched at the
// flag's first bit; one crc_send and one fcs_sent per frame; no TX_DATA
// clock without a bit moved or a 0 inserted; that at least one frame
// needed the wait for a final stuffed 0; and an abort from each of
// TX_SYNCHRO, TX_DATA and TX_SEND_CRC leading through TX_ABORT (8 clocks)
// to TX_READY, ignoring tx_start meanwhile.
module tb_hdlc_tx_control;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1, tx_start = 0, tx_abort = 0, crc_sel = 0;
  tx_state_t state;
  flaggen_t flaggen;
  logic txload, load_data, crc_send, crc_init, zi_enable, shift_en, fcs_sent;
  logic start_flag, flag_last, end_abort, byte_done, fcs_last, stuff_next, stop_reading, reg_eof;
  logic ser_bit, zi_bit, txdata;
  logic [7:0] data_in;
  logic eof_in;
  int checks = 0, failures = 0;
  int n_txload = 0, n_crc_send = 0, n_fcs_sent = 0, n_tail = 0, n_bad_first = 0, n_idle_data = 0;
  byte_q_t fifo;
  int eof_at[$];
  int rd = 0;

  hdlc_tx_control dut (.clk, .rst, .tx_start, .tx_abort, .start_flag, .flag_last,
    .end_abort, .byte_done, .fcs_last, .stuff_next, .stop_reading, .reg_eof,
    .state, .flaggen, .txload, .load_data, .crc_send, .crc_init, .zi_enable,
    .shift_en, .fcs_sent);
  hdlc_tx_buffer_crc u_buf (.clk, .rst, .crc_sel, .txload, .data_in, .eof_in,
    .load_data, .crc_send, .crc_init, .shift_en, .bit_out(ser_bit), .byte_done,
    .fcs_last, .reg_eof);
  hdlc_tx_zero_insert u_zi (.clk, .rst, .enable(zi_enable), .bit_in(ser_bit),
    .bit_out(zi_bit), .stop_reading, .stuff_next);
  hdlc_tx_flag_gen u_fg (.clk, .rst, .flaggen, .data_bit(zi_bit), .txdata,
    .start_flag, .flag_last, .end_abort);

  always #5 clk = ~clk;
  assign data_in = (rd < fifo.size()) ? fifo[rd] : 8'h00;
  always_comb begin
    eof_in = 0;
    foreach (eof_at[k]) if (eof_at[k] == rd) eof_in = 1;
  end

  logic fetched;
  always @(posedge clk) if (!rst) begin
    if (txload) begin rd <= rd + 1; n_txload++; end
    if (crc_send) n_crc_send++;
    if (fcs_sent) begin n_fcs_sent++; if (stop_reading) n_tail++; end
    if (state == TX_SYNCHRO && txload) fetched = start_flag;
    if (state == TX_SYNCHRO && load_data && !(flag_last && fetched)) n_bad_first++;
    if (state == TX_DATA && !shift_en && !stop_reading) n_idle_data++;
  end

  task automatic chk(input string what, input int g, e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0d exp %0d at %0t", what, g, e, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input byte_q_t m, input logic sel);
    tx_state_t seen[$];
    tx_state_t last;
    int l0, c0, f0;
    crc_sel = sel;
    fifo = m; eof_at = {m.size() - 1};
    rd = 0;
    l0 = n_txload; c0 = n_crc_send; f0 = n_fcs_sent;
    tx_start = 1; @(posedge clk); #1 tx_start = 0;
    last = state; seen.push_back(state);
    while (!(state == TX_SYNCHRO && n_fcs_sent > f0)) begin
      @(posedge clk); #1;
      if (state != last) begin seen.push_back(state); last = state; end
    end
    chk("txloads", n_txload - l0, m.size());
    chk("crc_send", n_crc_send - c0, 1);
    chk("fcs_sent", n_fcs_sent - f0, 1);
    if (m.size() == 1) begin
      chk("states", seen.size(), 3);
      if (seen.size() == 3) chk("one-byte frame skips TX_DATA", seen[1], TX_SEND_CRC);
    end else begin
      chk("states", seen.size(), 4);
      if (seen.size() == 4) begin
        chk("TX_DATA", seen[1], TX_DATA);
        chk("TX_SEND_CRC", seen[2], TX_SEND_CRC);
      end
    end
  endtask

  initial begin
    byte_q_t m;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    chk("ready after reset", state, TX_READY);
    chk("idle select", flaggen, FG_IDLE);
    tx_start = 1; @(posedge clk); #1 tx_start = 0;
    chk("synchro after start", state, TX_SYNCHRO);
    // hold off data: abort from TX_SYNCHRO
    fifo = {8'h11}; eof_at = {0}; rd = 0;
    @(posedge clk); #1;
    tx_abort = 1; @(posedge clk); #1 tx_abort = 0;
    chk("abort from synchro", state, TX_ABORT);
    tx_start = 1; @(posedge clk); #1 tx_start = 0;
    repeat (6) @(posedge clk); #1;
    chk("ready 8 clocks after abort", state, TX_READY);
    @(posedge clk); #1;
    chk("tx_start during abort ignored", state, TX_READY);
    // frames; include frames whose FCS ends in 1s
    for (int t = 0; t < 120; t++) begin
      bit_q_t sb;
      // the first frames are picked so that the FCS ends in five 1s
      do begin
        m = {};
        for (int i = 0; i < 1 + $urandom % 6; i++) m.push_back(($urandom % 2) ? 8'hFF : 8'($urandom));
        sb = stuff(with_fcs(m, t[0]));
      end while (t < 10 && !(sb[sb.size()-1] == 0 && sb[sb.size()-2] && sb[sb.size()-3] &&
                             sb[sb.size()-4] && sb[sb.size()-5] && sb[sb.size()-6]));
      frame(m, t[0]);
    end
    chk("first load on flag end after fetch", n_bad_first, 0);
    chk("no idle TX_DATA clock", n_idle_data, 0);
    checks++;
    if (n_tail == 0) begin failures++; $display("FAIL final stuffed 0 never waited for"); end
    // abort from TX_DATA and from TX_SEND_CRC
    for (int a = 0; a < 2; a++) begin
      fifo = {8'h01, 8'h02, 8'h03, 8'h04}; eof_at = {3}; rd = 0;
      tx_start = 1; @(posedge clk); #1 tx_start = 0;
      while (state != (a == 0 ? TX_DATA : TX_SEND_CRC)) begin @(posedge clk); #1; end
      tx_abort = 1; @(posedge clk); #1 tx_abort = 0;
      chk("abort state", state, TX_ABORT);
      chk("abort select", flaggen, FG_ABORT);
      repeat (8) @(posedge clk); #1;
      chk("ready after abort", state, TX_READY);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
