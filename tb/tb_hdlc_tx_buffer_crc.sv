// tb_hdlc_tx_buffer_crc: drives the buffer unit directly as the controller
// would: txload a byte into Reg_in, load_data it into the Latch_Buffer,
// shift its eight bits (with random stall clocks), then crc_send and shift
// the FCS. The serial bits must be the bytes LSB first followed by the
// complemented FCS computed by the reference model, byte_done must mark
// each byte's eighth bit and fcs_last the FCS's last bit. Both CRC sizes.
module tb_hdlc_tx_buffer_crc;
  import hdlc_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic crc_sel = 0, txload = 0, eof_in = 0, load_data = 0, crc_send = 0;
  logic crc_init = 0, shift_en = 0;
  logic [7:0] data_in = 0;
  logic bit_out, byte_done, fcs_last, reg_eof;
  int checks = 0, failures = 0;

  hdlc_tx_buffer_crc dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input byte_q_t m, input logic sel);
    logic [31:0] f;
    int w;
    crc_sel = sel;
    w = sel ? 32 : 16;
    f = fcs_ref(m, sel);
    foreach (m[k]) begin
      data_in = m[k]; eof_in = (k == m.size() - 1); txload = 1;
      @(posedge clk); #1 txload = 0;
      chk("reg_eof", reg_eof, eof_in);
      load_data = 1;
      @(posedge clk); #1 load_data = 0;
      for (int i = 0; i < 8; ) begin
        if ($urandom % 4 == 0) begin shift_en = 0; @(posedge clk); #1; continue; end
        shift_en = 1;
        #0 chk("data bit", bit_out, m[k][i]);
        chk("byte_done", byte_done, i == 7);
        chk("no fcs_last", fcs_last, 0);
        @(posedge clk); #1 shift_en = 0;
        i++;
      end
    end
    crc_send = 1;
    @(posedge clk); #1 crc_send = 0;
    for (int i = 0; i < w; ) begin
      if ($urandom % 4 == 0) begin shift_en = 0; @(posedge clk); #1; continue; end
      shift_en = 1;
      #0 chk("fcs bit", bit_out, f[i]);
      chk("fcs_last", fcs_last, i == w - 1);
      chk("no byte_done in fcs", byte_done, 0);
      @(posedge clk); #1 shift_en = 0;
      i++;
    end
  endtask

  initial begin
    byte_q_t m;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 20; t++) begin
      m = {};
      for (int i = 0; i < 1 + ($urandom % 6); i++) m.push_back(8'($urandom));
      send_frame(m, t[0]);
    end
    // crc_init restarts the CRC mid-frame
    m = {8'hAA, 8'h55};
    data_in = 8'h12; txload = 1; @(posedge clk); #1 txload = 0;
    load_data = 1; @(posedge clk); #1 load_data = 0;
    crc_init = 1; @(posedge clk); #1 crc_init = 0;
    send_frame(m, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
