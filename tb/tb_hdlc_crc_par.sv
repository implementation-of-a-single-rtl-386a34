// tb_hdlc_crc_par: checks the byte-parallel CRC unit against the standard
// check values of "123456789" (CRC-16/X.25 0x906E, CRC-32 0xCBF43926) and
// against the bitwise reference of hdlc_tb_pkg on random messages, for
// both CRC sizes. The unit is combinational; a small clock paces the test.
module tb_hdlc_crc_par;
  import hdlc_tb_pkg::*;
  logic [31:0] crc_in, crc_out;
  logic [7:0]  data;
  logic        crc_sel;
  int checks = 0, failures = 0;

  hdlc_crc_par dut (.crc_in, .data, .crc_sel, .crc_out);

  task automatic run_msg(input byte_q_t m, input logic sel, output logic [31:0] fcs);
    logic [31:0] c;
    c = '1;
    crc_sel = sel;
    foreach (m[k]) begin
      crc_in = c; data = m[k];
      #1;
      c = crc_out;
    end
    fcs = sel ? ~c : {16'h0, ~c[15:0]};
  endtask

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_q_t m;
    logic [31:0] f;
    m = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    run_msg(m, 1'b0, f); check("crc16 check value", f, 32'h0000906E);
    run_msg(m, 1'b1, f); check("crc32 check value", f, 32'hCBF43926);
    for (int t = 0; t < 200; t++) begin
      logic sel;
      m = {};
      sel = t[0];
      for (int i = 0; i < 1 + ($urandom % 20); i++) m.push_back(8'($urandom));
      run_msg(m, sel, f);
      check($sformatf("random msg %0d", t), f, fcs_ref(m, sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
