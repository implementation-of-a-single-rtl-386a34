// hdlc_tb_pkg: reference models used by the HDLC testbenches.
//
// The CRCs here are computed the textbook way, independently of the RTL:
// each byte is bit-reversed and run MSB first through a non-reflected LFSR
// with the normal-form polynomial (0x1021 for CRC-16/CCITT, 0x04C11DB7 for
// CRC-32), preset to all ones, and the result is bit-reversed and
// complemented. The framer builds the line bit stream of a frame (opening
// flag, zero-stuffed bytes and FCS, closing flag), and the deframer parses a
// line bit stream back into frames.
package hdlc_tb_pkg;

  typedef logic [7:0] byte_q_t[$];
  typedef logic       bit_q_t[$];

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction

  // FCS as transmitted (complemented), low byte first on the line.
  function automatic logic [31:0] fcs_ref(input byte_q_t d, input logic sel32);
    logic [31:0] r, out;
    logic [31:0] poly;
    int w;
    w    = sel32 ? 32 : 16;
    poly = sel32 ? 32'h04C11DB7 : 32'h00001021;
    r    = sel32 ? 32'hFFFFFFFF : 32'h0000FFFF;
    foreach (d[k]) begin
      logic [7:0] b;
      b = rev8(d[k]);
      for (int i = 7; i >= 0; i--) begin
        logic fb;
        fb = r[w-1] ^ b[i];
        r  = (r << 1);
        if (w == 16) r[31:16] = '0;
        if (fb) r = r ^ poly;
      end
    end
    out = '0;
    for (int i = 0; i < w; i++) out[i] = r[w-1-i];
    out = ~out;
    if (!sel32) out[31:16] = '0;
    return out;
  endfunction

  function automatic byte_q_t with_fcs(input byte_q_t d, input logic sel32);
    logic [31:0] f;
    byte_q_t q;
    q = d;
    f = fcs_ref(d, sel32);
    for (int i = 0; i < (sel32 ? 4 : 2); i++) q.push_back(f[8*i +: 8]);
    return q;
  endfunction

  // Bits of the bytes, LSB first, with a 0 after every five 1s.
  function automatic bit_q_t stuff(input byte_q_t d);
    bit_q_t q;
    int ones;
    ones = 0;
    foreach (d[k]) for (int i = 0; i < 8; i++) begin
      q.push_back(d[k][i]);
      if (d[k][i]) begin
        ones++;
        if (ones == 5) begin q.push_back(1'b0); ones = 0; end
      end else ones = 0;
    end
    return q;
  endfunction

  function automatic void push_byte(ref bit_q_t q, input logic [7:0] b);
    for (int i = 0; i < 8; i++) q.push_back(b[i]);
  endfunction

  // Count of zeros that stuff() inserts.
  function automatic int stuffed_zeros(input byte_q_t d);
    bit_q_t q;
    q = stuff(d);
    return q.size() - 8 * d.size();
  endfunction

  // Parse a line bit stream: find flags (0,1,1,1,1,1,1,0 in line order),
  // take the bits between two flags, drop the 0 after each five 1s and
  // group the rest into bytes. Frames holding seven 1s count as aborts.
  // Returns the frames' bytes (FCS included) concatenated in fr, their
  // lengths in len, and frames whose length is not whole bytes in odd.
  function automatic void deframe(input bit_q_t line, ref byte_q_t fr, ref int len[$],
                                  ref int aborts, ref int odd);
    int flags[$];
    int k;
    k = 0;
    while (k + 8 <= line.size()) begin
      if (line[k] == 0 && line[k+1] && line[k+2] && line[k+3] && line[k+4] &&
          line[k+5] && line[k+6] && line[k+7] == 0) begin
        flags.push_back(k);
        k += 8;
      end else k++;
    end
    for (int f = 0; f + 1 < flags.size(); f++) begin
      int a, e, ones, run, nb;
      logic [7:0] cur;
      logic ab;
      byte_q_t cur_fr;
      a = flags[f] + 8; e = flags[f+1];
      if (e <= a) continue;
      ones = 0; run = 0; nb = 0; ab = 0; cur = '0;
      for (int j = a; j < e; j++) begin
        run = line[j] ? run + 1 : 0;
        if (run >= 7) ab = 1;
      end
      if (ab) begin aborts++; continue; end
      for (int j = a; j < e; j++) begin
        if (ones == 5 && !line[j]) begin ones = 0; continue; end
        ones = line[j] ? ones + 1 : 0;
        cur = {line[j], cur[7:1]};
        nb++;
        if (nb == 8) begin cur_fr.push_back(cur); nb = 0; end
      end
      if (nb != 0) odd++;
      foreach (cur_fr[j]) fr.push_back(cur_fr[j]);
      len.push_back(cur_fr.size());
    end
  endfunction

  // Line bits of one frame after its opening flag: kind 0 good, 1 CRC
  // error (a data bit flipped after the FCS is made), 2 octet error (three
  // extra bits before the closing flag), 3 aborted (abort sequence, then
  // idle 1s, instead of the closing flag). The expected bytes (FCS
  // included) come back in w.
  function automatic bit_q_t frame_bits(input byte_q_t m, input logic sel32,
                                        input int kind, ref byte_q_t w);
    bit_q_t s;
    w = with_fcs(m, sel32);
    if (kind == 1) w[0] = w[0] ^ 8'h10;
    s = stuff(w);
    if (kind == 2) begin s.push_back(0); s.push_back(1); s.push_back(0); end
    if (kind == 3) begin
      push_byte(s, 8'hFE);
      for (int i = 0; i < 12; i++) s.push_back(1);
    end
    return s;
  endfunction

endpackage
