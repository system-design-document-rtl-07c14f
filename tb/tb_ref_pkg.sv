// Reference functions for the testbenches: builds the expected Ethernet /
// IPv4 / UDP frame byte by byte from the header fields and a 12-byte payload,
// with both checksums computed by a plain byte-pair sum over the covered
// bytes (independent of the word-level arithmetic used in the RTL).
package tb_ref_pkg;
  import mopg_pkg::pkt_cfg_t;

  typedef byte unsigned frame_t [54];
  typedef byte unsigned payload_t [12];

  // one's-complement sum over len bytes of b starting at first (big-endian pairs)
  function automatic int unsigned ones_sum(byte unsigned b [], int first, int len);
    int unsigned s = 0;
    for (int i = 0; i < len; i += 2)
      s += (int'(b[first + i]) << 8) + ((i + 1 < len) ? int'(b[first + i + 1]) : 0);
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return s;
  endfunction

  function automatic frame_t build_frame(pkt_cfg_t cfg, payload_t pay);
    frame_t f;
    byte unsigned ph [];
    int unsigned c;
    for (int k = 0; k < 6; k++) begin
      f[k]     = 8'(cfg.dst_mac >> (8 * (5 - k)));
      f[6 + k] = 8'(cfg.src_mac >> (8 * (5 - k)));
    end
    f[12] = 8'h08; f[13] = 8'h00;
    // IPv4 header
    f[14] = 8'h45; f[15] = 0; f[16] = 0; f[17] = 40; f[18] = 0; f[19] = 0;
    f[20] = 8'h40; f[21] = 0; f[22] = 64; f[23] = 17; f[24] = 0; f[25] = 0;
    for (int k = 0; k < 4; k++) begin
      f[26 + k] = 8'(cfg.src_ip >> (8 * (3 - k)));
      f[30 + k] = 8'(cfg.dst_ip >> (8 * (3 - k)));
    end
    // UDP header and payload
    f[34] = 8'(cfg.src_port >> 8); f[35] = 8'(cfg.src_port);
    f[36] = 8'(cfg.dst_port >> 8); f[37] = 8'(cfg.dst_port);
    f[38] = 0; f[39] = 20; f[40] = 0; f[41] = 0;
    for (int k = 0; k < 12; k++) f[42 + k] = pay[k];
    c = ~ones_sum(f, 14, 20) & 32'hFFFF;
    f[24] = 8'(c >> 8); f[25] = 8'(c);
    // pseudo header: src ip, dst ip, zero, protocol, UDP length; then UDP
    ph = new[12 + 20];
    for (int k = 0; k < 8; k++) ph[k] = f[26 + k];
    ph[8] = 0; ph[9] = 17; ph[10] = 0; ph[11] = 20;
    for (int k = 0; k < 20; k++) ph[12 + k] = f[34 + k];
    c = ~ones_sum(ph, 0, 32) & 32'hFFFF;
    if (c == 0) c = 32'hFFFF;
    f[40] = 8'(c >> 8); f[41] = 8'(c);
    return f;
  endfunction

endpackage
