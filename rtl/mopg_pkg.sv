// Shared types and constants of the market-order packet generator.
//
// The accelerator keeps one complete Ethernet/IPv4/UDP frame in an internal
// RAM and lets the processor patch only the 12-byte order payload. This
// package holds:
//   * the payload layout (Price 5 bytes, Name 4, Buy/Sell 1, Quantity 2, in
//     that order) and the frame layout around it,
//   * the instruction format written over the Avalon bus (offset, wait, data),
//   * pkt_cfg_t, the fixed header fields (MAC and IP addresses, UDP ports),
//   * functions that build the frame template and the constant parts of the
//     IPv4 header checksum and the UDP checksum at elaboration time,
//   * the DM9000A register addresses used by the initialization and transmit
//     sequencers.
// The payload layout and the three instruction fields follow the design
// description; the header values, field widths of the instruction and the
// byte order of the payload fields are this design's own choices.
package mopg_pkg;

  // ---------------------------------------------------------------- payload
  localparam int unsigned PAYLOAD_BYTES = 12;
  localparam int unsigned PRICE_OFS = 0,  PRICE_LEN = 5;
  localparam int unsigned NAME_OFS  = 5,  NAME_LEN  = 4;
  localparam int unsigned SIDE_OFS  = 9,  SIDE_LEN  = 1;
  localparam int unsigned QTY_OFS   = 10, QTY_LEN   = 2;

  // ------------------------------------------------------------------ frame
  localparam int unsigned ETH_HDR_BYTES = 14;
  localparam int unsigned IP_HDR_BYTES  = 20;
  localparam int unsigned UDP_HDR_BYTES = 8;
  localparam int unsigned UDP_LEN       = UDP_HDR_BYTES + PAYLOAD_BYTES;     // 20
  localparam int unsigned IP_TOTAL_LEN  = IP_HDR_BYTES + UDP_LEN;            // 40
  localparam int unsigned PKT_BYTES     = ETH_HDR_BYTES + IP_TOTAL_LEN;      // 54
  localparam int unsigned PKT_WORDS     = (PKT_BYTES + 1) / 2;               // 27
  localparam int unsigned UDP_OFS       = ETH_HDR_BYTES + IP_HDR_BYTES;      // 34
  localparam int unsigned UDP_CSUM_OFS  = UDP_OFS + 6;                       // 40
  localparam int unsigned PAYLOAD_OFS   = UDP_OFS + UDP_HDR_BYTES;           // 42
  localparam int unsigned WADDR_W       = $clog2(PKT_WORDS);                 // 5

  // Fixed part of every frame: sender and recipient never change.
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
  } pkt_cfg_t;

  localparam pkt_cfg_t DEFAULT_CFG = '{
    dst_mac : 48'h00_1B_21_3A_4C_5E,
    src_mac : 48'h00_07_ED_10_20_30,
    src_ip  : 32'hC0_A8_01_0A,        // 192.168.1.10
    dst_ip  : 32'hC0_A8_01_01,        // 192.168.1.1
    src_port: 16'd5000,
    dst_port: 16'd6000
  };

  // ------------------------------------------------------------ instruction
  // One Avalon write carries one instruction. The word address holds the
  // Offset (payload byte offset, bits 3:0) and the Wait flag (bit 4); the
  // write data holds up to four payload bytes, lane k going to Offset+k,
  // lanes enabled by byteenable.
  localparam int unsigned AV_ADDR_W = 5;
  localparam int unsigned OFS_W     = 4;

  typedef struct packed {
    logic [OFS_W-1:0] offset;     // first payload byte to change
    logic             wait_flag;  // 1: more fields follow, do not send yet
    logic [3:0]       be;         // byte lanes that carry data
    logic [31:0]      data;       // lane k (bits 8k+7:8k) -> payload[offset+k]
  } instr_t;

  // Operations of the UDP packetization component.
  typedef enum logic [1:0] {
    PK_LOAD       = 2'd0,   // write the whole template, then the checksum
    PK_WRITE      = 2'd1,   // patch payload bytes only
    PK_WRITE_CSUM = 2'd2    // patch payload bytes, then recompute the checksum
  } pk_op_t;

  // -------------------------------------------------------- DM9000A registers
  localparam logic [7:0] DM_NCR   = 8'h00;  // network control
  localparam logic [7:0] DM_NSR   = 8'h01;  // network status
  localparam logic [7:0] DM_TCR   = 8'h02;  // TX control, bit 0 = TXREQ
  localparam logic [7:0] DM_PAR0  = 8'h10;  // physical address, 6 registers
  localparam logic [7:0] DM_GPR   = 8'h1F;  // general purpose, bit 0 = PHY power down
  localparam logic [7:0] DM_MWCMD = 8'hF8;  // memory write with address increment
  localparam logic [7:0] DM_TXPLL = 8'hFC;  // TX packet length low
  localparam logic [7:0] DM_TXPLH = 8'hFD;  // TX packet length high
  localparam logic [7:0] DM_ISR   = 8'hFE;  // interrupt status
  localparam logic [7:0] DM_IMR   = 8'hFF;  // interrupt mask

  // ------------------------------------------------------- template helpers
  // Byte i (0 = first byte on the wire) of the frame with an all-zero payload
  // and the UDP checksum field left at zero.
  function automatic logic [7:0] template_byte(pkt_cfg_t cfg, int unsigned i);
    logic [7:0] hdr [PAYLOAD_OFS];
    logic [15:0] ipc;
    ipc = ip_checksum(cfg);
    for (int k = 0; k < 6; k++) begin
      hdr[k]     = cfg.dst_mac[47-8*k -: 8];
      hdr[6 + k] = cfg.src_mac[47-8*k -: 8];
    end
    hdr[12] = 8'h08; hdr[13] = 8'h00;                        // EtherType IPv4
    hdr[14] = 8'h45; hdr[15] = 8'h00;                        // version/IHL, TOS
    hdr[16] = 8'(IP_TOTAL_LEN >> 8); hdr[17] = 8'(IP_TOTAL_LEN);
    hdr[18] = 8'h00; hdr[19] = 8'h00;                        // identification
    hdr[20] = 8'h40; hdr[21] = 8'h00;                        // don't fragment
    hdr[22] = 8'd64; hdr[23] = 8'd17;                        // TTL, protocol UDP
    hdr[24] = ipc[15:8]; hdr[25] = ipc[7:0];
    for (int k = 0; k < 4; k++) begin
      hdr[26 + k] = cfg.src_ip[31-8*k -: 8];
      hdr[30 + k] = cfg.dst_ip[31-8*k -: 8];
    end
    hdr[34] = cfg.src_port[15:8]; hdr[35] = cfg.src_port[7:0];
    hdr[36] = cfg.dst_port[15:8]; hdr[37] = cfg.dst_port[7:0];
    hdr[38] = 8'(UDP_LEN >> 8);   hdr[39] = 8'(UDP_LEN);
    hdr[40] = 8'h00; hdr[41] = 8'h00;                        // UDP checksum
    return (i < PAYLOAD_OFS) ? hdr[i] : 8'h00;
  endfunction

  // Frame word w as stored in the packet RAM and sent on the 16-bit DM9000A
  // bus: the earlier byte in bits 7:0.
  function automatic logic [15:0] template_word(pkt_cfg_t cfg, int unsigned w);
    return {template_byte(cfg, 2*w + 1), template_byte(cfg, 2*w)};
  endfunction

  // The whole template, word 0 first, as a constant for the loader.
  function automatic logic [PKT_WORDS-1:0][15:0] template_words(pkt_cfg_t cfg);
    logic [PKT_WORDS-1:0][15:0] t;
    for (int unsigned w = 0; w < PKT_WORDS; w++) t[w] = template_word(cfg, w);
    return t;
  endfunction

  // One's-complement fold of a 32-bit sum into 16 bits.
  function automatic logic [15:0] csum_fold(logic [31:0] s);
    logic [31:0] t;
    t = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    t = {16'h0, t[15:0]} + {16'h0, t[31:16]};
    return t[15:0];
  endfunction

  // IPv4 header checksum of the fixed header.
  function automatic logic [15:0] ip_checksum(pkt_cfg_t cfg);
    logic [31:0] s;
    s = 32'h4500 + 32'(IP_TOTAL_LEN) + 32'h0000 + 32'h4000 + 32'h4011
      + {16'h0, cfg.src_ip[31:16]} + {16'h0, cfg.src_ip[15:0]}
      + {16'h0, cfg.dst_ip[31:16]} + {16'h0, cfg.dst_ip[15:0]};
    return ~csum_fold(s);
  endfunction

  // Sum of the UDP pseudo header and the UDP header (checksum field zero):
  // the part of the UDP checksum that never changes.
  function automatic logic [31:0] udp_csum_base(pkt_cfg_t cfg);
    return {16'h0, cfg.src_ip[31:16]} + {16'h0, cfg.src_ip[15:0]}
         + {16'h0, cfg.dst_ip[31:16]} + {16'h0, cfg.dst_ip[15:0]}
         + 32'd17 + 32'(UDP_LEN)
         + {16'h0, cfg.src_port} + {16'h0, cfg.dst_port} + 32'(UDP_LEN);
  endfunction

endpackage
