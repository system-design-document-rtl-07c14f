// Market-order packet generator: an Avalon peripheral that sends UDP order
// messages through a DM9000A Ethernet chip without the processor building
// the packets.
//
// The peripheral keeps one complete Ethernet/IPv4/UDP frame (fixed sender and
// recipient, 12-byte order payload: Price 5, Name 4, Buy/Sell 1, Quantity 2)
// in its packet RAM. The processor only writes the payload fields that
// changed. Each Avalon write is one instruction: Offset (address[3:0], the
// payload byte), Wait (address[4]) and up to four data bytes. With Wait=1
// the bytes are patched and nothing is sent; with Wait=0 they are patched,
// the UDP checksum is recomputed and the frame is copied into the DM9000A
// and transmitted. After reset the DM9000A is initialized and the template
// is loaded before the first instruction is accepted.
//
// Blocks: mopg_avalon_slave (instruction buffer, stalls with waitrequest),
// mopg_ctrl (state machine), udp_packetizer (template load, field patching,
// checksum), packet_ram, dm9k_init and dm9k_tx (DM9000A sequencers) sharing
// one dm9k_bus (DM9000A bus cycles; dm9k_init owns it while the controller
// is in INIT, dm9k_tx afterwards).
//
// Timing at the defaults: a Wait=1 instruction occupies the controller for
// 5 cycles; a Wait=0 instruction for 13 cycles of patching and checksum plus
// 252 cycles while the frame is copied into an idle chip. The chip's wire time overlaps the next
// updates; a following send first waits for it to end.
//
// The division into Avalon component, packetization component,
// initialization and communication components, the instruction fields and
// the state machine follow the design description; bus timing, the
// DM9000A register sequences and all header values are this design's own.
module dm9k_accel
  import mopg_pkg::*;
#(
  parameter pkt_cfg_t    CFG        = DEFAULT_CFG,
  parameter int unsigned PULSE      = 2,
  parameter int unsigned RECOVER    = 2,
  parameter int unsigned RST_CYCLES = 100,
  parameter int unsigned RESET_WAIT = 1000,
  parameter int unsigned PHY_WAIT   = 1000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Avalon-MM slave (from the processor)
  input  logic                 avs_chipselect,
  input  logic                 avs_write,
  input  logic [AV_ADDR_W-1:0] avs_address,
  input  logic [31:0]          avs_writedata,
  input  logic [3:0]           avs_byteenable,
  output logic                 avs_waitrequest,
  // DM9000A pins
  output logic                 enet_rst_n,
  output logic                 enet_cs_n,
  output logic                 enet_cmd,
  output logic                 enet_iow_n,
  output logic                 enet_ior_n,
  output logic [15:0]          enet_data_o,
  output logic                 enet_data_oe,
  input  logic [15:0]          enet_data_i,
  // status
  output logic                 init_busy,
  output logic                 frame_sent,
  output logic [15:0]          tx_polls
);

  // instruction path
  logic   instr_valid, instr_ready;
  instr_t instr;

  // controller handshakes
  logic   init_start, init_done;
  logic   pk_start, pk_done;
  pk_op_t pk_op;
  logic   tx_start, tx_done, tx_busy;

  // packet RAM
  logic [1:0]         ram_we;
  logic [WADDR_W-1:0] ram_waddr, ram_raddr, pk_raddr, tx_raddr;
  logic [15:0]        ram_wdata, ram_rdata;

  // DM9000A bus requests
  logic        bus_req_valid, bus_req_ready, bus_req_write, bus_req_cmd;
  logic [15:0] bus_req_wdata, bus_rsp_rdata;
  logic        bus_rsp_valid;
  logic        ini_valid, ini_write, ini_cmd;
  logic [15:0] ini_wdata;
  logic        txb_valid, txb_write, txb_cmd;
  logic [15:0] txb_wdata;

  mopg_avalon_slave u_avs (
    .clk, .rst_n,
    .avs_chipselect, .avs_write, .avs_address, .avs_writedata, .avs_byteenable,
    .avs_waitrequest,
    .instr_valid, .instr, .instr_ready
  );

  mopg_ctrl u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr, .instr_ready,
    .init_start, .init_done,
    .pk_start, .pk_op, .pk_done,
    .tx_start, .tx_done,
    .in_init(init_busy), .frame_sent
  );

  udp_packetizer #(.CFG(CFG)) u_pk (
    .clk, .rst_n,
    .start(pk_start), .op(pk_op), .instr, .ready(), .done(pk_done),
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr(pk_raddr), .ram_rdata
  );

  packet_ram #(.WORDS(PKT_WORDS)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata)
  );

  // The transmit sequencer reads the RAM only while the packetizer is idle.
  assign ram_raddr = tx_busy ? tx_raddr : pk_raddr;

  dm9k_init #(
    .CFG(CFG), .RST_CYCLES(RST_CYCLES), .RESET_WAIT(RESET_WAIT), .PHY_WAIT(PHY_WAIT)
  ) u_init (
    .clk, .rst_n,
    .start(init_start), .busy(), .done(init_done),
    .bus_req_valid(ini_valid), .bus_req_ready(bus_req_ready && init_busy),
    .bus_req_write(ini_write), .bus_req_cmd(ini_cmd), .bus_req_wdata(ini_wdata),
    .bus_rsp_valid(bus_rsp_valid && init_busy),
    .enet_rst_n
  );

  dm9k_tx u_tx (
    .clk, .rst_n,
    .start(tx_start), .busy(tx_busy), .done(tx_done), .polls(tx_polls),
    .ram_raddr(tx_raddr), .ram_rdata,
    .bus_req_valid(txb_valid), .bus_req_ready(bus_req_ready && !init_busy),
    .bus_req_write(txb_write), .bus_req_cmd(txb_cmd), .bus_req_wdata(txb_wdata),
    .bus_rsp_valid(bus_rsp_valid && !init_busy), .bus_rsp_rdata
  );

  // One DM9000A bus, owned by the initialization sequencer during INIT.
  always_comb begin
    if (init_busy) begin
      bus_req_valid = ini_valid;
      bus_req_write = ini_write;
      bus_req_cmd   = ini_cmd;
      bus_req_wdata = ini_wdata;
    end else begin
      bus_req_valid = txb_valid;
      bus_req_write = txb_write;
      bus_req_cmd   = txb_cmd;
      bus_req_wdata = txb_wdata;
    end
  end

  dm9k_bus #(.PULSE(PULSE), .RECOVER(RECOVER)) u_bus (
    .clk, .rst_n,
    .req_valid(bus_req_valid), .req_ready(bus_req_ready),
    .req_write(bus_req_write), .req_cmd(bus_req_cmd), .req_wdata(bus_req_wdata),
    .rsp_valid(bus_rsp_valid), .rsp_rdata(bus_rsp_rdata),
    .enet_cs_n, .enet_cmd, .enet_iow_n, .enet_ior_n,
    .enet_data_o, .enet_data_oe, .enet_data_i
  );

endmodule
