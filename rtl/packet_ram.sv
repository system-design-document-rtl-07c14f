// Packet RAM: the accelerator's internal memory that holds the one frame it
// sends.
//
// A simple dual-port RAM of WORDS 16-bit words. Each word carries two frame
// bytes, the earlier byte in bits 7:0, which is the order in which the
// DM9000A takes them on its 16-bit data bus. The write port has one enable
// per byte so that single payload bytes can be patched; the read port has
// one cycle of latency (rdata is valid the cycle after raddr), which maps
// onto an FPGA block RAM. The contents are not reset: the packetizer writes
// the whole template during initialization.
//
// That the design keeps the packet in an internal memory follows the design
// description; its width, depth and port arrangement are this design's own.
module packet_ram #(
  parameter int unsigned WORDS  = 27,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic [1:0]        we,      // byte write enables
  input  logic [ADDR_W-1:0] waddr,
  input  logic [15:0]       wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [15:0]       rdata
);

  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we[0]) mem[waddr][7:0]  <= wdata[7:0];
    if (we[1]) mem[waddr][15:8] <= wdata[15:8];
    rdata <= mem[raddr];
  end

endmodule
