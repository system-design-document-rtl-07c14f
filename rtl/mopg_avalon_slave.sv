// Avalon-MM slave of the accelerator: receives the order-update instructions
// from the processor.
//
// Each Avalon write is one instruction with the three fields Offset, Wait and
// Data. Offset and Wait travel in the word address (address[3:0] is the
// payload byte offset, address[4] the Wait flag) and up to four payload bytes
// travel in writedata, byte lane k going to payload byte Offset+k when
// byteenable[k] is set. The slave holds one instruction in a register. While
// that register is full the next write is stalled with waitrequest, so the
// processor never has to poll: it is held on the bus until the controller
// has taken the previous instruction. Reads are not decoded (the port is
// write-only; readdata is not provided).
//
// Timing: a write into an empty buffer completes in the cycle it is
// presented; instr_valid rises the next cycle and stays until instr_ready.
//
// The three instruction fields and their meaning follow the design
// description; their placement in address and data, the byte-enable use and
// the one-entry buffer are this design's own.
module mopg_avalon_slave
  import mopg_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // Avalon-MM slave
  input  logic                 avs_chipselect,
  input  logic                 avs_write,
  input  logic [AV_ADDR_W-1:0] avs_address,
  input  logic [31:0]          avs_writedata,
  input  logic [3:0]           avs_byteenable,
  output logic                 avs_waitrequest,
  // decoded instruction towards the controller
  output logic                 instr_valid,
  output instr_t               instr,
  input  logic                 instr_ready
);

  logic wr_req, take;

  assign wr_req          = avs_chipselect && avs_write;
  // The buffer can take a write when it is empty or is being emptied.
  assign take            = wr_req && (!instr_valid || instr_ready);
  assign avs_waitrequest = wr_req && !take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr_valid <= 1'b0;
      instr       <= '0;
    end else begin
      if (take) begin
        instr_valid     <= 1'b1;
        instr.offset    <= avs_address[OFS_W-1:0];
        instr.wait_flag <= avs_address[OFS_W];
        instr.be        <= avs_byteenable;
        instr.data      <= avs_writedata;
      end else if (instr_ready) begin
        instr_valid <= 1'b0;
      end
    end
  end

  // Avalon rule: a master held by waitrequest keeps its request unchanged.
  property p_hold_stable;
    @(posedge clk) disable iff (!rst_n)
      avs_waitrequest |=> (wr_req && $stable(avs_address) && $stable(avs_writedata)
                           && $stable(avs_byteenable));
  endproperty
  a_hold_stable: assert property (p_hold_stable)
    else $error("Avalon master changed a write held by waitrequest");

endmodule
