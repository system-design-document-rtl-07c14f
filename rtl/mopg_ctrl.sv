// Controller of the accelerator: the state machine that sequences
// initialization, payload updates and transmission.
//
// States and transitions:
//   INIT      entered from reset. Starts the DM9000A initialization and the
//             loading of the frame template in parallel; goes to IDLE when
//             both have finished.
//   IDLE      waits for an instruction from the Avalon slave (the processor
//             has written with chipselect high). Takes it and starts the
//             packetizer:
//               Wait=1 -> WR_RAM_HOLD, patch only;
//               Wait=0 -> WR_RAM_SEND, patch and recompute the UDP checksum.
//   WR_RAM_HOLD  back to IDLE when the patch is written; nothing is sent,
//             more fields are expected.
//   WR_RAM_SEND  when the packetizer is done, starts the transmit sequencer
//             and goes to WR_PHY.
//   WR_PHY    back to IDLE when the frame has been handed to the DM9000A.
// While the controller is outside IDLE the Avalon slave stalls the next
// write. Only a Wait=0 instruction sends a frame, so the processor sends
// just the fields that changed and one frame leaves per group of updates.
//
// The states and transitions are those of the design's state diagram; the
// split of "Write to RAM" into a hold and a send variant names the two
// "Write to RAM" states of that diagram, and the parallel start of template
// loading and chip initialization in INIT is this design's own choice.
module mopg_ctrl
  import mopg_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // instruction from the Avalon slave
  input  logic   instr_valid,
  input  instr_t instr,
  output logic   instr_ready,
  // DM9000A initialization component
  output logic   init_start,
  input  logic   init_done,
  // packetizer
  output logic   pk_start,
  output pk_op_t pk_op,
  input  logic   pk_done,
  // DM9000A communication component
  output logic   tx_start,
  input  logic   tx_done,
  // status
  output logic   in_init,
  output logic   frame_sent     // pulses when a frame has been handed over
);

  typedef enum logic [2:0] {
    C_INIT, C_IDLE, C_WR_RAM_HOLD, C_WR_RAM_SEND, C_WR_PHY
  } cstate_t;

  cstate_t state;
  logic    launched, init_ok, load_ok;

  assign in_init     = (state == C_INIT);
  assign instr_ready = (state == C_IDLE) && instr_valid;
  assign init_start  = (state == C_INIT) && !launched;

  always_comb begin
    pk_start = 1'b0;
    pk_op    = PK_LOAD;
    if (state == C_INIT && !launched) begin
      pk_start = 1'b1;
    end else if (instr_ready) begin
      pk_start = 1'b1;
      pk_op    = instr.wait_flag ? PK_WRITE : PK_WRITE_CSUM;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_INIT;
      launched   <= 1'b0;
      init_ok    <= 1'b0;
      load_ok    <= 1'b0;
      tx_start   <= 1'b0;
      frame_sent <= 1'b0;
    end else begin
      tx_start   <= 1'b0;
      frame_sent <= 1'b0;
      unique case (state)
        C_INIT: begin
          launched <= 1'b1;
          if (init_done) init_ok <= 1'b1;
          if (pk_done)   load_ok <= 1'b1;
          if ((init_ok || init_done) && (load_ok || pk_done)) state <= C_IDLE;
        end
        C_IDLE: if (instr_ready)
          state <= instr.wait_flag ? C_WR_RAM_HOLD : C_WR_RAM_SEND;
        C_WR_RAM_HOLD: if (pk_done) state <= C_IDLE;
        C_WR_RAM_SEND: if (pk_done) begin
          tx_start <= 1'b1;
          state    <= C_WR_PHY;
        end
        C_WR_PHY: if (tx_done) begin
          frame_sent <= 1'b1;
          state      <= C_IDLE;
        end
        default: state <= C_INIT;
      endcase
    end
  end

endmodule
