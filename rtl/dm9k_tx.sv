// DM9000A communication component: sends the frame held in the packet RAM.
//
// On `start` it runs this sequence of DM9000A bus cycles (through dm9k_bus):
//   1. INDEX=TCR, then DATA reads of TCR until bit 0 (TXREQ) is clear, i.e.
//      until the chip has finished sending the previous frame;
//   2. INDEX=MWCMD, then PKT_WORDS DATA writes: the frame, word 0 first,
//      straight from the packet RAM (earlier byte in bits 7:0);
//   3. TXPLH and TXPLL = frame length in bytes;
//   4. TCR = 0x01: start transmission.
// `done` pulses when the TCR write has completed; the chip then sends the
// frame (and pads it to the Ethernet minimum) on its own, so the controller
// can accept new instructions while the frame is on the wire. The busy-wait
// of step 1 only delays a following frame.
//
// Timing: with the default bus timing each access takes 7 cycles (5 on the
// bus, 2 of hand-over), so a send to an idle chip takes
// 7*(2 + 1 + PKT_WORDS + 6) = 252 cycles from start to done. `polls` counts TCR reads that found the chip still busy.
//
// Sending the stored frame to the chip follows the design description; the
// sequence, polling before rather than after a send, and the register usage
// follow the DM9000A data sheet and are this design's choices.
module dm9k_tx
  import mopg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [15:0]        polls,
  // packet RAM read port
  output logic [WADDR_W-1:0] ram_raddr,
  input  logic [15:0]        ram_rdata,
  // to dm9k_bus
  output logic               bus_req_valid,
  input  logic               bus_req_ready,
  output logic               bus_req_write,
  output logic               bus_req_cmd,
  output logic [15:0]        bus_req_wdata,
  input  logic               bus_rsp_valid,
  input  logic [15:0]        bus_rsp_rdata
);

  typedef enum logic [2:0] {
    T_IDLE, T_ISSUE, T_WAIT
  } tstate_t;

  // what the current bus cycle is
  typedef enum logic [3:0] {
    A_POLL_IDX, A_POLL_RD, A_MW_IDX, A_DATA,
    A_LENH_IDX, A_LENH_DAT, A_LENL_IDX, A_LENL_DAT, A_TCR_IDX, A_TCR_DAT
  } acc_t;

  tstate_t            state;
  acc_t               acc;
  logic [WADDR_W-1:0] wcnt;

  assign busy      = (state != T_IDLE);
  assign ram_raddr = wcnt;

  always_comb begin
    bus_req_valid = (state == T_ISSUE);
    bus_req_write = (acc != A_POLL_RD);
    bus_req_cmd   = 1'b1;
    bus_req_wdata = 16'h0000;
    unique case (acc)
      A_POLL_IDX: begin bus_req_cmd = 1'b0; bus_req_wdata = {8'h00, DM_TCR};   end
      A_POLL_RD:  ;
      A_MW_IDX:   begin bus_req_cmd = 1'b0; bus_req_wdata = {8'h00, DM_MWCMD}; end
      A_DATA:     bus_req_wdata = ram_rdata;
      A_LENH_IDX: begin bus_req_cmd = 1'b0; bus_req_wdata = {8'h00, DM_TXPLH}; end
      A_LENH_DAT: bus_req_wdata = 16'(PKT_BYTES >> 8);
      A_LENL_IDX: begin bus_req_cmd = 1'b0; bus_req_wdata = {8'h00, DM_TXPLL}; end
      A_LENL_DAT: bus_req_wdata = 16'(PKT_BYTES & 8'hFF);
      A_TCR_IDX:  begin bus_req_cmd = 1'b0; bus_req_wdata = {8'h00, DM_TCR};   end
      A_TCR_DAT:  bus_req_wdata = 16'h0001;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      acc   <= A_POLL_IDX;
      wcnt  <= '0;
      done  <= 1'b0;
      polls <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          acc   <= A_POLL_IDX;
          wcnt  <= '0;
          state <= T_ISSUE;
        end
        T_ISSUE: if (bus_req_ready) begin
          state <= T_WAIT;
          if (acc == A_DATA) wcnt <= wcnt + 1'b1;   // next word is read meanwhile
        end
        T_WAIT: if (bus_rsp_valid) begin
          state <= T_ISSUE;
          unique case (acc)
            A_POLL_RD: if (bus_rsp_rdata[0]) polls <= polls + 16'd1;
                       else acc <= A_MW_IDX;
            A_DATA:    if (wcnt == WADDR_W'(PKT_WORDS)) acc <= A_LENH_IDX;
            A_TCR_DAT: begin
              state <= T_IDLE;
              done  <= 1'b1;
            end
            default:   acc <= acc_t'(acc + 4'd1);
          endcase
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
