// DM9000A host bus cycle generator.
//
// The DM9000A is reached through a 16-bit asynchronous processor bus: CS#,
// CMD (0 selects the INDEX port, 1 the DATA port), IOW#, IOR# and the data
// lines SD[15:0]. A register access is an INDEX write of the register number
// followed by a DATA write or read; writing MWCMD and then a stream of DATA
// writes fills the TX FIFO. This block performs one such bus cycle per
// request:
//   setup    1 cycle       CS# low, CMD and (for writes) SD driven
//   strobe   PULSE cycles  IOW# or IOR# low; read data sampled on the last
//   recover  RECOVER cycles with CS# high before the next access
// All pins are driven from registers. The bidirectional SD lines are split
// into enet_data_o / enet_data_oe / enet_data_i; the tristate buffer sits in
// the FPGA pad.
//
// Handshake: a request is taken when req_valid and req_ready are both high;
// rsp_valid pulses for one cycle at the end of the recover phase, with
// rsp_rdata holding the sampled value for a read. req_ready is high again in
// that same cycle, so back-to-back accesses take 1+PULSE+RECOVER cycles each.
//
// The document names the DM9000A interface only. The pin set and the access
// sequence follow the DM9000A data sheet; the pulse and recovery lengths are
// this design's choice (at a 50 MHz clock, 40 ns each by default).
module dm9k_bus #(
  parameter int unsigned PULSE   = 2,
  parameter int unsigned RECOVER = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // request side
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_write,   // 1: write, 0: read
  input  logic        req_cmd,     // 0: INDEX port, 1: DATA port
  input  logic [15:0] req_wdata,
  output logic        rsp_valid,
  output logic [15:0] rsp_rdata,
  // DM9000A pins
  output logic        enet_cs_n,
  output logic        enet_cmd,
  output logic        enet_iow_n,
  output logic        enet_ior_n,
  output logic [15:0] enet_data_o,
  output logic        enet_data_oe,
  input  logic [15:0] enet_data_i
);

  typedef enum logic [1:0] {B_IDLE, B_SETUP, B_STROBE, B_RECOVER} bstate_t;

  localparam int unsigned CW = $clog2(PULSE + RECOVER + 1);

  bstate_t       state;
  logic [CW-1:0] cnt;
  logic          is_write;

  assign req_ready = (state == B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= B_IDLE;
      cnt          <= '0;
      is_write     <= 1'b0;
      rsp_valid    <= 1'b0;
      rsp_rdata    <= '0;
      enet_cs_n    <= 1'b1;
      enet_cmd     <= 1'b0;
      enet_iow_n   <= 1'b1;
      enet_ior_n   <= 1'b1;
      enet_data_o  <= '0;
      enet_data_oe <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        B_IDLE: if (req_valid) begin
          state        <= B_SETUP;
          is_write     <= req_write;
          enet_cs_n    <= 1'b0;
          enet_cmd     <= req_cmd;
          enet_data_o  <= req_wdata;
          enet_data_oe <= req_write;
        end
        B_SETUP: begin
          state      <= B_STROBE;
          cnt        <= CW'(PULSE - 1);
          enet_iow_n <= !is_write;
          enet_ior_n <= is_write;
        end
        B_STROBE: begin
          if (cnt == '0) begin
            if (!is_write) rsp_rdata <= enet_data_i;
            enet_iow_n   <= 1'b1;
            enet_ior_n   <= 1'b1;
            enet_cs_n    <= 1'b1;
            enet_data_oe <= 1'b0;
            cnt          <= CW'(RECOVER - 1);
            state        <= B_RECOVER;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        B_RECOVER: begin
          if (cnt == '0) begin
            state     <= B_IDLE;
            rsp_valid <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
