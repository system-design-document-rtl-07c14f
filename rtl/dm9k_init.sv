// DM9000A initialization component.
//
// Brings the DM9000A from power-up to a state in which it can transmit, so
// that no software has to touch the chip. It walks a fixed list of steps:
//    0  hardware reset: ENET_RST# low for RST_CYCLES
//    1  wait RESET_WAIT cycles
//    2  NCR  = 0x01   software reset
//    3  wait RESET_WAIT cycles
//    4  NCR  = 0x00   normal mode
//    5  GPR  = 0x00   power up the internal PHY
//    6  wait PHY_WAIT cycles
//    7  NSR  = 0x2C   clear TX-end and wake-up status bits
//    8  ISR  = 0x3F   clear interrupt status
//    9-14 PAR0..PAR5 = source MAC address (CFG.src_mac, first byte to PAR0)
//   15  IMR  = 0x80   SRAM read/write pointers wrap automatically
// A register write is two bus cycles through dm9k_bus: an INDEX write of the
// register number, then a DATA write of the value.
//
// Only 8-bit register writes are needed, so bus_req_write is always 1 and
// bus_req_wdata[15:8] always 0.
//
// Handshake: `start` (one cycle) launches the list; `done` pulses when the
// last write has completed. Default delays assume a 50 MHz clock (20 us).
//
// The document asks for hardware initialization of the DM9000A but does not
// list the steps; the list above is this design's, following the DM9000A data
// sheet's power-up procedure. Receive set-up is left to software.
module dm9k_init
  import mopg_pkg::*;
#(
  parameter pkt_cfg_t    CFG        = DEFAULT_CFG,
  parameter int unsigned RST_CYCLES = 100,
  parameter int unsigned RESET_WAIT = 1000,
  parameter int unsigned PHY_WAIT   = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  // to dm9k_bus
  output logic        bus_req_valid,
  input  logic        bus_req_ready,
  output logic        bus_req_write,
  output logic        bus_req_cmd,
  output logic [15:0] bus_req_wdata,
  input  logic        bus_rsp_valid,
  // DM9000A reset pin
  output logic        enet_rst_n
);

  typedef enum logic [1:0] {ST_RESET, ST_DELAY, ST_WREG} step_kind_t;

  typedef struct packed {
    step_kind_t  kind;
    logic [7:0]  regno;
    logic [7:0]  value;
    logic [31:0] cycles;
  } step_t;

  localparam int unsigned NSTEPS = 16;

  function automatic step_t step_at(int unsigned i);
    step_t s;
    s = '{kind: ST_WREG, regno: 8'h00, value: 8'h00, cycles: 32'd0};
    case (i)
      0:  begin s.kind = ST_RESET; s.cycles = 32'(RST_CYCLES); end
      1:  begin s.kind = ST_DELAY; s.cycles = 32'(RESET_WAIT); end
      2:  begin s.regno = DM_NCR; s.value = 8'h01; end
      3:  begin s.kind = ST_DELAY; s.cycles = 32'(RESET_WAIT); end
      4:  begin s.regno = DM_NCR; s.value = 8'h00; end
      5:  begin s.regno = DM_GPR; s.value = 8'h00; end
      6:  begin s.kind = ST_DELAY; s.cycles = 32'(PHY_WAIT); end
      7:  begin s.regno = DM_NSR; s.value = 8'h2C; end
      8:  begin s.regno = DM_ISR; s.value = 8'h3F; end
      9, 10, 11, 12, 13, 14: begin
        s.regno = DM_PAR0 + 8'(i - 9);
        s.value = CFG.src_mac[47 - 8*(i - 9) -: 8];
      end
      default: begin s.regno = DM_IMR; s.value = 8'h80; end
    endcase
    return s;
  endfunction

  typedef enum logic [2:0] {I_IDLE, I_STEP, I_WAIT, I_IDX, I_DAT, I_DWAIT, I_NEXT} istate_t;

  istate_t     state;
  logic [4:0]  pc;
  logic [31:0] timer;
  step_t       cur;

  assign cur  = step_at(32'(pc));
  assign busy = (state != I_IDLE);

  // bus request: INDEX cycle then DATA cycle of the current register write
  assign bus_req_valid = (state == I_IDX) || (state == I_DAT);
  assign bus_req_write = 1'b1;
  assign bus_req_cmd   = (state == I_DAT);
  assign bus_req_wdata = (state == I_DAT) ? {8'h00, cur.value} : {8'h00, cur.regno};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= I_IDLE;
      pc         <= '0;
      timer      <= '0;
      done       <= 1'b0;
      enet_rst_n <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        I_IDLE: if (start) begin
          pc    <= '0;
          state <= I_STEP;
        end
        I_STEP: begin
          // decode the step at pc
          if (cur.kind == ST_WREG) begin
            state <= I_IDX;
          end else begin
            timer      <= cur.cycles;
            enet_rst_n <= (cur.kind != ST_RESET);
            state      <= I_WAIT;
          end
        end
        I_WAIT: begin
          if (timer <= 32'd1) begin
            enet_rst_n <= 1'b1;
            state      <= I_NEXT;
          end else begin
            timer <= timer - 32'd1;
          end
        end
        I_IDX:  if (bus_req_ready) state <= I_DAT;   // INDEX cycle taken
        I_DAT:  if (bus_req_ready) state <= I_DWAIT; // DATA cycle taken
        I_DWAIT: if (bus_rsp_valid) state <= I_NEXT;
        I_NEXT: begin
          if (pc == 5'(NSTEPS - 1)) begin
            state <= I_IDLE;
            done  <= 1'b1;
          end else begin
            pc    <= pc + 5'd1;
            state <= I_STEP;
          end
        end
        default: state <= I_IDLE;
      endcase
    end
  end

endmodule
