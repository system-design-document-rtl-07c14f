// UDP packetization component: owns the write port of the packet RAM.
//
// It performs three operations, started by a one-cycle `start` with `op`:
//   PK_LOAD        writes the complete frame template (Ethernet, IPv4 and UDP
//                  headers for the fixed sender and recipient, zero payload)
//                  word by word, then computes the UDP checksum;
//   PK_WRITE       patches the payload bytes named by one instruction;
//   PK_WRITE_CSUM  patches them and then recomputes the UDP checksum, used for
//                  the last instruction before a frame is sent.
// Patching visits the four byte lanes of the instruction, one per cycle, and
// writes lane k to payload byte offset+k when its byte enable is set; bytes
// that would fall past the 12-byte payload are dropped. The checksum pass
// reads the six payload words back, adds them to the constant sum of the UDP
// pseudo header and UDP header (computed at elaboration from CFG), folds,
// complements (a zero result is sent as 0xFFFF) and writes the result into
// the UDP checksum field. The IPv4 header checksum never changes and is part
// of the template.
//
// Timing (cycles from start to done): PK_LOAD 27+8, PK_WRITE 4,
// PK_WRITE_CSUM 4+8. `done` pulses for one cycle; `ready` is high in idle.
//
// Patching the payload in the stored packet and sending a correct checksum
// follow the design description; the order of operations, the incremental
// one-byte-per-cycle patching and the cycle counts are this design's own.
module udp_packetizer
  import mopg_pkg::*;
#(
  parameter pkt_cfg_t CFG = DEFAULT_CFG
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  pk_op_t             op,
  input  instr_t             instr,
  output logic               ready,
  output logic               done,
  // packet RAM
  output logic [1:0]         ram_we,
  output logic [WADDR_W-1:0] ram_waddr,
  output logic [15:0]        ram_wdata,
  output logic [WADDR_W-1:0] ram_raddr,
  input  logic [15:0]        ram_rdata
);

  localparam logic [PKT_WORDS-1:0][15:0] TEMPLATE  = template_words(CFG);
  localparam logic [31:0]                CSUM_BASE = udp_csum_base(CFG);
  localparam int unsigned PAY_WORD0 = PAYLOAD_OFS / 2;       // 21
  localparam int unsigned PAY_WORDS = PAYLOAD_BYTES / 2;     // 6
  localparam int unsigned CSUM_WORD = UDP_CSUM_OFS / 2;      // 20

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_PATCH, S_CSUM, S_CSUM_WR} state_t;

  state_t      state;
  logic        csum_after;
  instr_t      ins;
  logic [4:0]  cnt;
  logic [31:0] sum;

  // payload byte addressed by the current patch lane
  logic [4:0]  pay_idx;
  logic [5:0]  pkt_idx;
  logic [7:0]  lane_byte;
  logic        lane_ok;
  logic [15:0] csum_val;

  assign pay_idx   = 5'(ins.offset) + cnt;
  assign pkt_idx   = 6'(PAYLOAD_OFS) + 6'(pay_idx);
  assign lane_byte = ins.data[8*cnt[1:0] +: 8];
  assign lane_ok   = ins.be[cnt[1:0]] && (pay_idx < 5'(PAYLOAD_BYTES));
  assign csum_val  = (~csum_fold(sum) == 16'h0) ? 16'hFFFF : ~csum_fold(sum);

  assign ready = (state == S_IDLE);

  always_comb begin
    ram_we    = 2'b00;
    ram_waddr = '0;
    ram_wdata = '0;
    ram_raddr = WADDR_W'(PAY_WORD0);
    unique case (state)
      S_LOAD: begin
        ram_we    = 2'b11;
        ram_waddr = WADDR_W'(cnt);
        ram_wdata = TEMPLATE[cnt];
      end
      S_PATCH: begin
        ram_we    = lane_ok ? (pkt_idx[0] ? 2'b10 : 2'b01) : 2'b00;
        ram_waddr = WADDR_W'(pkt_idx[5:1]);
        ram_wdata = {lane_byte, lane_byte};
      end
      S_CSUM: begin
        ram_raddr = WADDR_W'(PAY_WORD0) + WADDR_W'(cnt);
      end
      S_CSUM_WR: begin
        ram_we    = 2'b11;
        ram_waddr = WADDR_W'(CSUM_WORD);
        ram_wdata = {csum_val[7:0], csum_val[15:8]};   // big-endian on the wire
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      csum_after <= 1'b0;
      ins        <= '0;
      cnt        <= '0;
      sum        <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ins        <= instr;
          cnt        <= '0;
          csum_after <= (op != PK_WRITE);
          state      <= (op == PK_LOAD) ? S_LOAD : S_PATCH;
        end
        S_LOAD: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'(PKT_WORDS - 1)) begin
            cnt   <= '0;
            sum   <= CSUM_BASE;
            state <= S_CSUM;
          end
        end
        S_PATCH: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd3) begin
            cnt <= '0;
            sum <= CSUM_BASE;
            if (csum_after) state <= S_CSUM;
            else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_CSUM: begin
          // word cnt-1 arrives while word cnt is addressed
          cnt <= cnt + 5'd1;
          if (cnt != 5'd0) sum <= sum + {16'h0, ram_rdata[7:0], ram_rdata[15:8]};
          if (cnt == 5'(PAY_WORDS)) state <= S_CSUM_WR;
        end
        S_CSUM_WR: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
