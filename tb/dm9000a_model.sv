// Behavioural model of the host side of a DM9000A Ethernet controller, for
// simulation only (kind: behavioural model, not synthesizable).
//
// It samples the bus pins on every clock edge. An INDEX write (CMD=0) sets
// the register index; a DATA write (CMD=1) writes the indexed register, or,
// when the index is MWCMD, appends two bytes (bits 7:0 first) to the TX FIFO.
// Writing TCR bit 0 "transmits": the first TXPL bytes of the FIFO are copied
// to `frame`, `frames` is incremented and TCR bit 0 reads back as 1 for
// TX_CYCLES cycles. DATA reads return the indexed register. Every register
// write is logged in wr_reg/wr_val/wr_cyc, and the length of the last
// reset pulse in rst_low. Protocol violations are counted in
// `errors`: IOR# and IOW# low together, a strobe without CS#, a write whose
// data is not driven, a strobe shorter than MIN_PULSE cycles.
module dm9000a_model #(
  parameter int unsigned TX_CYCLES = 340,
  parameter int unsigned MIN_PULSE = 2
) (
  input  logic        clk,
  input  logic        rst_n,      // the chip's reset pin
  input  logic        cs_n,
  input  logic        cmd,
  input  logic        iow_n,
  input  logic        ior_n,
  input  logic [15:0] sd_in,      // host -> chip
  input  logic        sd_oe,
  output logic [15:0] sd_out      // chip -> host
);
  byte unsigned regs [256];
  byte unsigned index;
  byte unsigned fifo [$];
  byte unsigned frame [$];
  int           frames = 0;
  int           errors = 0;
  int           resets = 0;
  int           busy_left = 0;
  int           busy_reads = 0;   // TCR reads that returned TXREQ=1
  byte unsigned wr_reg [$];
  byte unsigned wr_val [$];
  longint       wr_cyc [$];       // clock cycle of each register write
  longint       cyc = 0;
  longint       rst_low = 0;      // cycles the reset pin was last held low

  logic         iow_q = 1'b1, ior_q = 1'b1, rst_q = 1'b1;
  logic         cmd_q;
  logic [15:0]  data_q;
  int           pulse = 0;

  always_comb begin
    if (index == 8'h02) sd_out = {8'h00, regs[8'h02][7:1], busy_left > 0};
    else                sd_out = {8'h00, regs[index]};
  end

  always @(posedge clk) begin
    cyc++;
    rst_q <= rst_n;
    if (!rst_n && rst_q) begin resets++; rst_low = 0; end
    if (!rst_n) rst_low++;
    if (!rst_n) begin
      foreach (regs[i]) regs[i] = 0;
      index = 0;
      fifo.delete();
    end
    if (busy_left > 0) busy_left--;
    if (!iow_n && !ior_n) errors++;
    if ((!iow_n || !ior_n) && cs_n) errors++;
    if (!iow_n && !sd_oe) errors++;
    if (!iow_n || !ior_n) begin
      pulse++;
      cmd_q  <= cmd;
      data_q <= sd_in;
    end
    // end of a write strobe
    if (iow_n && !iow_q) begin
      if (pulse < MIN_PULSE) errors++;
      if (!cmd_q) index = data_q[7:0];
      else if (index == 8'hF8) begin
        fifo.push_back(data_q[7:0]);
        fifo.push_back(data_q[15:8]);
      end else begin
        wr_reg.push_back(index);
        wr_val.push_back(data_q[7:0]);
        wr_cyc.push_back(cyc);
        regs[index] = data_q[7:0];
        if (index == 8'h02 && data_q[0]) begin
          automatic int len = int'({regs[8'hFD], regs[8'hFC]});
          if (busy_left > 0) errors++;   // TX request while transmitting
          frame.delete();
          for (int i = 0; i < len && fifo.size() > 0; i++) frame.push_back(fifo.pop_front());
          fifo.delete();
          frames++;
          busy_left = TX_CYCLES;
        end
      end
    end
    if (ior_n && !ior_q) begin
      if (pulse < MIN_PULSE) errors++;
      if (index == 8'h02 && busy_left > 0) busy_reads++;
    end
    if (iow_n && ior_n) pulse = 0;
    iow_q <= iow_n;
    ior_q <= ior_n;
  end
endmodule
