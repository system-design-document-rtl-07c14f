// Self-checking testbench of mopg_ctrl. The initialization, packetizer and
// transmit blocks are replaced by responders that pulse their `done` after
// random delays. Everything is driven and sampled on the falling clock edge.
// Checks: after reset both the initialization and a template load (PK_LOAD)
// start once, and no instruction is taken until both are done; a Wait=1
// instruction starts PK_WRITE and no send; a Wait=0 instruction starts
// PK_WRITE_CSUM and, after the packetizer is done, exactly one send; no
// instruction is taken while the packetizer or the sender is busy;
// frame_sent follows each tx_done.
module tb_mopg_ctrl;
  import mopg_pkg::*;
  logic   clk = 0, rst_n = 1;
  logic   instr_valid = 0, instr_ready;
  instr_t instr = '0;
  logic   init_start, init_done = 0, pk_start, pk_done = 0, tx_start, tx_done = 0;
  pk_op_t pk_op;
  logic   in_init, frame_sent;
  int checks = 0, failures = 0;
  int inits = 0, loads = 0, writes = 0, csums = 0, txs = 0, sent = 0, taken = 0;
  int exp_w = 0, exp_c = 0;
  int init_cnt = 0, pk_cnt = 0, tx_cnt = 0;   // cycles until the responder's done
  bit advance = 0, send_due = 0;
  int gap = 0;

  mopg_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: inits=%0d loads=%0d taken=%0d state=%s", inits, loads, taken, dut.state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // one process: responders and instruction source. New inputs are applied
  // 1 ns after the falling edge and the DUT's outputs sampled 1 ns later,
  // i.e. as the rising edge that follows will see them.
  always @(negedge clk) if (rst_n) begin
    #1;
    // done pulses last one cycle
    init_done = 0; pk_done = 0; tx_done = 0;
    if (init_cnt > 0) begin init_cnt--; if (init_cnt == 0) init_done = 1; end
    if (pk_cnt > 0)   begin pk_cnt--;   if (pk_cnt == 0)   pk_done = 1;   end
    if (tx_cnt > 0)   begin tx_cnt--;   if (tx_cnt == 0)   tx_done = 1;   end
    // the instruction seen with instr_ready was taken at the rising edge
    // that follows; present the next one now
    if (advance) begin
      advance = 0;
      instr.wait_flag = ($urandom_range(2) != 0);
      instr.offset    = 4'($urandom);
      if ($urandom_range(3) == 0) begin
        instr_valid = 0;
        gap = $urandom_range(20, 1);
      end
    end else if (gap > 0) begin
      gap--;
      if (gap == 0) instr_valid = 1;
    end
    if (taken >= 400) instr_valid = 0;
    #1;
    if (frame_sent) sent++;
    if (init_start) begin
      inits++;
      init_cnt = $urandom_range(60, 20);
    end
    if (tx_start) begin
      chk(send_due && pk_cnt == 0 && tx_cnt == 0, "send only after a Wait=0 patch");
      send_due = 0;
      txs++;
      tx_cnt = $urandom_range(30, 2);
    end
    if (pk_start) begin
      chk(pk_cnt == 0 && tx_cnt == 0, "packetizer started while busy");
      case (pk_op)
        PK_LOAD:       loads++;
        PK_WRITE:      writes++;
        PK_WRITE_CSUM: begin csums++; send_due = 1; end
        default:       chk(0, "bad op");
      endcase
      pk_cnt = $urandom_range(12, 1);
    end
    if (instr_ready) begin
      chk(!in_init && init_cnt == 0, "instruction taken during INIT");
      chk(pk_start && pk_op == (instr.wait_flag ? PK_WRITE : PK_WRITE_CSUM),
          "packetizer op follows the Wait flag");
      taken++;
      advance = 1;
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(posedge clk); #2 rst_n = 1;
    instr_valid = 1; instr.wait_flag = 1;   // waiting already during INIT
    wait (taken == 400);
    repeat (100) @(posedge clk);
    chk(inits == 1 && loads == 1, $sformatf("initialization once: %0d %0d", inits, loads));
    chk(txs == csums, $sformatf("sends %0d for %0d Wait=0 instructions", txs, csums));
    chk(sent == txs, $sformatf("frame_sent per send: %0d %0d", sent, txs));
    chk(writes > 0 && csums > 0, "both instruction kinds seen");
    $display("hold=%0d send=%0d", writes, csums);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
