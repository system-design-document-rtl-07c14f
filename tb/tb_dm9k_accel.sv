// End-to-end testbench of dm9k_accel at its default parameters, with the
// DM9000A bus model standing in for the chip (336 cycles of wire time per
// frame: 84 byte times at 100 Mbit/s with a 50 MHz clock).
//
// An Avalon master plays the processor. It writes a first instruction
// straight after reset (stalled until initialization ends), then sends
// market orders: for each order a random subset of the fields Price (5
// bytes, two writes), Name, Buy/Sell and Quantity is rewritten, every write
// with Wait=1 except the last. The testbench keeps its own copy of the
// payload and, for every Wait=0 write, compares the frame the chip received
// with the reference frame (headers and both checksums built independently).
// It also checks the initialization writes, that Wait=1 writes send nothing,
// and the latency from a Wait=0 write to the hand-over of the frame.
// Mechanisms that must each occur at least once: stall during
// initialization, stall while a frame is copied, Wait=1 hold, send, TX-busy
// poll before a send, bytes dropped past the payload end, partial byte
// enables.
module tb_dm9k_accel;
  import mopg_pkg::*;
  import tb_ref_pkg::*;

  // Cycles from the completion of a Wait=0 write to frame_sent with an idle
  // chip: the controller takes the instruction, 12 cycles of patching and
  // checksum, 252 cycles of copying into the chip, plus hand-over cycles.
  localparam longint SEND_LATENCY = 273;

  logic        clk = 0, rst_n = 1;
  logic        avs_chipselect = 0, avs_write = 0;
  logic [4:0]  avs_address = 0;
  logic [31:0] avs_writedata = 0;
  logic [3:0]  avs_byteenable = 0;
  logic        avs_waitrequest;
  logic        enet_rst_n, enet_cs_n, enet_cmd, enet_iow_n, enet_ior_n, enet_data_oe;
  logic [15:0] enet_data_o, enet_data_i;
  logic        init_busy, frame_sent;
  logic [15:0] tx_polls;

  payload_t pay;
  int checks = 0, failures = 0;
  int n_init_stall = 0, n_copy_stall = 0, n_hold = 0, n_send = 0, n_drop = 0, n_partial = 0;
  longint cyc = 0;

  dm9k_accel dut (.*);
  dm9000a_model #(.TX_CYCLES(336)) chip (
    .clk, .rst_n(enet_rst_n), .cs_n(enet_cs_n), .cmd(enet_cmd), .iow_n(enet_iow_n),
    .ior_n(enet_ior_n), .sd_in(enet_data_o), .sd_oe(enet_data_oe), .sd_out(enet_data_i));

  always #10 clk = ~clk;    // 50 MHz
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // One Avalon write; returns the cycle at which it completed.
  task automatic av_write(input bit wt, input int ofs, input logic [31:0] d,
                          input logic [3:0] be, output longint done_cyc);
    int stalls = 0;
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_address = {wt, 4'(ofs)};
    avs_writedata = d; avs_byteenable = be;
    #1;
    while (avs_waitrequest) begin
      stalls++;
      if (init_busy) n_init_stall++; else n_copy_stall++;
      @(negedge clk); #1;
    end
    @(posedge clk);
    done_cyc = cyc;
    #1 avs_chipselect = 0; avs_write = 0;
    for (int k = 0; k < 4; k++)
      if (be[k]) begin
        if (ofs + k < PAYLOAD_BYTES) pay[ofs + k] = d[8*k +: 8];
        else n_drop++;
      end
    if (be != 4'b1111) n_partial++;
    if (wt) n_hold++;
  endtask

  // field number f: 0 Price (two writes), 1 Name, 2 Buy/Sell, 3 Quantity
  task automatic write_field(input int f, input bit last, output longint t);
    logic [31:0] r = $urandom;
    case (f)
      0: begin
        av_write(1, PRICE_OFS, r, 4'b1111, t);
        av_write(!last, PRICE_OFS + 4, $urandom, 4'b0001, t);
      end
      1: av_write(!last, NAME_OFS, r, 4'b1111, t);
      2: av_write(!last, SIDE_OFS, {24'h0, ($urandom_range(1) != 0 ? "B" : "S")}, 4'b0001, t);
      default: av_write(!last, QTY_OFS, r, 4'b0011, t);
    endcase
  endtask

  task automatic expect_frame(input int nframe);
    frame_t f = build_frame(DEFAULT_CFG, pay);
    chk(chip.frames == nframe, $sformatf("frames %0d expected %0d", chip.frames, nframe));
    chk(chip.frame.size() == PKT_BYTES, $sformatf("frame length %0d", chip.frame.size()));
    for (int i = 0; i < PKT_BYTES && i < chip.frame.size(); i++)
      chk(chip.frame[i] == f[i], $sformatf("frame %0d byte %0d: %h expected %h",
                                           nframe, i, chip.frame[i], f[i]));
  endtask

  initial begin
    longint t0, t1;
    automatic int sent = 0;
    automatic int unsigned polls0;
    foreach (pay[k]) pay[k] = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. Wait=1 writes straight after reset: the first fills the one-entry
    //    instruction buffer, the second waits for the initialization
    av_write(1, QTY_OFS, 32'h0000_3412, 4'b0011, t0);
    chk(init_busy, "first write buffered during initialization");
    av_write(1, NAME_OFS, 32'h4C50_4141, 4'b1111, t0);
    chk(!init_busy, "second write completes after initialization");
    chk(chip.resets == 1, "chip reset once");
    chk(chip.wr_reg.size() == 12, $sformatf("%0d initialization writes", chip.wr_reg.size()));
    for (int k = 0; k < 6; k++)
      chk(chip.regs[16 + k] == DEFAULT_CFG.src_mac[47 - 8*k -: 8], "MAC address in PAR");

    // 2. a complete order, the last field with Wait=0; latency to hand-over
    write_field(0, 0, t0);
    write_field(1, 0, t0);
    write_field(2, 1, t0);
    t1 = t0;
    while (!frame_sent) begin @(posedge clk); #1; t1++; end
    sent++;
    chk(t1 - t0 == SEND_LATENCY,
        $sformatf("send latency %0d cycles", t1 - t0));
    $display("Wait=0 write to frame hand-over: %0d cycles", t1 - t0);
    repeat (2) @(posedge clk);
    expect_frame(sent);

    // 3. random orders: a subset of fields, last one with Wait=0
    for (int n = 0; n < 60; n++) begin
      automatic int nf = $urandom_range(4, 1);
      automatic int fl [$];
      for (int f = 0; f < 4; f++) fl.push_back(f);
      fl.shuffle();
      for (int i = 0; i < nf; i++) write_field(fl[i], i == nf - 1, t0);
      chk(chip.frames == sent, "Wait=1 writes send nothing");
      while (!frame_sent) @(posedge clk);
      sent++;
      repeat (2) @(posedge clk);
      expect_frame(sent);
      // sometimes the next order follows at once, so the chip is still busy
      if ($urandom_range(2) == 0) repeat ($urandom_range(400)) @(posedge clk);
    end

    // 4. writes running past the payload end are cut off
    av_write(0, QTY_OFS, 32'hDEAD_BEEF, 4'b1111, t0);
    while (!frame_sent) @(posedge clk);
    sent++;
    repeat (2) @(posedge clk);
    expect_frame(sent);

    // 5. back-to-back single-field orders: the sender must poll the busy chip
    polls0 = 32'(tx_polls);
    for (int n = 0; n < 3; n++) begin
      write_field(3, 1, t0);
      while (!frame_sent) @(posedge clk);
      sent++;
      repeat (2) @(posedge clk);
      expect_frame(sent);
    end
    chk(32'(tx_polls) > polls0 && chip.busy_reads > 0, "TX-busy polling happened");
    chk(chip.errors == 0, $sformatf("DM9000A bus protocol errors: %0d", chip.errors));

    n_send = sent;
    $display("mechanisms: init_stall=%0d copy_stall=%0d hold=%0d send=%0d busy_poll=%0d drop=%0d partial_be=%0d",
             n_init_stall, n_copy_stall, n_hold, n_send, tx_polls, n_drop, n_partial);
    chk(n_init_stall > 0, "stall during initialization happened");
    chk(n_copy_stall > 0, "stall during frame copy happened");
    chk(n_hold > 0, "Wait=1 hold happened");
    chk(n_send > 0, "send happened");
    chk(tx_polls != 0, "busy poll happened");
    chk(n_drop > 0, "byte drop past payload end happened");
    chk(n_partial > 0, "partial byte enable happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
