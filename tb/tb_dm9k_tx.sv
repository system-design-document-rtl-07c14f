// Self-checking testbench of dm9k_tx with dm9k_bus, a packet_ram and the
// DM9000A bus model. The RAM is filled with a random frame, a send is
// started and the frame the model received (length from TXPLH/TXPLL) must
// equal the RAM bytes in order. A second send right after the first must
// wait, by polling TCR, until the model has finished transmitting (the model
// counts a TX request during transmission as an error). Also checks the
// send time with an idle chip: 7 cycles for each of the 36 bus accesses.
module tb_dm9k_tx;
  import mopg_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic        start = 0, busy, done;
  logic [15:0] polls;
  logic [1:0]  ram_we = 0;
  logic [4:0]  ram_waddr = 0, ram_raddr;
  logic [15:0] ram_wdata = 0, ram_rdata;
  logic        bus_req_valid, bus_req_ready, bus_req_write, bus_req_cmd, bus_rsp_valid;
  logic [15:0] bus_req_wdata, bus_rsp_rdata;
  logic        enet_cs_n, enet_cmd, enet_iow_n, enet_ior_n, enet_data_oe;
  logic [15:0] enet_data_o, enet_data_i;
  byte unsigned img [PKT_BYTES];
  int checks = 0, failures = 0;

  dm9k_tx dut (.*);
  packet_ram #(.WORDS(PKT_WORDS)) ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
                                       .raddr(ram_raddr), .rdata(ram_rdata));
  dm9k_bus bus (.clk, .rst_n, .req_valid(bus_req_valid), .req_ready(bus_req_ready),
                .req_write(bus_req_write), .req_cmd(bus_req_cmd), .req_wdata(bus_req_wdata),
                .rsp_valid(bus_rsp_valid), .rsp_rdata(bus_rsp_rdata),
                .enet_cs_n, .enet_cmd, .enet_iow_n, .enet_ior_n, .enet_data_o,
                .enet_data_oe, .enet_data_i);
  dm9000a_model #(.TX_CYCLES(400)) chip (.clk, .rst_n(1'b1), .cs_n(enet_cs_n), .cmd(enet_cmd),
                      .iow_n(enet_iow_n), .ior_n(enet_ior_n), .sd_in(enet_data_o),
                      .sd_oe(enet_data_oe), .sd_out(enet_data_i));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fill();
    foreach (img[i]) img[i] = 8'($urandom);
    for (int w = 0; w < PKT_WORDS; w++) begin
      @(negedge clk); ram_we = 2'b11; ram_waddr = 5'(w); ram_wdata = {img[2*w+1], img[2*w]};
    end
    @(negedge clk); ram_we = 0;
  endtask

  task automatic send(output int cycles);
    cycles = 0;
    @(negedge clk); start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 cycles++; end
  endtask

  task automatic check_frame(input int nframe);
    chk(chip.frames == nframe, $sformatf("frames %0d", chip.frames));
    chk(chip.frame.size() == PKT_BYTES, $sformatf("frame length %0d", chip.frame.size()));
    for (int i = 0; i < PKT_BYTES && i < chip.frame.size(); i++)
      chk(chip.frame[i] == img[i], $sformatf("byte %0d: %h expected %h", i, chip.frame[i], img[i]));
  endtask

  initial begin
    int c1, c2;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fill();
    send(c1);
    check_frame(1);
    chk(c1 == 7 * (PKT_WORDS + 9), $sformatf("send took %0d cycles", c1));
    chk(polls == 0, "no busy poll with an idle chip");
    fill();
    send(c2);
    @(posedge clk);
    check_frame(2);
    chk(polls > 0 && chip.busy_reads > 0, $sformatf("polls %0d", polls));
    chk(c2 > 400, $sformatf("second send waited: %0d cycles", c2));
    chk(chip.errors == 0, $sformatf("bus protocol errors %0d", chip.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
