// Self-checking testbench of dm9k_init driving dm9k_bus and the DM9000A bus
// model, at the default delays. Checks the reset pulse length, the exact
// list of register writes (register and value, MAC bytes in PAR0..PAR5
// order), the waits after the software reset and after PHY power-up, that
// `done` pulses once and that the model saw no bus protocol violation.
module tb_dm9k_init;
  import mopg_pkg::*;
  localparam longint RST_CYCLES = 100, RESET_WAIT = 1000, PHY_WAIT = 1000;
  logic        clk = 0, rst_n = 1;
  logic        start = 0, busy, done;
  logic        bus_req_valid, bus_req_ready, bus_req_write, bus_req_cmd, bus_rsp_valid;
  logic [15:0] bus_req_wdata, bus_rsp_rdata;
  logic        enet_rst_n, enet_cs_n, enet_cmd, enet_iow_n, enet_ior_n, enet_data_oe;
  logic [15:0] enet_data_o, enet_data_i;
  int checks = 0, failures = 0, dones = 0;
  byte unsigned exp_reg [$], exp_val [$];

  dm9k_init dut (.*);
  dm9k_bus bus (.clk, .rst_n, .req_valid(bus_req_valid), .req_ready(bus_req_ready),
                .req_write(bus_req_write), .req_cmd(bus_req_cmd), .req_wdata(bus_req_wdata),
                .rsp_valid(bus_rsp_valid), .rsp_rdata(bus_rsp_rdata),
                .enet_cs_n, .enet_cmd, .enet_iow_n, .enet_ior_n, .enet_data_o,
                .enet_data_oe, .enet_data_i);
  dm9000a_model chip (.clk, .rst_n(enet_rst_n), .cs_n(enet_cs_n), .cmd(enet_cmd),
                      .iow_n(enet_iow_n), .ior_n(enet_ior_n), .sd_in(enet_data_o),
                      .sd_oe(enet_data_oe), .sd_out(enet_data_i));

  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

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

  initial begin
    exp_reg = '{8'h00, 8'h00, 8'h1F, 8'h01, 8'hFE, 8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'hFF};
    exp_val = '{8'h01, 8'h00, 8'h00, 8'h2C, 8'h3F, 8'h00, 8'h07, 8'hED, 8'h10, 8'h20, 8'h30, 8'h80};
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    wait (done);
    repeat (10) @(posedge clk);
    chk(dones == 1, "one done pulse");
    chk(!busy, "idle at the end");
    chk(chip.resets == 1, "one hardware reset pulse");
    chk(chip.rst_low == RST_CYCLES, $sformatf("reset held %0d cycles", chip.rst_low));
    chk(chip.wr_reg.size() == exp_reg.size(), $sformatf("%0d register writes", chip.wr_reg.size()));
    for (int i = 0; i < exp_reg.size() && i < chip.wr_reg.size(); i++) begin
      chk(chip.wr_reg[i] == exp_reg[i] && chip.wr_val[i] == exp_val[i],
          $sformatf("write %0d: reg %h=%h, expected %h=%h", i, chip.wr_reg[i], chip.wr_val[i],
                    exp_reg[i], exp_val[i]));
    end
    if (chip.wr_cyc.size() >= 4) begin
      chk(chip.wr_cyc[1] - chip.wr_cyc[0] >= RESET_WAIT, "wait after software reset");
      chk(chip.wr_cyc[3] - chip.wr_cyc[2] >= PHY_WAIT, "wait after PHY power-up");
    end
    chk(chip.errors == 0, $sformatf("bus protocol errors %0d", chip.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
