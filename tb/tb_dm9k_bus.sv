// Self-checking testbench of dm9k_bus against the DM9000A bus model: random
// register writes (INDEX then DATA cycle) followed by read-back of the same
// registers. Checks the values read, that the model saw no protocol
// violation (strobe overlap, strobe without CS#, undriven write data, strobe
// shorter than PULSE) and that each access takes 1+PULSE+RECOVER cycles
// from acceptance to rsp_valid. Run with PULSE=3, RECOVER=2.
module tb_dm9k_bus;
  localparam int PULSE = 3, RECOVER = 2;
  logic        clk = 0, rst_n = 1;
  logic        req_valid = 0, req_ready, req_write = 0, req_cmd = 0;
  logic [15:0] req_wdata = 0, rsp_rdata;
  logic        rsp_valid;
  logic        enet_cs_n, enet_cmd, enet_iow_n, enet_ior_n, enet_data_oe;
  logic [15:0] enet_data_o, enet_data_i;
  byte unsigned vals [256];
  int checks = 0, failures = 0;

  dm9k_bus #(.PULSE(PULSE), .RECOVER(RECOVER)) dut (.*);
  dm9000a_model #(.MIN_PULSE(PULSE)) chip (
    .clk, .rst_n(1'b1), .cs_n(enet_cs_n), .cmd(enet_cmd), .iow_n(enet_iow_n),
    .ior_n(enet_ior_n), .sd_in(enet_data_o), .sd_oe(enet_data_oe), .sd_out(enet_data_i));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit wr, input bit cmd, input logic [15:0] d,
                        output logic [15:0] q);
    int n = 0;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_cmd = cmd; req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1 req_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1 n++; end
    q = rsp_rdata;
    checks++;
    if (n != PULSE + RECOVER + 1) begin
      failures++; $display("access took %0d cycles", n);
    end
  endtask

  initial begin
    logic [15:0] q;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // registers 0x20..0x3F as scratch
    for (int r = 32'h20; r < 32'h40; r++) begin
      vals[r] = 8'($urandom);
      access(1, 0, 16'(r), q);
      access(1, 1, {8'h00, vals[r]}, q);
    end
    for (int n = 0; n < 100; n++) begin
      automatic int r = $urandom_range(32'h3F, 32'h20);
      access(1, 0, 16'(r), q);
      access(0, 1, 16'h0, q);
      checks++;
      if (q[7:0] !== vals[r]) begin
        failures++; $display("reg %h read %h expected %h", r, q, vals[r]);
      end
    end
    checks++;
    if (chip.errors != 0) begin failures++; $display("bus protocol errors: %0d", chip.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
