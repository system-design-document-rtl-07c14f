// Self-checking testbench of mopg_avalon_slave: an Avalon master issues
// random instruction writes and honours waitrequest; a consumer takes the
// decoded instructions at random times. Every instruction must arrive once,
// in order, with Offset = address[3:0], Wait = address[4] and data/byteenable
// unchanged; a write into an empty buffer must finish without wait states.
module tb_mopg_avalon_slave;
  import mopg_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic        avs_chipselect = 0, avs_write = 0;
  logic [4:0]  avs_address = 0;
  logic [31:0] avs_writedata = 0;
  logic [3:0]  avs_byteenable = 0;
  logic        avs_waitrequest;
  logic        instr_valid, instr_ready;
  instr_t      instr;
  instr_t      sent [$];
  int checks = 0, failures = 0, stalls = 0, got = 0;
  localparam int N = 300;

  mopg_avalon_slave dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: random readiness
  always @(posedge clk) begin
    if (instr_valid && instr_ready) begin
      automatic instr_t e = sent.pop_front();
      checks++;
      got++;
      if (instr !== e) begin
        failures++;
        $display("instr mismatch got %p expected %p", instr, e);
      end
    end
  end
  always @(negedge clk) instr_ready = instr_valid && ($urandom_range(3) == 0);

  initial begin
    instr_ready = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first write into an empty buffer: no wait state
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_address = 5'h13; avs_writedata = 32'hA1B2C3D4;
    avs_byteenable = 4'b0111;
    sent.push_back('{offset: 4'h3, wait_flag: 1'b1, be: 4'b0111, data: 32'hA1B2C3D4});
    #1; checks++;
    if (avs_waitrequest) begin failures++; $display("wait state on empty buffer"); end
    @(posedge clk);
    for (int n = 1; n < N; n++) begin
      @(negedge clk);
      avs_chipselect = ($urandom_range(3) != 0);
      avs_write      = avs_chipselect;
      avs_address    = 5'($urandom);
      avs_writedata  = $urandom;
      avs_byteenable = 4'($urandom);
      if (!avs_write) continue;
      sent.push_back('{offset: avs_address[3:0], wait_flag: avs_address[4],
                       be: avs_byteenable, data: avs_writedata});
      #1;
      while (avs_waitrequest) begin
        stalls++;
        @(negedge clk); #1;
      end
      @(posedge clk);
    end
    @(negedge clk); avs_chipselect = 0; avs_write = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (sent.size() != 0 || stalls == 0) begin
      failures++;
      $display("left=%0d stalls=%0d", sent.size(), stalls);
    end
    $display("instructions=%0d stalls=%0d", got, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
