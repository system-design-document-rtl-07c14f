// Self-checking testbench of packet_ram: random byte-enabled writes and reads
// against a shadow array, checking the one-cycle read latency.
module tb_packet_ram;
  localparam int WORDS = 27;
  logic        clk = 0;
  logic [1:0]  we;
  logic [4:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [WORDS];
  int checks = 0, failures = 0;

  packet_ram #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); we = 2'b11; waddr = 5'(w); wdata = 16'($urandom); shadow[w] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we    = 2'($urandom);
      waddr = 5'($urandom_range(WORDS - 1));
      wdata = 16'($urandom);
      raddr = 5'($urandom_range(WORDS - 1));
      begin
        automatic logic [15:0] expect_r = shadow[raddr];  // read sees the old word
        if (we[0]) shadow[waddr][7:0]  = wdata[7:0];
        if (we[1]) shadow[waddr][15:8] = wdata[15:8];
        @(posedge clk); #1;
        checks++;
        if (rdata !== expect_r) begin
          failures++;
          $display("read %0d: got %h expected %h", raddr, rdata, expect_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
