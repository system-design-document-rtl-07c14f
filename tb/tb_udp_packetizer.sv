// Self-checking testbench of udp_packetizer with a packet_ram: loads the
// template, then applies random field instructions (Wait=1 patch only,
// Wait=0 patch and checksum) while keeping a shadow payload. After every
// checksum pass the whole RAM must equal the reference frame built by
// tb_ref_pkg (both checksums computed there independently); after a plain
// patch the payload bytes must match. Also checks the cycle counts:
// load 35, patch 4, patch+checksum 12 cycles from start to done.
module tb_udp_packetizer;
  import mopg_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 1;
  logic        start = 0, ready, done;
  pk_op_t      op = PK_LOAD;
  instr_t      instr = '0;
  logic [1:0]  ram_we;
  logic [4:0]  ram_waddr, ram_raddr, pk_raddr, tb_raddr = 0;
  logic [15:0] ram_wdata, ram_rdata;
  payload_t    pay;
  frame_t      exp_f;
  int checks = 0, failures = 0;

  udp_packetizer dut (.clk, .rst_n, .start, .op, .instr, .ready, .done,
                      .ram_we, .ram_waddr, .ram_wdata, .ram_raddr(pk_raddr), .ram_rdata);
  packet_ram #(.WORDS(PKT_WORDS)) ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
                                       .raddr(ram_raddr), .rdata(ram_rdata));
  assign ram_raddr = ready ? tb_raddr : pk_raddr;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input pk_op_t o, input instr_t i, input int exp_cycles);
    int n = 0;
    @(negedge clk); start = 1; op = o; instr = i;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != exp_cycles) begin
      failures++; $display("op %s took %0d cycles, expected %0d", o.name(), n, exp_cycles);
    end
  endtask

  task automatic compare(input bit whole);
    for (int w = 0; w < PKT_WORDS; w++) begin
      logic [15:0] e;
      @(negedge clk); tb_raddr = 5'(w);
      @(posedge clk); #1;
      e = {exp_f[2*w+1], exp_f[2*w]};
      if (!whole && w < PAYLOAD_OFS/2) continue;
      checks++;
      if (ram_rdata !== e) begin
        failures++; $display("word %0d: %h expected %h", w, ram_rdata, e);
      end
    end
  endtask

  initial begin
    foreach (pay[k]) pay[k] = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PK_LOAD, '0, PKT_WORDS + 8);
    exp_f = build_frame(DEFAULT_CFG, pay);
    compare(1);
    for (int n = 0; n < 300; n++) begin
      instr_t i;
      i.offset    = 4'($urandom_range(13));      // a few past the payload end
      i.wait_flag = ($urandom_range(2) != 0);
      i.be        = 4'($urandom);
      i.data      = $urandom;
      for (int k = 0; k < 4; k++)
        if (i.be[k] && int'(i.offset) + k < 12) pay[int'(i.offset) + k] = i.data[8*k +: 8];
      run(i.wait_flag ? PK_WRITE : PK_WRITE_CSUM, i, i.wait_flag ? 4 : 12);
      if (!i.wait_flag) begin
        exp_f = build_frame(DEFAULT_CFG, pay);
        compare(1);
      end else begin
        // checksum field is stale: compare payload only
        automatic frame_t f = build_frame(DEFAULT_CFG, pay);
        for (int k = 0; k < 12; k++) exp_f[42 + k] = f[42 + k];
        compare(0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
