// tb_mbus_master: self-checking test of the MBus master cycle sequencer.
// A behavioural MBus target answers DSTROBE with DDONE after a chosen delay
// and supplies read data; a behavioural arbiter grants the bus a few clocks
// after bus_req. Checks: nothing is driven before the grant, address, RD and
// write data on the lines during DSTROBE, data lines released for reads,
// read data captured, the four-phase DSTROBE/DDONE release, the cycle length
// with an immediate target, the timeout when nobody answers, and abort
// while waiting for the bus.
module tb_mbus_master;
  import l2b_pkg::*;
  localparam int TO = 40;
  logic clk = 0, rst_n = 0;
  logic req = 0, abort = 0, rd = 0;
  logic [31:0] addr = 0;
  logic [127:0] wdata = 0, rdata;
  logic done, timeout, waiting, bus_req, local_boss = 0;
  mb_sig_t mb_i, mb_o;
  logic ad_oe, da_oe, ctl_oe;
  int checks = 0, failures = 0;

  mbus_master #(.TIMEOUT(TO)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // target model
  int tgt_delay = 0;
  bit tgt_on = 1;
  logic [127:0] tgt_rdata;
  logic [127:0] seen_wdata;
  logic [31:0]  seen_addr;
  bit seen_rd;
  int early_strobe = 0;
  logic tgt_ddone = 0;
  always_comb begin
    mb_i = '0;
    mb_i.dstrobe = ctl_oe && mb_o.dstrobe;
    mb_i.ad = mb_o.ad;
    mb_i.rd = mb_o.rd;
    mb_i.ddone = tgt_ddone;
    mb_i.da = da_oe ? mb_o.da : (tgt_ddone ? tgt_rdata : '0);
  end
  initial forever begin
    @(posedge clk);
    if (tgt_on && mb_i.dstrobe && !tgt_ddone) begin
      seen_addr = mb_i.ad; seen_rd = mb_i.rd; seen_wdata = mb_i.da;
      repeat (tgt_delay) @(posedge clk);
      #1 tgt_ddone = 1;
      while (mb_i.dstrobe) @(posedge clk);
      #1 tgt_ddone = 0;
    end
  end
  // arbiter model
  initial forever begin
    @(posedge clk);
    if (bus_req && !local_boss) begin repeat (3) @(posedge clk); #1 local_boss = 1; end
    else if (!bus_req) #1 local_boss = 0;
  end
  always @(posedge clk) if (ctl_oe && !local_boss) early_strobe++;

  task automatic cycle(input logic r, input logic [31:0] a, input logic [127:0] d,
                       output int clocks);
    @(negedge clk);
    req = 1; rd = r; addr = a; wdata = d;
    clocks = 0;
    do begin @(posedge clk); #1; clocks++; end while (!done);
    @(negedge clk); req = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, c0;
    logic [127:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // write with an immediate target
    d = {$urandom, $urandom, $urandom, $urandom};
    tgt_delay = 0;
    cycle(0, 32'h0012_3456, d, c0);
    check(!timeout, "write: no timeout");
    check(seen_addr == 32'h0012_3456 && !seen_rd, "write: address and RD on the bus");
    check(seen_wdata == d, "write: data on the bus");
    check(early_strobe == 0, "nothing driven before the grant");
    // same write with a slow target takes exactly the extra clocks
    tgt_delay = 5;
    cycle(0, 32'h0012_3457, d, c);
    check(c == c0 + 5, $sformatf("slow target adds 5 clocks (%0d vs %0d)", c, c0));
    // read
    tgt_delay = 2;
    tgt_rdata = {$urandom, $urandom, $urandom, $urandom};
    cycle(1, 32'h00AB_CDEF, '0, c);
    check(!timeout && rdata == tgt_rdata, "read: data captured");
    check(seen_rd, "read: RD high on the bus");
    check(!tgt_ddone && !mb_i.dstrobe, "handshake released");
    // no target: timeout
    tgt_on = 0;
    cycle(1, 32'h0000_9999, '0, c);
    check(timeout, "timeout flagged when nobody answers");
    check(c >= TO && c <= TO + 10, $sformatf("timeout after about TIMEOUT clocks (%0d)", c));
    tgt_on = 1;
    // abort while waiting for the grant
    @(negedge clk); req = 1; rd = 0;
    @(posedge clk); #1;
    check(waiting, "waiting for the bus");
    @(negedge clk); abort = 1;
    @(negedge clk); abort = 0; req = 0;
    repeat (6) @(posedge clk); #1;
    check(!bus_req && !ctl_oe, "abort withdraws the request, nothing driven");
    // 1 request + 4 arbiter model + 1 setup + 1 strobe + 2 DDONE up + 2 DDONE down
    check(c0 == 11, $sformatf("write cycle length after request (%0d clocks)", c0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
