// tb_bcast_decode: self-checking test of the MBus broadcast decode.
// Two instances share the bus lines: one withholds DDONE when the FIFO is
// full (HOLDOFF=1), one drops the word (HOLDOFF=0). Checks: one FIFO write
// per broadcast write with the right {channel, data}, DDONE timing and the
// four-phase release, no response to non-broadcast addresses or reads,
// lockout acknowledges without storing, and both full-FIFO behaviours.
module tb_bcast_decode;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  mb_sig_t mb;
  logic lockout = 0, full_h = 0, full_d = 0;
  logic wr_h, wr_d, ddone_h, ddone_d, drop_h, drop_d, held_h, held_d;
  logic [137:0] wd_h, wd_d;
  int checks = 0, failures = 0;
  int nwr_h = 0;

  bcast_decode #(.HOLDOFF(1'b1)) dut_h (.clk, .rst_n, .mb_i(mb), .lockout, .fifo_full(full_h),
    .fifo_wr(wr_h), .fifo_wdata(wd_h), .ddone(ddone_h), .dropped(drop_h), .held(held_h));
  bcast_decode #(.HOLDOFF(1'b0)) dut_d (.clk, .rst_n, .mb_i(mb), .lockout, .fifo_full(full_d),
    .fifo_wr(wr_d), .fifo_wdata(wd_d), .ddone(ddone_d), .dropped(drop_d), .held(held_d));

  always #5 clk = ~clk;
  always @(posedge clk) if (wr_h) nwr_h++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start a cycle: drive address/data/rd with DSTROBE.
  task automatic strobe(input logic [31:0] a, input logic [127:0] d, input logic rd);
    @(negedge clk);
    mb.ad = a; mb.da = d; mb.rd = rd; mb.dstrobe = 1;
  endtask
  task automatic release_strobe();
    @(negedge clk); mb.dstrobe = 0;
  endtask

  initial begin
    logic [127:0] d;
    mb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1: broadcast write to channel 5
    d = {$urandom, $urandom, $urandom, $urandom};
    nwr_h = 0;
    strobe(32'd5, d, 0);
    #1 check(wr_h && wd_h == {10'd5, d}, "write strobe with {channel,data}");
    check(!ddone_h, "DDONE not yet in first clock");
    @(posedge clk); #1;
    check(ddone_h && ddone_d, "DDONE one clock after strobe");
    repeat (3) @(posedge clk); #1;
    check(ddone_h, "DDONE held while DSTROBE high");
    check(nwr_h == 1, "exactly one FIFO write per cycle");
    release_strobe();
    @(posedge clk); #1;
    check(!ddone_h && !ddone_d, "DDONE released after DSTROBE drops");
    // 2: channel 1023 is broadcast, 1024 is not
    strobe(32'd1023, d, 0);
    #1 check(wr_h && wd_h[137:128] == 10'd1023, "channel 1023 accepted");
    @(posedge clk); #1; release_strobe(); @(posedge clk);
    strobe(32'd1024, d, 0);
    #1 check(!wr_h, "address 1024 is not a broadcast");
    repeat (3) @(posedge clk); #1;
    check(!ddone_h, "no DDONE for non-broadcast");
    release_strobe();
    strobe(32'h8000_0003, d, 0);
    #1 check(!wr_h, "high address bits set is not a broadcast");
    release_strobe();
    // 3: read cycle to a broadcast address is ignored
    strobe(32'd7, d, 1);
    repeat (3) @(posedge clk); #1;
    check(!wr_h && !ddone_h, "read cycle ignored");
    release_strobe();
    // 4: lockout acknowledges without storing
    lockout = 1;
    nwr_h = 0;
    strobe(32'd9, d, 0);
    repeat (2) @(posedge clk); #1;
    check(ddone_h && nwr_h == 0, "lockout: DDONE, no write");
    release_strobe(); @(posedge clk);
    lockout = 0;
    // 5: full FIFO
    full_h = 1; full_d = 1;
    nwr_h = 0;
    strobe(32'd3, d, 0);
    #1 check(held_h && !wr_h, "hold-off: held while full");
    check(drop_d && !wr_d, "no hold-off: word dropped");
    repeat (4) @(posedge clk); #1;
    check(!ddone_h, "hold-off: DDONE withheld");
    check(ddone_d, "no hold-off: DDONE given");
    @(negedge clk); full_h = 0;
    #1 check(wr_h && wd_h[137:128] == 10'd3, "hold-off: write when room");
    @(posedge clk); #1;
    check(ddone_h, "hold-off: DDONE after write");
    check(nwr_h == 1, "hold-off: single write");
    release_strobe(); @(posedge clk); #1;
    check(!ddone_h && !ddone_d, "both released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
