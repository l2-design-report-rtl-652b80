// tb_pio_target: self-checking test of MBus-initiated PIO into host memory.
// A behavioural MBus master runs write and read cycles; a behavioural PLX
// local-bus slave completes each 64-bit beat after a random delay against a
// host memory model. Checks: the document's worked example (window
// 0x100000-0x110000, translation base 0x21000000: MBus 0x100000 -> PCI
// 0x21000000, 0x100001 -> 0x21000010), both 64-bit halves at the right
// addresses, DDONE only after both local beats finished, read data on the
// MBus lines with DDONE, window bounds (lower inclusive, upper exclusive,
// compared on the upper 16 bits), the enable bit, broadcast addresses never
// claimed, and hold raised while beats are pending.
module tb_pio_target;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 1;
  logic [31:0] mb_upper = 32'h0011_0000, mb_lower = 32'h0010_0000, mb_tb = 32'h2100_0000;
  mb_sig_t mb_i;
  logic ddone, da_oe, lm_valid, lm_write, lm_ready = 0, busy, hold;
  logic [127:0] da_out;
  logic [31:0] lm_addr;
  logic [63:0] lm_wdata, lm_rdata = 0;
  int checks = 0, failures = 0;

  pio_target dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // PLX local bus slave model
  logic [63:0] host [logic [31:0]];
  int beats = 0, hold_low_in_beat = 0;
  logic [31:0] beat_addr [$];
  initial forever begin
    @(posedge clk);
    if (rst_n && lm_valid && !lm_ready) begin
      repeat ($urandom_range(0, 4)) begin
        @(posedge clk);
        if (!hold) hold_low_in_beat++;
      end
      #1;
      beat_addr.push_back(lm_addr);
      if (lm_write) host[lm_addr] = lm_wdata;
      else lm_rdata = host.exists(lm_addr) ? host[lm_addr] : '0;
      lm_ready = 1;
      beats++;
      @(posedge clk); #1 lm_ready = 0;
    end
  end

  int early_ddone = 0;
  always @(posedge clk) if (rst_n && ddone && lm_valid) early_ddone++;

  // MBus master model: returns whether DDONE came and the read data.
  task automatic mcycle(input logic [31:0] a, input logic rd, input logic [127:0] d,
                        output bit answered, output logic [127:0] rdata);
    int n;
    @(negedge clk);
    mb_i.ad = a; mb_i.rd = rd; mb_i.da = rd ? '0 : d; mb_i.dstrobe = 1;
    n = 0;
    answered = 0;
    while (n < 60) begin
      @(posedge clk); #1;
      if (ddone) begin answered = 1; break; end
      n++;
    end
    rdata = da_oe ? da_out : '0;
    @(negedge clk); mb_i.dstrobe = 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    logic [127:0] d, r;
    mb_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // write at MBus 0x100000
    d = {$urandom, $urandom, $urandom, $urandom};
    mcycle(32'h0010_0000, 0, d, ok, r);
    check(ok, "write claimed and answered");
    check(host[32'h2100_0000] == d[63:0] && host[32'h2100_0008] == d[127:64],
          "MBus 0x100000 -> PCI 0x21000000, two 64-bit halves");
    check(beat_addr.size() == 2, "two local beats per MBus word");
    // write at MBus 0x100001
    d = {$urandom, $urandom, $urandom, $urandom};
    mcycle(32'h0010_0001, 0, d, ok, r);
    check(ok && host[32'h2100_0010] == d[63:0] && host[32'h2100_0018] == d[127:64],
          "MBus 0x100001 -> PCI 0x21000010");
    // read back
    mcycle(32'h0010_0001, 1, '0, ok, r);
    check(ok && r == d, "read returns the host word on the MBus data lines");
    // window bounds
    host[32'h2100_0000 + 32'hFFFF0] = 64'h77;
    mcycle(32'h0010_FFFF, 0, d, ok, r);
    check(ok && host[32'h210F_FFF0] == d[63:0], "top word of the window claimed");
    mcycle(32'h0011_0000, 0, d, ok, r);
    check(!ok, "upper bound is exclusive");
    mcycle(32'h000F_FFFF, 0, d, ok, r);
    check(!ok, "below lower bound not claimed");
    mb_lower = 32'h0;
    mcycle(32'h0000_0005, 0, d, ok, r);
    check(!ok, "broadcast address never claimed");
    mb_lower = 32'h0010_0000;
    enable = 0;
    mcycle(32'h0010_0002, 0, d, ok, r);
    check(!ok, "disabled: not claimed");
    enable = 1;
    // a run of random writes and reads
    for (int k = 0; k < 20; k++) begin
      logic [31:0] a;
      a = 32'h0010_0000 | 32'($urandom_range(0, 255));
      d = {$urandom, $urandom, $urandom, $urandom};
      mcycle(a, 0, d, ok, r);
      mcycle(a, 1, '0, ok, r);
      check(ok && r == d, $sformatf("random word %0d round trip", k));
    end
    check(early_ddone == 0, "DDONE never before the local beats finished");
    check(hold_low_in_beat == 0, "hold high while beats pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
