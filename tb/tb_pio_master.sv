// tb_pio_master: self-checking test of PCI-initiated PIO (windows A and B).
// A behavioural MBus master stands in for mbus_master: it takes a
// programmable number of clocks to win the bus, then completes the cycle
// against an MBus memory model (or times out when told to).
// Checks: PCI -> MBus address translation (the document's worked example:
// translation base 0x100000, PCI offset 0x00 -> MBus 0x100000, 0x10 ->
// 0x100001); window A collects a burst and writes on its last beat; window B
// writes when the upper 32 bits of a word are written (32-bit and 64-bit
// beats); aligned reads start an MBus read and the rest of the word comes
// from the buffer; retry after RETRY_LIMIT clocks without the bus; retry when
// an MBus-side access is in progress; timeout gives all ones and the error
// register reflects the last transaction.
module tb_pio_master;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] pci_tb = 32'h0010_0000;
  logic tgt_busy = 0;
  lb_req_t lb_req;
  lb_rsp_t lb_rsp;
  logic [2:0] err;
  logic mm_req, mm_abort, mm_rd, mm_done = 0, mm_timeout = 0, mm_waiting = 0;
  logic [31:0] mm_addr;
  logic [127:0] mm_wdata, mm_rdata = 0;
  logic ev_retry, ev_buf_hit;
  int checks = 0, failures = 0;

  pio_master #(.RETRY_LIMIT(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ----------------------------------------------- MBus master model
  logic [127:0] mbmem [logic [31:0]];
  int grant_delay = 2, n_cycles = 0, n_reads = 0;
  bit no_target = 0;
  logic [31:0] last_addr;
  initial forever begin
    @(posedge clk);
    if (mm_req && !mm_done) begin
      int w;
      w = 0;
      #1 mm_waiting = 1;
      while (w < grant_delay) begin
        @(posedge clk);
        if (mm_abort) break;
        w++;
      end
      if (mm_abort) begin #1 mm_waiting = 0; continue; end
      #1 mm_waiting = 0;
      repeat (3) @(posedge clk);
      n_cycles++;
      last_addr = mm_addr;
      if (no_target) mm_timeout = 1;
      else begin
        mm_timeout = 0;
        if (mm_rd) begin n_reads++; mm_rdata = mbmem.exists(mm_addr) ? mbmem[mm_addr] : '0; end
        else mbmem[mm_addr] = mm_wdata;
      end
      #1 mm_done = 1;
      @(posedge clk); #1 mm_done = 0;
    end
  end

  // One local bus beat; returns data and whether it was retried.
  task automatic beat(input lb_win_e win, input logic [19:0] a, input logic wr, input logic s64,
                      input logic last, input logic [63:0] d,
                      output logic [63:0] rd, output bit retried);
    @(negedge clk);
    lb_req.valid = 1; lb_req.win = win; lb_req.addr = a; lb_req.write = wr;
    lb_req.size64 = s64; lb_req.last = last; lb_req.wdata = d;
    do @(posedge clk); while (!lb_rsp.ready && !lb_rsp.retry);
    rd = lb_rsp.rdata; retried = lb_rsp.retry;
    #1 lb_req.valid = 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    bit rt;
    int n0;
    logic [127:0] w;
    lb_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // document example: offsets 0x00 and 0x10 of window A
    beat(WIN_A, 20'h00000, 1, 0, 1, 64'h1111_2222, r, rt);
    check(!rt && last_addr == 32'h0010_0000, "PCI 0x...00 -> MBus 0x100000");
    check(mbmem[32'h0010_0000][31:0] == 32'h1111_2222, "single 32-bit write in lane 0");
    beat(WIN_A, 20'h00010, 1, 0, 1, 64'h3333_4444, r, rt);
    check(last_addr == 32'h0010_0001, "PCI 0x...10 -> MBus 0x100001");
    // window A burst of four 32-bit beats
    n0 = n_cycles;
    w = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 4; i++) begin
      beat(WIN_A, 20'h00020 + 20'(4*i), 1, 0, i == 3, {32'h0, w[32*i +: 32]}, r, rt);
      if (i < 3) check(n_cycles == n0, "window A waits for the last beat");
    end
    check(n_cycles == n0 + 1, "window A: one MBus cycle per burst");
    check(mbmem[32'h0010_0002] == w, "window A: 128 bits assembled");
    // window B, two 64-bit beats
    n0 = n_cycles;
    w = {$urandom, $urandom, $urandom, $urandom};
    beat(WIN_B, 20'h00030, 1, 1, 0, w[63:0], r, rt);
    check(n_cycles == n0, "window B: lower half does not start a cycle");
    beat(WIN_B, 20'h00038, 1, 1, 1, w[127:64], r, rt);
    check(n_cycles == n0 + 1 && mbmem[32'h0010_0003] == w, "window B: 64-bit pair written");
    // window B, 32-bit beats: the write to offset 0xC starts the cycle
    n0 = n_cycles;
    w = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 4; i++) begin
      beat(WIN_B, 20'h00040 + 20'(4*i), 1, 0, 0, {32'h0, w[32*i +: 32]}, r, rt);
      check(n_cycles == n0 + (i == 3 ? 1 : 0), $sformatf("window B 32-bit beat %0d", i));
    end
    check(mbmem[32'h0010_0004] == w, "window B: 32-bit quad written");
    // translation base upper bits
    pci_tb = 32'h00AB_FFFF;
    beat(WIN_B, 20'hFFF8, 1, 1, 1, 64'h5, r, rt);
    check(last_addr == 32'h00AB_0FFF, "translation uses base bits 31:16 and PCI bits 19:4");
    pci_tb = 32'h0010_0000;
    // reads: aligned read starts the MBus read, the rest comes from the buffer
    w = {$urandom, $urandom, $urandom, $urandom};
    mbmem[32'h0010_0007] = w;
    n0 = n_reads;
    beat(WIN_A, 20'h00070, 0, 1, 0, 0, r, rt);
    check(r == w[63:0] && n_reads == n0 + 1, "aligned 64-bit read");
    beat(WIN_A, 20'h00078, 0, 1, 1, 0, r, rt);
    check(r == w[127:64] && n_reads == n0 + 1, "second half from the buffer");
    beat(WIN_B, 20'h00074, 0, 0, 1, 0, r, rt);
    check(r == {32'h0, w[63:32]} && n_reads == n0 + 1, "32-bit read from the buffer");
    // no grant within 16 clocks: retry
    grant_delay = 40;
    beat(WIN_A, 20'h00080, 1, 0, 1, 64'h9, r, rt);
    check(rt, "retry when the bus is not won in time");
    check(err == 3'b010, "error register: no grant");
    grant_delay = 2;
    beat(WIN_A, 20'h00080, 1, 0, 1, 64'h9, r, rt);
    check(!rt && err == 3'b000, "repeated transaction succeeds, error cleared");
    // MBus-side access in progress: PCI side loses
    tgt_busy = 1;
    beat(WIN_A, 20'h00090, 0, 0, 1, 0, r, rt);
    check(rt && err == 3'b100, "MBus-originated access takes precedence");
    tgt_busy = 0;
    // timeout
    no_target = 1;
    beat(WIN_A, 20'h000A0, 0, 1, 1, 0, r, rt);
    check(!rt && r == '1, "timeout read returns all ones");
    check(err == 3'b001, "error register: timeout");
    no_target = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
