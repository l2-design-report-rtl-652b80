// tb_ctrl_regs: self-checking test of the Control & Monitor register window.
// Drives 32-bit local bus beats at window-0 offsets and checks: the I/O
// control bits (stored bits read back, clear-FIFO is a one-clock pulse that
// reads 0), the four PIO configuration registers, the read-only MBus error
// register, forwarding of the TSI range to the TSI port (with a small TSI
// register model), and Mapper beats that wait for the Mapper's acknowledge
// (modelled here with a random delay) and map offset 0x1000 + 4n to entry n.
module tb_ctrl_regs;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  lb_req_t lb_req;
  lb_rsp_t lb_rsp;
  logic dma_en, bc_lockout, clr_fifo, pio_tgt_en, pio_to_fifo;
  logic [31:0] pci_tb, mb_upper, mb_lower, mb_tb;
  logic [2:0] mb_err = 3'b101;
  logic tsi_sel, tsi_we;
  logic [15:0] tsi_addr;
  logic [31:0] tsi_wdata, tsi_rdata;
  logic map_req, map_we, map_ack;
  logic [9:0] map_idx;
  logic [31:0] map_wdata, map_rdata;
  int checks = 0, failures = 0, clr_pulses = 0;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;

  // TSI model: echoes the offset in the upper half
  assign tsi_rdata = {tsi_addr, 16'h7A5E};

  // Mapper model: 1024 words, acknowledges after 1..4 clocks
  logic [31:0] mem [1024];
  int wait_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin map_ack <= 0; wait_cnt <= 0; end
    else if (map_req && !map_ack) begin
      if (wait_cnt == 0) wait_cnt <= 1 + ($urandom % 4);
      else if (wait_cnt == 1) begin
        map_ack <= 1; wait_cnt <= 0;
        if (map_we) mem[map_idx] <= map_wdata;
        map_rdata <= mem[map_idx];
      end else wait_cnt <= wait_cnt - 1;
    end else map_ack <= 0;
  end
  always_ff @(posedge clk) if (clr_fifo) clr_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic beat(input bit w, input logic [15:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    lb_req = '0; lb_req.valid = 1; lb_req.win = WIN_CTRL; lb_req.addr = {4'h0, a};
    lb_req.write = w; lb_req.last = 1; lb_req.wdata = {32'hFFFF_FFFF, d};
    #1;
    while (!lb_rsp.ready) begin @(negedge clk); #1; end
    q = lb_rsp.rdata[31:0];
    check(!lb_rsp.retry && lb_rsp.rdata[63:32] == 0, "answer has no retry and zero upper half");
    @(posedge clk); #1 lb_req.valid = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    lb_req = '0;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!dma_en && !bc_lockout && !pio_tgt_en && !pio_to_fifo, "reset: all disabled");
    beat(1, OFS_IOCTRL, 32'hFFFF_FFFF, q);
    check(dma_en && bc_lockout && pio_tgt_en && pio_to_fifo, "I/O control bits set");
    check(clr_pulses == 1, "clear FIFO pulse on write");
    beat(0, OFS_IOCTRL, 0, q);
    check(q == 32'h0000_0303, "I/O control reads stored bits only");
    beat(1, OFS_IOCTRL, 32'h0000_0101, q);
    check(dma_en && !bc_lockout && pio_tgt_en && !pio_to_fifo, "I/O control bits cleared");
    check(clr_pulses == 1, "no clear pulse without bit 2");
    beat(1, OFS_PCI_TB,   32'h1234_0000, q);
    beat(1, OFS_MB_UPPER, 32'h0050_0000, q);
    beat(1, OFS_MB_LOWER, 32'h0040_0000, q);
    beat(1, OFS_MB_TB,    32'hABC0_0000, q);
    check(pci_tb == 32'h1234_0000 && mb_upper == 32'h0050_0000 &&
          mb_lower == 32'h0040_0000 && mb_tb == 32'hABC0_0000, "PIO configuration outputs");
    beat(0, OFS_PCI_TB, 0, q);   check(q == 32'h1234_0000, "read 0x10");
    beat(0, OFS_MB_UPPER, 0, q); check(q == 32'h0050_0000, "read 0x14");
    beat(0, OFS_MB_LOWER, 0, q); check(q == 32'h0040_0000, "read 0x18");
    beat(0, OFS_MB_TB, 0, q);    check(q == 32'hABC0_0000, "read 0x1C");
    beat(1, OFS_MB_ERR, 32'h7, q);
    beat(0, OFS_MB_ERR, 0, q);   check(q == 32'h5, "error register is read-only");
    beat(0, 16'h0024, 0, q);     check(q == 0, "unmapped offset reads 0");
    // TSI forwarding
    fork
      beat(0, TSI_ICTRL, 0, q);
      begin @(negedge clk); #1 check(tsi_sel && !tsi_we && tsi_addr == TSI_ICTRL, "TSI read forwarded"); end
    join
    check(q == {TSI_ICTRL, 16'h7A5E}, "TSI read data");
    fork
      beat(1, TSI_GA, 32'h55, q);
      begin @(negedge clk); #1 check(tsi_sel && tsi_we && tsi_wdata == 32'h55, "TSI write forwarded"); end
    join
    beat(0, 16'h0100, 0, q); check(q == {16'h0100, 16'h7A5E}, "TSI range low end");
    beat(0, 16'h00FC, 0, q); check(q == 0, "below TSI range");
    // Mapper
    for (int n = 0; n < 40; n++) begin
      automatic int idx = (n * 97 + 3) % 1024;
      beat(1, 16'h1000 + 16'(idx * 4), 32'hC000_0000 + idx, q);
    end
    for (int n = 0; n < 40; n++) begin
      automatic int idx = (n * 97 + 3) % 1024;
      beat(0, 16'h1000 + 16'(idx * 4), 0, q);
      check(q == 32'hC000_0000 + idx, $sformatf("Mapper entry %0d", idx));
      check(mem[idx] == 32'hC000_0000 + idx, "Mapper model holds entry");
    end
    beat(0, 16'h1FFC, 0, q);
    check(q == mem[1023], "last Mapper entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
