// tb_dma_mapper: self-checking test of the DMA Translation Buffer.
// Writes all 1024 entries through the CPU port and reads them back; reads
// entries through the DMA port; advances entries with dma_inc and checks
// the 16-byte step, including the wrap inside a 512 KB region (bits 31:19
// and 2:0 never change); checks that the DMA port has priority (the CPU
// access is delayed, not lost) and that the CPU sees the advanced address.
module tb_dma_mapper;
  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack;
  logic [9:0] cpu_idx = 0, dma_idx = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata, dma_cur = 0, dma_rdata, dma_next;
  logic dma_rd = 0, dma_inc = 0;
  int checks = 0, failures = 0;
  logic [31:0] model [1024];

  dma_mapper dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: add 16 bytes inside the 512 KB region of the address.
  function automatic logic [31:0] ref_next(input logic [31:0] a);
    return (a & 32'hFFF8_0000) | (((a & 32'h0007_FFFF) + 32'd16) & 32'h0007_FFFF);
  endfunction

  task automatic cpu(input logic we, input logic [9:0] idx, input logic [31:0] wd,
                     output logic [31:0] rd, output int waited);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_idx = idx; cpu_wdata = wd;
    waited = 0;
    do begin @(posedge clk); #1; waited++; end while (!cpu_ack);
    rd = cpu_rdata;
    @(negedge clk); cpu_req = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      model[i] = $urandom & 32'hFFFF_FFF0;
      cpu(1, i[9:0], model[i], r, w);
    end
    check(w == 1, "CPU access takes one clock when DMA is idle");
    for (int i = 0; i < 1024; i += 7) begin
      cpu(0, i[9:0], 0, r, w);
      check(r == model[i], $sformatf("CPU readback %0d", i));
    end
    // DMA read port
    for (int i = 3; i < 1024; i += 101) begin
      @(negedge clk); dma_rd = 1; dma_idx = i[9:0];
      @(negedge clk); dma_rd = 0;
      check(dma_rdata == model[i], $sformatf("DMA read %0d", i));
    end
    // increments, random and at the 512 KB edge
    for (int k = 0; k < 200; k++) begin
      logic [31:0] cur;
      int i;
      i = $urandom_range(0, 1023);
      cur = (k % 4 == 0) ? ($urandom | 32'h0007_FFF0) : $urandom;
      @(negedge clk); dma_inc = 1; dma_idx = i[9:0]; dma_cur = cur;
      #1 check(dma_next == ref_next(cur), $sformatf("next(%h)=%h", cur, dma_next));
      model[i] = ref_next(cur);
      @(negedge clk); dma_inc = 0;
    end
    check(ref_next(32'h0207_FFF0) == 32'h0200_0000, "reference wraps at 512 KB");
    for (int i = 0; i < 1024; i += 3) begin
      cpu(0, i[9:0], 0, r, w);
      check(r == model[i], $sformatf("readback after inc %0d", i));
    end
    // DMA priority: CPU request while DMA port busy for 3 clocks
    fork
      begin
        @(negedge clk); dma_rd = 1; dma_idx = 10'd1;
        repeat (3) @(negedge clk);
        dma_rd = 0;
      end
      begin
        @(negedge clk);
        cpu(0, 10'd2, 0, r, w);
      end
    join
    check(w >= 3, $sformatf("CPU waits for DMA (%0d clocks)", w));
    check(r == model[2], "delayed CPU read correct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
