// tb_dma_engine: self-checking test of the DMA engine with the real FIFO and
// Mapper and a behavioural PLX DMA channel.
// The PLX model accepts each set-up command, then reads 64-bit beats from
// the DMA data port back to back until a beat carries eot, writing them to
// a host memory model from the commanded PCI address upward.
// Checks: bursts split exactly where the channel changes, burst start
// addresses come from the Mapper and continue where the previous burst of a
// channel stopped, every data word lands at the right host address, Mapper
// entries end at start + 16 x words, a burst of N MBus words takes 2N beats
// in 2N clocks, DMA disabled moves nothing, and pio_hold ends a burst at an
// MBus word boundary after which the transfer resumes.
module tb_dma_engine;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dma_en = 0, pio_hold = 0;
  logic fifo_wr = 0, fifo_full, fifo_rd, fifo_empty;
  logic [137:0] fifo_wdata, fifo_head;
  logic [12:0] fifo_count;
  logic map_rd, map_inc, cpu_req = 0, cpu_we = 0, cpu_ack;
  logic [9:0] map_idx, cpu_idx = 0;
  logic [31:0] map_cur, map_rdata, map_next, cpu_wdata = 0, cpu_rdata;
  logic cmd_valid, cmd_ready = 0;
  logic [31:0] cmd_pci_addr;
  lb_req_t lb_req;
  lb_rsp_t lb_rsp;
  logic ev_burst_start, ev_burst_end, ev_chan_change, ev_preempt, busy;
  int checks = 0, failures = 0;

  bcast_fifo #(.WIDTH(138), .DEPTH(64)) u_fifo (.clk, .rst_n, .clr(1'b0), .wr_en(fifo_wr),
    .wr_data(fifo_wdata), .full(fifo_full), .rd_en(fifo_rd), .rd_data(fifo_head),
    .empty(fifo_empty), .count(fifo_count[6:0]));
  dma_mapper u_map (.clk, .rst_n, .cpu_req, .cpu_we, .cpu_idx, .cpu_wdata, .cpu_ack, .cpu_rdata,
    .dma_rd(map_rd), .dma_inc(map_inc), .dma_idx(map_idx), .dma_cur(map_cur),
    .dma_rdata(map_rdata), .dma_next(map_next));
  dma_engine dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------- PLX DMA model
  logic [63:0] host [logic [31:0]];
  int burst_n = 0;
  logic [31:0] burst_addr [$];
  int burst_beats [$];
  int burst_clocks [$];

  initial begin
    lb_req = '0;
    forever begin
      logic [31:0] a;
      int beats, t0;
      @(posedge clk);
      if (cmd_valid) begin
        a = cmd_pci_addr;
        #1 cmd_ready = 1;
        @(posedge clk); #1 cmd_ready = 0;
        burst_addr.push_back(a);
        beats = 0; t0 = $time;
        lb_req = '0;
        lb_req.valid = 1; lb_req.win = WIN_DMA; lb_req.size64 = 1;
        forever begin
          @(posedge clk);
          if (lb_rsp.ready) begin
            host[a] = lb_rsp.rdata;
            a += 8; beats++;
            if (lb_rsp.eot) break;
          end
        end
        #1 lb_req.valid = 0;
        burst_beats.push_back(beats);
        burst_clocks.push_back(($time - t0) / 10);
        burst_n++;
      end
    end
  end

  task automatic map_write(input logic [9:0] i, input logic [31:0] v);
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_idx = i; cpu_wdata = v;
    do @(posedge clk); while (!cpu_ack);
    @(negedge clk); cpu_req = 0;
  endtask
  task automatic map_read(input logic [9:0] i, output logic [31:0] v);
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_idx = i;
    do @(posedge clk); while (!cpu_ack);
    #1 v = cpu_rdata;
    @(negedge clk); cpu_req = 0;
  endtask

  logic [127:0] words [$];
  logic [9:0]   chans [$];
  task automatic push(input logic [9:0] ch);
    logic [127:0] d;
    d = {$urandom, $urandom, $urandom, $urandom};
    words.push_back(d); chans.push_back(ch);
    @(negedge clk); fifo_wr = 1; fifo_wdata = {ch, d};
    @(negedge clk); fifo_wr = 0;
  endtask

  int n_preempt = 0, n_change = 0;
  always @(posedge clk) begin
    if (ev_preempt) n_preempt++;
    if (ev_chan_change) n_change++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    map_write(10'd5, 32'h1000_0000);
    map_write(10'd7, 32'h2000_0000);
    // ch5 x3, ch7 x2, ch5 x1
    push(5); push(5); push(5); push(7); push(7); push(5);
    repeat (10) @(posedge clk);
    check(burst_n == 0 && !fifo_empty, "nothing moves while DMA disabled");
    @(negedge clk); dma_en = 1;
    wait (fifo_empty && !busy);
    repeat (5) @(posedge clk);
    check(burst_n == 3, $sformatf("three bursts (%0d)", burst_n));
    check(burst_addr[0] == 32'h1000_0000 && burst_beats[0] == 6, "burst 0: ch5, 3 words");
    check(burst_addr[1] == 32'h2000_0000 && burst_beats[1] == 4, "burst 1: ch7, 2 words");
    check(burst_addr[2] == 32'h1000_0030 && burst_beats[2] == 2, "burst 2: ch5 resumes at +48");
    check(burst_clocks[0] == 6, $sformatf("6 beats in 6 clocks (%0d)", burst_clocks[0]));
    check(n_change == 2, "two channel-change ends");
    begin
      logic [31:0] a5, a7;
      a5 = 32'h1000_0000; a7 = 32'h2000_0000;
      foreach (words[i]) begin
        logic [31:0] a;
        if (chans[i] == 5) begin a = a5; a5 += 16; end
        else               begin a = a7; a7 += 16; end
        check(host.exists(a) && host.exists(a + 8) && host[a] == words[i][63:0] &&
              host[a + 8] == words[i][127:64], $sformatf("word %0d at %h", i, a));
      end
    end
    map_read(10'd5, v); check(v == 32'h1000_0040, "Mapper ch5 end address");
    map_read(10'd7, v); check(v == 32'h2000_0020, "Mapper ch7 end address");
    // PIO hold in the middle of a long burst
    words.delete(); chans.delete();
    @(negedge clk); dma_en = 0;
    for (int i = 0; i < 8; i++) push(9);
    map_write(10'd9, 32'h3000_0000);
    burst_n = 0; burst_addr.delete(); burst_beats.delete(); burst_clocks.delete();
    @(negedge clk); dma_en = 1;
    repeat (7) @(posedge clk);
    @(negedge clk); pio_hold = 1;
    repeat (10) @(posedge clk);
    check(burst_n == 1 && !busy, "burst ended under pio_hold");
    check(burst_beats[0] % 2 == 0 && burst_beats[0] < 16, "ended at an MBus word boundary");
    check(n_preempt == 1, "one preemption");
    @(negedge clk); pio_hold = 0;
    wait (fifo_empty && !busy);
    repeat (5) @(posedge clk);
    check(burst_n == 2, "transfer resumed after hold");
    check(burst_addr[1] == 32'h3000_0000 + 32'(burst_beats[0]) * 8, "resume address continues");
    check(burst_beats[0] + burst_beats[1] == 16, "all 8 words sent");
    foreach (words[i])
      check(host[32'h3000_0000 + i*16] == words[i][63:0] &&
            host[32'h3000_0008 + i*16] == words[i][127:64], $sformatf("held-run word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
