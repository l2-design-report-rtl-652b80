// dma_mapper: the DMA Translation Buffer ("Mapper").
//
// One 32-bit PCI memory address per broadcast channel, 1024 channels (4 KB).
// Software writes the start address of each channel before an event and
// reads the end address afterwards: the difference is the number of bytes
// that channel delivered. The DMA engine reads the entry of the channel at
// the FIFO head and, for every 16-byte MBus word sent, writes back the
// address advanced by 16 bytes.
//
// The advance follows the original boards exactly: a 16-bit adder works on
// address bits 18:3 (adding 2 there adds 16 bytes), bits 31:19 and 2:0 are
// never changed, so a channel wraps inside its 512 KB region instead of
// crossing it.
//
// Ports: one memory port shared by two users. The DMA side (dma_rd,
// dma_inc) always wins and is served in the cycle it asks; dma_rdata is
// valid the clock after dma_rd. The CPU side holds cpu_req until cpu_ack
// pulses; read data is on cpu_rdata with cpu_ack. The shared single port
// and DMA priority are this design's choices.
module dma_mapper
  import l2b_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CPU (Control & Monitor window, offsets 0x1000-0x1FFF)
  input  logic                     cpu_req,
  input  logic                     cpu_we,
  input  logic [$clog2(DEPTH)-1:0] cpu_idx,
  input  logic [31:0]              cpu_wdata,
  output logic                     cpu_ack,
  output logic [31:0]              cpu_rdata,
  // DMA engine
  input  logic                     dma_rd,
  input  logic                     dma_inc,
  input  logic [$clog2(DEPTH)-1:0] dma_idx,
  input  logic [31:0]              dma_cur,   // address of the word just sent
  output logic [31:0]              dma_rdata,
  output logic [31:0]              dma_next   // dma_cur advanced by 16 bytes
);
  logic [31:0] mem [DEPTH];

  // 16-bit adder on bits 18:3; one MBus word = 16 bytes = 2 in bit 3 units.
  logic [15:0] mid_next;
  assign mid_next = dma_cur[18:3] + 16'd2;
  assign dma_next = {dma_cur[31:19], mid_next, dma_cur[2:0]};

  wire dma_busy = dma_rd || dma_inc;
  wire cpu_go   = cpu_req && !dma_busy && !cpu_ack;

  always_ff @(posedge clk) begin
    if (dma_inc)
      mem[dma_idx] <= dma_next;
    else if (cpu_go && cpu_we)
      mem[cpu_idx] <= cpu_wdata;
    if (dma_rd) dma_rdata <= mem[dma_idx];
    if (cpu_go) cpu_rdata <= mem[cpu_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cpu_ack <= 1'b0;
    else        cpu_ack <= cpu_go;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(dma_rd && dma_inc));

endmodule
