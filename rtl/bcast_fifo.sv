// bcast_fifo: broadcast data/address FIFO of the MBus DMA path.
//
// Every MBus broadcast write to a DMA channel stores one entry: the 128-bit
// MBus data word together with the 10-bit channel number (MBus address bits
// 9:0), 138 bits in all. The FIFO is 4K entries deep, as in the document
// (128 bits x 4K data FIFO plus a 10 bits x 4K address FIFO, kept here as one
// wide memory so both halves always stay aligned).
//
// Interface: write side wr_en/wr_data with full; read side is first-word
// fall-through: rd_data always shows the head entry while empty is low, and
// rd_en pops it. clr empties the FIFO (I/O control register "clear fifo").
// Timing: one write and one read per clock, written data visible at the head
// on the following clock. A write while full is ignored and a read while
// empty is ignored; the caller decides whether data is dropped or held off.
// The memory is read asynchronously (fall-through); this is this design's
// choice, the document only gives the sizes.
module bcast_fifo #(
  parameter int unsigned WIDTH = 138,
  parameter int unsigned DEPTH = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign count   = wr_ptr - rd_ptr;
  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // A full FIFO never reports empty and vice versa.
  assert property (@(posedge clk) disable iff (!rst_n) !(full && empty));

endmodule
