// pio_target: MBus-initiated programmed I/O into host (PCI) memory.
//
// Another board on the MBus reads or writes this board's memory through an
// MBus address window. An MBus cycle is claimed when the upper 16 bits of
// its address lie between the MBus Lower Memory Address (inclusive) and the
// MBus Upper Memory Address (exclusive), compared on their upper 16 bits, so
// the smallest window is 64K MBus words. The PCI address is the MBus
// Translation Base bits 31:20, then MBus address bits 15:0, then four zero
// bits (MBus words are 16 bytes), as in the document's translation figure;
// only 1 MB of PCI memory is reachable.
//
// A claimed cycle becomes two 64-bit beats on the local bus, issued by this
// block as local bus master (lm_*): bits 63:0 at the PCI address, bits
// 127:64 at PCI address + 8. DDONE is given only after both beats have
// finished (coupled transaction); for a read the 128-bit word is driven on
// the MBus data lines together with DDONE. DDONE is held until the master
// drops DSTROBE.
//
// Interface: lm_valid/lm_write/lm_addr/lm_wdata are held until lm_ready;
// lm_rdata is sampled with lm_ready. busy is high from claim to the end of
// the MBus handshake and tells the PCI-side PIO that the MBus side has
// precedence; hold is high while beats are pending and halts DMA.
// Enable is the I/O control "enable PIO Target" bit. The exclusive upper
// bound and the beat order are this design's choices.
module pio_target
  import l2b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [31:0] mb_upper,   // MBus Upper Memory Address (0x14)
  input  logic [31:0] mb_lower,   // MBus Lower Memory Address (0x18)
  input  logic [31:0] mb_tb,      // MBus Translation Base (0x1C)
  input  mb_sig_t     mb_i,
  output logic        ddone,
  output logic [MB_DATA_W-1:0] da_out,
  output logic        da_oe,
  // local bus master
  output logic        lm_valid,
  output logic        lm_write,
  output logic [31:0] lm_addr,
  output logic [63:0] lm_wdata,
  input  logic        lm_ready,
  input  logic [63:0] lm_rdata,
  output logic        busy,
  output logic        hold
);
  typedef enum logic [1:0] {S_IDLE, S_BEAT0, S_BEAT1, S_ACK} state_e;
  state_e state;

  logic [MB_DATA_W-1:0] data;
  logic                 rd;
  logic [31:0]          pci;

  wire [15:0] hi  = mb_i.ad[31:16];
  wire in_win     = (hi >= mb_lower[31:16]) && (hi < mb_upper[31:16]);
  wire is_bcast   = (mb_i.ad[31:BC_ADDR_W] == '0);
  wire claim      = enable && mb_i.dstrobe && in_win && !is_bcast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      data  <= '0;
      rd    <= 1'b0;
      pci   <= '0;
      ddone <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (claim) begin
          rd    <= mb_i.rd;
          data  <= mb_i.da;
          pci   <= {mb_tb[31:20], mb_i.ad[15:0], 4'h0};
          state <= S_BEAT0;
        end
        S_BEAT0: if (lm_ready) begin
          if (rd) data[63:0] <= lm_rdata;
          state <= S_BEAT1;
        end
        S_BEAT1: if (lm_ready) begin
          if (rd) data[127:64] <= lm_rdata;
          state <= S_ACK;
          ddone <= 1'b1;
        end
        S_ACK: if (!mb_i.dstrobe) begin
          ddone <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign lm_valid = (state == S_BEAT0) || (state == S_BEAT1);
  assign lm_write = !rd;
  assign lm_addr  = (state == S_BEAT1) ? pci + 32'd8 : pci;
  assign lm_wdata = (state == S_BEAT1) ? data[127:64] : data[63:0];
  assign da_out   = data;
  assign da_oe    = (state == S_ACK) && rd;
  assign busy     = (state != S_IDLE) || claim;
  assign hold     = lm_valid || claim;

endmodule
