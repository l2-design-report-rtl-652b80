// ctrl_regs: the Control & Monitor window (PLX window 0) of the FPGA.
//
// Decodes 32-bit register accesses in the 64 KB Control & Monitor window:
//   0x000          I/O control: enable DMA (bit 0), broadcast lockout (1),
//                  clear FIFO (2, write-only pulse), enable PIO target (8),
//                  PIO write to FIFO (9); other bits read 0.
//   0x010-0x020    PIO configuration: PCI Translation Base, MBus Upper and
//                  Lower Memory Address, MBus Translation Base, MBus error
//                  register (read from the PIO master).
//   0x100-0x148    TSI registers (forwarded to the tsi block).
//   0x1000-0x1FFF  Mapper: entry n at 0x1000 + 4n, n = broadcast channel.
// Register and TSI beats are answered in the clock they arrive; Mapper
// beats wait for the Mapper's port (the DMA engine has priority there).
// Unmapped offsets read 0 and ignore writes. Only data bits 31:0 of a beat
// are used. Register reset values are 0 (DMA and PIO target disabled).
// The offsets and bit positions are the document's; writes to the error
// register being ignored and the "PIO write to FIFO" bit being only stored
// (its effect is not described) are this design's choices.
module ctrl_regs
  import l2b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lb_req_t     lb_req,        // beats of window 0 only
  output lb_rsp_t     lb_rsp,
  // I/O control
  output logic        dma_en,
  output logic        bc_lockout,
  output logic        clr_fifo,
  output logic        pio_tgt_en,
  output logic        pio_to_fifo,
  // PIO configuration
  output logic [31:0] pci_tb,
  output logic [31:0] mb_upper,
  output logic [31:0] mb_lower,
  output logic [31:0] mb_tb,
  input  logic [2:0]  mb_err,
  // TSI register port
  output logic        tsi_sel,
  output logic        tsi_we,
  output logic [15:0] tsi_addr,
  output logic [31:0] tsi_wdata,
  input  logic [31:0] tsi_rdata,
  // Mapper CPU port
  output logic        map_req,
  output logic        map_we,
  output logic [9:0]  map_idx,
  output logic [31:0] map_wdata,
  input  logic        map_ack,
  input  logic [31:0] map_rdata
);
  logic [31:0] ioctrl;

  wire [15:0] ofs   = lb_req.addr[15:0];
  wire is_tsi = (ofs >= OFS_TSI_LO) && (ofs <= OFS_TSI_HI);
  wire is_map = (ofs >= OFS_MAP_LO) && (ofs <= OFS_MAP_HI);
  wire wr     = lb_req.valid && lb_req.write;

  assign dma_en      = ioctrl[IOC_DMA_EN];
  assign bc_lockout  = ioctrl[IOC_BC_LOCKOUT];
  assign pio_tgt_en  = ioctrl[IOC_PIO_TGT_EN];
  assign pio_to_fifo = ioctrl[IOC_PIO_TO_FIFO];
  assign clr_fifo    = wr && (ofs == OFS_IOCTRL) && lb_req.wdata[IOC_CLR_FIFO];

  assign tsi_sel   = lb_req.valid && is_tsi;
  assign tsi_we    = lb_req.write;
  assign tsi_addr  = ofs;
  assign tsi_wdata = lb_req.wdata[31:0];

  assign map_req   = lb_req.valid && is_map;
  assign map_we    = lb_req.write;
  assign map_idx   = ofs[11:2];
  assign map_wdata = lb_req.wdata[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ioctrl   <= '0;
      pci_tb   <= '0;
      mb_upper <= '0;
      mb_lower <= '0;
      mb_tb    <= '0;
    end else if (wr) begin
      unique case (ofs)
        OFS_IOCTRL: begin
          ioctrl <= '0;
          ioctrl[IOC_DMA_EN]      <= lb_req.wdata[IOC_DMA_EN];
          ioctrl[IOC_BC_LOCKOUT]  <= lb_req.wdata[IOC_BC_LOCKOUT];
          ioctrl[IOC_PIO_TGT_EN]  <= lb_req.wdata[IOC_PIO_TGT_EN];
          ioctrl[IOC_PIO_TO_FIFO] <= lb_req.wdata[IOC_PIO_TO_FIFO];
        end
        OFS_PCI_TB:   pci_tb   <= lb_req.wdata[31:0];
        OFS_MB_UPPER: mb_upper <= lb_req.wdata[31:0];
        OFS_MB_LOWER: mb_lower <= lb_req.wdata[31:0];
        OFS_MB_TB:    mb_tb    <= lb_req.wdata[31:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    lb_rsp = LB_RSP_IDLE;
    if (lb_req.valid) begin
      if (is_map) begin
        lb_rsp.ready = map_ack;
        lb_rsp.rdata = {32'h0, map_rdata};
      end else begin
        lb_rsp.ready = 1'b1;
        if (is_tsi) lb_rsp.rdata = {32'h0, tsi_rdata};
        else begin
          unique case (ofs)
            OFS_IOCTRL:   lb_rsp.rdata = {32'h0, ioctrl};
            OFS_PCI_TB:   lb_rsp.rdata = {32'h0, pci_tb};
            OFS_MB_UPPER: lb_rsp.rdata = {32'h0, mb_upper};
            OFS_MB_LOWER: lb_rsp.rdata = {32'h0, mb_lower};
            OFS_MB_TB:    lb_rsp.rdata = {32'h0, mb_tb};
            OFS_MB_ERR:   lb_rsp.rdata = {61'h0, mb_err};
            default:      lb_rsp.rdata = '0;
          endcase
        end
      end
    end
  end

endmodule
