// l2b_pkg: types and constants shared by the L2beta adapter-card FPGA.
//
// The FPGA sits between the PLX 9656 local bus (PCI side) and the Magic Bus
// (MBus) backplane of a Level 2 trigger crate. This package holds:
//   * the local bus request/response structs used by every local bus target
//     (register window, PIO windows A/B and the DMA data port),
//   * the MBus signal bundle (128-bit data, 32-bit address, RD, DSTROBE,
//     DDONE) in active-high form,
//   * the register offsets of the Control & Monitor window (window 0).
// Register offsets, field positions, FIFO and Mapper sizes follow the
// document's tables; the local-bus struct layout and the window encoding are
// this design's own choice.
package l2b_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned MB_DATA_W   = 128;  // MBus data, one MBWORD
  localparam int unsigned MB_ADDR_W   = 32;   // MBus address (MBWORD units)
  localparam int unsigned BC_ADDR_W   = 10;   // broadcast channel number 0..1023
  localparam int unsigned MAP_DEPTH   = 1024; // Mapper entries

  // ------------------------------------------------- PLX local bus windows
  // Which PLX PCI window (Table 4) a local bus access came through. Window 3
  // is reserved in the PLX; this design uses it as the DMA data port from
  // which the PLX DMA engine reads FIFO data.
  typedef enum logic [1:0] {
    WIN_CTRL = 2'd0,   // Control & Monitor, 64 KB
    WIN_A    = 2'd1,   // PIO window A, 64 KB
    WIN_B    = 2'd2,   // PIO window B, 64 KB
    WIN_DMA  = 2'd3    // DMA data port
  } lb_win_e;

  // One local bus data beat offered by the PLX (local bus master).
  // Held stable while valid is high, until the target answers ready or retry.
  typedef struct packed {
    logic        valid;
    lb_win_e     win;
    logic [19:0] addr;    // byte address, PCI address bits 19:0
    logic        write;
    logic        size64;  // 1: 64-bit beat, 0: 32-bit beat in wdata[31:0]
    logic        last;    // last beat of the PCI burst
    logic [63:0] wdata;
  } lb_req_t;

  // Target's answer to a beat.
  typedef struct packed {
    logic        ready;   // beat done (rdata valid for reads)
    logic        retry;   // target asks the PLX to STOP and retry
    logic        eot;     // DMA port: this was the last beat of the DMA burst
    logic [63:0] rdata;
  } lb_rsp_t;

  localparam lb_rsp_t LB_RSP_IDLE = '{ready: 1'b0, retry: 1'b0, eot: 1'b0, rdata: '0};

  // ------------------------------------------------------------ MBus bundle
  // Active-high view of the MBus lines; the board drivers invert the
  // asterisked (active-low) backplane lines.
  typedef struct packed {
    logic [MB_ADDR_W-1:0] ad;       // MBAD(31:0)
    logic [MB_DATA_W-1:0] da;       // MBDATA(127:0)
    logic                 rd;       // RD/WR*: 1 read, 0 write
    logic                 dstrobe;  // DSTROBE*
    logic                 ddone;    // DDONE*
  } mb_sig_t;

  // --------------------------------------- Control & Monitor window offsets
  localparam logic [15:0] OFS_IOCTRL   = 16'h0000; // Table 6
  localparam logic [15:0] OFS_PCI_TB   = 16'h0010; // PCI Translation Base
  localparam logic [15:0] OFS_MB_UPPER = 16'h0014; // MBus Upper Memory Address
  localparam logic [15:0] OFS_MB_LOWER = 16'h0018; // MBus Lower Memory Address
  localparam logic [15:0] OFS_MB_TB    = 16'h001C; // MBus Translation Base
  localparam logic [15:0] OFS_MB_ERR   = 16'h0020; // MBus Error Register
  localparam logic [15:0] OFS_TSI_LO   = 16'h0100; // TSI registers 0x100..0x148
  localparam logic [15:0] OFS_TSI_HI   = 16'h0148;
  localparam logic [15:0] OFS_MAP_LO   = 16'h1000; // Mapper 0x1000..0x1FFF
  localparam logic [15:0] OFS_MAP_HI   = 16'h1FFF;

  // TSI register offsets inside window 0 (Tables 9-13)
  localparam logic [15:0] TSI_BSTAT    = 16'h010C; // broadcast status
  localparam logic [15:0] TSI_CMASTER  = 16'h0110; // crate master
  localparam logic [15:0] TSI_SCALER   = 16'h0114; // TSL_OUT(31:0)
  localparam logic [15:0] TSI_ICTRL    = 16'h0130; // internal control
  localparam logic [15:0] TSI_IREQ     = 16'h0134; // internal request
  localparam logic [15:0] TSI_ITEST    = 16'h013C; // internal test
  localparam logic [15:0] TSI_UOUT     = 16'h0140; // user output
  localparam logic [15:0] TSI_UIN      = 16'h0144; // user input
  localparam logic [15:0] TSI_GA       = 16'h0148; // geographic address

  // I/O control register bits (Table 6)
  localparam int IOC_DMA_EN     = 0;
  localparam int IOC_BC_LOCKOUT = 1;
  localparam int IOC_CLR_FIFO   = 2;
  localparam int IOC_PIO_TGT_EN = 8;
  localparam int IOC_PIO_TO_FIFO= 9;

  // MBus error register bits (this design's encoding)
  localparam int ERR_TIMEOUT    = 0;  // no target answered DDONE
  localparam int ERR_NO_GRANT   = 1;  // bus not won within the retry limit
  localparam int ERR_PREEMPT    = 2;  // lost to an MBus-originated access

endpackage
