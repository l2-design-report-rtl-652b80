// l2b_fpga: the FPGA of the L2beta 9U adapter card.
//
// The card joins a commercial CompactPCI processor board to a Level 2
// trigger crate. A PLX 9656 bridges PCI to a 32/64-bit local bus; this FPGA
// sits on that local bus and implements every crate-specific function of
// the old processor card:
//   * MBus broadcast receive: writes to MBus addresses 0..1023 are stored
//     with their channel number in a 4K x 128-bit FIFO (bcast_decode,
//     bcast_fifo) and moved to host memory by the PLX DMA engine under
//     control of dma_engine, with per-channel destination addresses kept in
//     the Mapper (dma_mapper).
//   * MBus programmed I/O in both directions: the CPU reads/writes the MBus
//     through PIO windows A and B (pio_master, mbus_master), and other
//     boards read/write host memory through an MBus window (pio_target).
//   * MBus BOSS arbitration (boss_arbiter).
//   * Trigger system interface: status lines, crate-master drivers, J2
//     trigger lines, scaler ECL outputs and interrupts (tsi).
//   * Control & Monitor registers (ctrl_regs), local bus decode
//     (local_bus_if) and logic-analyser spy channels (spy_mux).
//
// Ports are plain signals and packed structs (l2b_pkg). The MBus is given as
// its active-high line values: mb_i is what the backplane shows, mb_o what
// this FPGA would drive, with mb_ad_dir, mb_da_dir and mb_ctl_oe as the
// enables of the external bidirectional drivers (ad, da, rd/dstrobe); DDONE
// is an open-collector style line, driven whenever mb_o.ddone is high.
// Everything runs on one clock (the local bus clock); the MBus and trigger
// inputs are taken as synchronous to it. Block choice and connections follow
// the document's firmware block diagram; the single clock and the signal
// encoding of the PLX interfaces are this design's own.
//
// Spy header (spy_sel, registered, one clock late): group 0 is a bit map of
// bus handshakes and one-clock event pulses (broadcast stored, DMA burst
// start/end, channel change, DMA preempted by PIO, PCI retry, read-buffer
// hit, MBus timeout, interrupts, ...; bit positions are listed where the
// group is built), group 1 the MBus address lines, group 2 the FIFO fill
// count, group 3 the current DMA PCI address. The grouping is this design's
// choice. The I/O control bit "PIO write to FIFO" is stored and read back
// but drives nothing, because its effect is not described.
module l2b_fpga
  import l2b_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 4096, // broadcast FIFO entries
  parameter bit          HOLDOFF     = 1'b1, // withhold DDONE when FIFO full
  parameter int unsigned MB_TIMEOUT  = 256,  // MBus master DDONE timeout, clocks
  parameter int unsigned RETRY_LIMIT = 16    // PCI clocks to win the MBus
) (
  input  logic        clk,
  input  logic        rst_n,
  // PLX local bus, FPGA as target
  input  lb_req_t     lb_req,
  output lb_rsp_t     lb_rsp,
  // PLX DMA set-up
  output logic        dma_cmd_valid,
  output logic [31:0] dma_cmd_pci_addr,
  input  logic        dma_cmd_ready,
  // PLX local bus, FPGA as master (MBus-initiated PIO)
  output logic        lm_valid,
  output logic        lm_write,
  output logic [31:0] lm_addr,
  output logic [63:0] lm_wdata,
  input  logic        lm_ready,
  input  logic [63:0] lm_rdata,
  // local interrupt to the PLX
  output logic        lint,
  // MBus
  input  mb_sig_t     mb_i,
  output mb_sig_t     mb_o,
  output logic        mb_ad_dir,
  output logic        mb_da_dir,
  output logic        mb_ctl_oe,
  // MBus arbitration
  input  logic        boss_in,
  input  logic        bossgrin,
  output logic        bossreq,
  output logic        boss_out,
  output logic        bossgrout,
  // MBus status lines
  input  logic [18:0] mod_done,
  input  logic        ap_fifo_empty,
  input  logic [3:0]  ev_loaded,
  input  logic        mbreset_n_in,
  input  logic [1:0]  buffer_in,
  output logic        done_out,
  output logic [1:0]  buffer_out,
  output logic        start_load_n,
  output logic        mbreset_n_out,
  output logic        crate_master_oe,
  // J2 trigger lines
  input  logic        scl_init,
  input  logic        vbd_done,
  input  logic        l2_answer_ready,
  output logic        vbd_start_req,
  output logic [3:0]  j2_cm_out,
  output logic [7:0]  user_out,
  input  logic [7:0]  user_in,
  input  logic [4:0]  ga,
  input  logic        gap,
  // scaler ECL outputs
  output logic [31:0] tsl_out,
  // spy header
  input  logic [1:0]  spy_sel,
  output logic [31:0] spy
);
  localparam int unsigned FW = BC_ADDR_W + MB_DATA_W;

  // ------------------------------------------------------- local bus decode
  lb_req_t ctrl_req, pio_req, dma_req;
  lb_rsp_t ctrl_rsp, pio_rsp, dma_rsp;

  local_bus_if u_lb (
    .clk, .rst_n, .lb_req, .lb_rsp,
    .ctrl_req, .ctrl_rsp, .pio_req, .pio_rsp, .dma_req, .dma_rsp
  );

  // ------------------------------------------------------ control registers
  logic        dma_en, bc_lockout, clr_fifo, pio_tgt_en, pio_to_fifo;
  logic [31:0] pci_tb, mb_upper, mb_lower, mb_tb;
  logic [2:0]  mb_err;
  logic        tsi_sel, tsi_we;
  logic [15:0] tsi_addr;
  logic [31:0] tsi_wdata, tsi_rdata;
  logic        mapc_req, mapc_we, mapc_ack;
  logic [9:0]  mapc_idx;
  logic [31:0] mapc_wdata, mapc_rdata;

  ctrl_regs u_regs (
    .clk, .rst_n, .lb_req(ctrl_req), .lb_rsp(ctrl_rsp),
    .dma_en, .bc_lockout, .clr_fifo, .pio_tgt_en, .pio_to_fifo,
    .pci_tb, .mb_upper, .mb_lower, .mb_tb, .mb_err,
    .tsi_sel, .tsi_we, .tsi_addr, .tsi_wdata, .tsi_rdata,
    .map_req(mapc_req), .map_we(mapc_we), .map_idx(mapc_idx),
    .map_wdata(mapc_wdata), .map_ack(mapc_ack), .map_rdata(mapc_rdata)
  );

  // --------------------------------------------------- broadcast receive
  logic          fifo_wr, fifo_full, fifo_rd, fifo_empty;
  logic [FW-1:0] fifo_wdata, fifo_head;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic          bc_ddone, bc_dropped, bc_held;

  bcast_decode #(.HOLDOFF(HOLDOFF)) u_bdec (
    .clk, .rst_n, .mb_i, .lockout(bc_lockout), .fifo_full,
    .fifo_wr, .fifo_wdata, .ddone(bc_ddone), .dropped(bc_dropped), .held(bc_held)
  );

  bcast_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(clr_fifo), .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd), .rd_data(fifo_head), .empty(fifo_empty), .count(fifo_count)
  );

  // ---------------------------------------------------------- DMA path
  logic        map_rd, map_inc;
  logic [9:0]  map_idx;
  logic [31:0] map_cur, map_rdata, map_next;
  logic        pt_hold;
  logic        ev_burst_start, ev_burst_end, ev_chan_change, ev_preempt, dma_busy;

  dma_mapper #(.DEPTH(MAP_DEPTH)) u_map (
    .clk, .rst_n,
    .cpu_req(mapc_req), .cpu_we(mapc_we), .cpu_idx(mapc_idx), .cpu_wdata(mapc_wdata),
    .cpu_ack(mapc_ack), .cpu_rdata(mapc_rdata),
    .dma_rd(map_rd), .dma_inc(map_inc), .dma_idx(map_idx), .dma_cur(map_cur),
    .dma_rdata(map_rdata), .dma_next(map_next)
  );

  dma_engine u_dma (
    .clk, .rst_n, .dma_en, .pio_hold(pt_hold),
    .fifo_empty, .fifo_head, .fifo_rd,
    .map_rd, .map_inc, .map_idx, .map_cur, .map_rdata, .map_next,
    .cmd_valid(dma_cmd_valid), .cmd_pci_addr(dma_cmd_pci_addr), .cmd_ready(dma_cmd_ready),
    .lb_req(dma_req), .lb_rsp(dma_rsp),
    .ev_burst_start, .ev_burst_end, .ev_chan_change, .ev_preempt, .busy(dma_busy)
  );

  // ----------------------------------------------------- PIO, PCI side
  logic                 mm_req, mm_abort, mm_rd, mm_done, mm_timeout, mm_waiting;
  logic [MB_ADDR_W-1:0] mm_addr;
  logic [MB_DATA_W-1:0] mm_wdata, mm_rdata;
  logic                 pt_busy, ev_retry, ev_buf_hit;

  pio_master #(.RETRY_LIMIT(RETRY_LIMIT)) u_piom (
    .clk, .rst_n, .pci_tb, .tgt_busy(pt_busy),
    .lb_req(pio_req), .lb_rsp(pio_rsp), .err(mb_err),
    .mm_req, .mm_abort, .mm_rd, .mm_addr, .mm_wdata,
    .mm_done, .mm_timeout, .mm_rdata, .mm_waiting,
    .ev_retry, .ev_buf_hit
  );

  logic    mm_bus_req, local_boss;
  mb_sig_t mm_o;
  logic    mm_ad_oe, mm_da_oe, mm_ctl_oe;

  mbus_master #(.TIMEOUT(MB_TIMEOUT)) u_mm (
    .clk, .rst_n, .req(mm_req), .abort(mm_abort), .rd(mm_rd), .addr(mm_addr),
    .wdata(mm_wdata), .done(mm_done), .timeout(mm_timeout), .rdata(mm_rdata),
    .waiting(mm_waiting), .bus_req(mm_bus_req), .local_boss,
    .mb_i, .mb_o(mm_o), .ad_oe(mm_ad_oe), .da_oe(mm_da_oe), .ctl_oe(mm_ctl_oe)
  );

  boss_arbiter u_arb (
    .clk, .rst_n, .local_req(mm_bus_req), .boss_bus(boss_in), .grin(bossgrin),
    .bossreq, .boss_drv(boss_out), .grout(bossgrout), .local_boss
  );

  // ---------------------------------------------------- PIO, MBus side
  logic                 pt_ddone, pt_da_oe;
  logic [MB_DATA_W-1:0] pt_da;

  pio_target u_piot (
    .clk, .rst_n, .enable(pio_tgt_en), .mb_upper, .mb_lower, .mb_tb, .mb_i,
    .ddone(pt_ddone), .da_out(pt_da), .da_oe(pt_da_oe),
    .lm_valid, .lm_write, .lm_addr, .lm_wdata, .lm_ready, .lm_rdata,
    .busy(pt_busy), .hold(pt_hold)
  );

  // ------------------------------------------------------- MBus drivers
  always_comb begin
    mb_o       = mm_o;
    mb_o.da    = pt_da_oe ? pt_da : mm_o.da;
    mb_o.ddone = bc_ddone || pt_ddone;
  end
  assign mb_ad_dir = mm_ad_oe;
  assign mb_da_dir = mm_da_oe || pt_da_oe;
  assign mb_ctl_oe = mm_ctl_oe;

  // ---------------------------------------------------------------- TSI
  logic int1, int2, new_evt_req;

  tsi u_tsi (
    .clk, .rst_n,
    .reg_sel(tsi_sel), .reg_we(tsi_we), .reg_addr(tsi_addr), .reg_wdata(tsi_wdata),
    .reg_rdata(tsi_rdata),
    .mod_done, .ap_fifo_empty, .ev_loaded, .mbreset_n_in, .buffer_in, .fifo_ef(fifo_empty),
    .done_out, .buffer_out, .start_load_n, .mbreset_n_out, .cm_oe(crate_master_oe),
    .scl_init, .vbd_done, .l2_answer_ready, .vbd_start_req, .j2_cm_out,
    .user_out, .user_in, .ga, .gap, .tsl_out, .int1, .int2, .new_evt_req
  );

  assign lint = int1 || int2;

  // ---------------------------------------------------------- spy header
  logic [31:0] probes [4];
  always_comb begin
    probes[0] = {mb_i.dstrobe, mb_i.ddone, mb_i.rd, boss_in,              // 31:28
                 bossgrin, bossreq, bossgrout, local_boss,                 // 27:24
                 fifo_wr, fifo_rd, fifo_full, fifo_empty,                  // 23:20
                 bc_held, bc_dropped, clr_fifo, bc_lockout,                // 19:16
                 dma_busy, ev_burst_start, ev_burst_end, ev_chan_change,   // 15:12
                 ev_preempt, mm_req, mm_done, mm_timeout,                  // 11:8
                 pt_busy, ev_retry, ev_buf_hit, lm_valid,                  // 7:4
                 lm_ready, int1, int2, new_evt_req};                       // 3:0
    probes[1] = mb_i.ad;
    probes[2] = {{(31-$clog2(FIFO_DEPTH)){1'b0}}, fifo_count};
    probes[3] = dma_cmd_pci_addr;
  end

  spy_mux #(.WIDTH(32), .GROUPS(4)) u_spy (.clk, .rst_n, .sel(spy_sel), .probes, .spy);

endmodule
