// local_bus_if: the FPGA's PLX local bus block (target side).
//
// The PLX 9656 is the only master on the local bus for accesses coming
// from PCI. It uses separate address and data lines, so every beat is a
// one-step response chosen by address decode. This block steers each beat,
// by the PLX window it arrived through, to one of four targets and returns
// that target's answer:
//   window 0  Control & Monitor registers (ctrl_regs)
//   window 1  PIO window A       (pio_master)
//   window 2  PIO window B       (pio_master)
//   window 3  DMA data port      (dma_engine)
// The request is passed with valid gated to the selected target; the
// response is the selected target's, combinationally, so a beat takes as
// many clocks as its target needs. Using the reserved window 3 for the DMA
// data port is this design's choice. A beat answered both ready and retry is
// illegal and is flagged by an assertion.
module local_bus_if
  import l2b_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  lb_req_t lb_req,
  output lb_rsp_t lb_rsp,
  output lb_req_t ctrl_req,
  input  lb_rsp_t ctrl_rsp,
  output lb_req_t pio_req,
  input  lb_rsp_t pio_rsp,
  output lb_req_t dma_req,
  input  lb_rsp_t dma_rsp
);
  always_comb begin
    ctrl_req = lb_req;
    pio_req  = lb_req;
    dma_req  = lb_req;
    ctrl_req.valid = lb_req.valid && (lb_req.win == WIN_CTRL);
    pio_req.valid  = lb_req.valid && (lb_req.win inside {WIN_A, WIN_B});
    dma_req.valid  = lb_req.valid && (lb_req.win == WIN_DMA);
    unique case (lb_req.win)
      WIN_CTRL:     lb_rsp = ctrl_rsp;
      WIN_A, WIN_B: lb_rsp = pio_rsp;
      default:      lb_rsp = dma_rsp;
    endcase
    if (!lb_req.valid) lb_rsp = LB_RSP_IDLE;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(lb_rsp.ready && lb_rsp.retry));

endmodule
