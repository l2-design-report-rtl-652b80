// tb_local_bus_if: self-checking test of the local bus window router.
// Offers random beats on all four windows, with three target models that
// each answer with their own pattern (ready, retry or end-of-transfer and a
// data tag), and checks that exactly the addressed target sees valid, that
// every target sees the unchanged address and data, and that the answer
// returned to the PLX is the addressed target's, or idle when no beat is
// offered.
module tb_local_bus_if;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  lb_req_t lb_req, ctrl_req, pio_req, dma_req;
  lb_rsp_t lb_rsp, ctrl_rsp, pio_rsp, dma_rsp;
  int checks = 0, failures = 0;

  local_bus_if dut (.*);
  always #5 clk = ~clk;

  // target models: answer depends on the request so that a wrong route shows
  always_comb begin
    ctrl_rsp = '{ready: 1'b1, retry: 1'b0, eot: 1'b0, rdata: {32'hC0C0_C0C0, 12'h0, ctrl_req.addr}};
    pio_rsp  = '{ready: pio_req.addr[0], retry: !pio_req.addr[0], eot: 1'b0,
                 rdata: {32'hA0A0_A0A0, 12'h0, pio_req.addr}};
    dma_rsp  = '{ready: 1'b1, retry: 1'b0, eot: dma_req.addr[1], rdata: {32'hD0D0_D0D0, 12'h0, dma_req.addr}};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lb_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      logic [63:0] tag;
      lb_rsp_t exp;
      @(negedge clk);
      lb_req.valid = ($urandom % 5) != 0;
      lb_req.win   = lb_win_e'($urandom % 4);
      lb_req.addr  = 20'($urandom);
      lb_req.write = 1'($urandom);
      lb_req.wdata = {$urandom, $urandom};
      #1;
      check(ctrl_req.valid == (lb_req.valid && lb_req.win == WIN_CTRL), "ctrl valid");
      check(pio_req.valid  == (lb_req.valid && (lb_req.win == WIN_A || lb_req.win == WIN_B)), "pio valid");
      check(dma_req.valid  == (lb_req.valid && lb_req.win == WIN_DMA), "dma valid");
      check(pio_req.addr == lb_req.addr && pio_req.win == lb_req.win && dma_req.wdata == lb_req.wdata
            && ctrl_req.write == lb_req.write, "request fields passed unchanged");
      if (!lb_req.valid) exp = LB_RSP_IDLE;
      else case (lb_req.win)
        WIN_CTRL: exp = '{1'b1, 1'b0, 1'b0, {32'hC0C0_C0C0, 12'h0, lb_req.addr}};
        WIN_A, WIN_B: exp = '{lb_req.addr[0], !lb_req.addr[0], 1'b0, {32'hA0A0_A0A0, 12'h0, lb_req.addr}};
        default: exp = '{1'b1, 1'b0, lb_req.addr[1], {32'hD0D0_D0D0, 12'h0, lb_req.addr}};
      endcase
      check(lb_rsp == exp, $sformatf("response routed for window %0d", lb_req.win));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
