// tb_l2b_fpga_drop: the whole FPGA with the broadcast hold-off turned off.
//
// With HOLDOFF=0 a full broadcast FIFO does not stall the sending board: the
// word is acknowledged with DDONE and lost, which is how the older boards
// behaved. This test builds the top with a 16-word FIFO and HOLDOFF=0, keeps
// DMA disabled, and acts as an MBus master that writes 20 broadcast words.
// Expected: all 20 get DDONE within a few clocks, 16 are stored, 4 are
// dropped (counted from the spy header, group 0 bits 23 and 18), the FIFO
// fill count (spy group 2) reads 16, and the local FIFO-empty bit of the
// broadcast status register (0x10C bit 19) is 0. Then the FIFO is cleared
// through the I/O control register (bit 2) and must read empty; with the
// broadcast lockout bit set a further word is acknowledged but not stored.
// Register beats are driven on the PLX local bus (window 0) and answered in
// the clock they are given. The small FIFO only keeps the test short; the
// default-size top is exercised by tb_l2b_fpga.
module tb_l2b_fpga_drop;
  import l2b_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lb_req_t     lb_req;
  lb_rsp_t     lb_rsp;
  logic        dma_cmd_valid, dma_cmd_ready;
  logic [31:0] dma_cmd_pci_addr;
  logic        lm_valid, lm_write, lm_ready;
  logic [31:0] lm_addr;
  logic [63:0] lm_wdata, lm_rdata;
  logic        lint;
  mb_sig_t     mb_i, mb_o;
  logic        mb_ad_dir, mb_da_dir, mb_ctl_oe;
  logic        boss_in, bossgrin, bossreq, boss_out, bossgrout;
  logic [18:0] mod_done;
  logic        ap_fifo_empty, mbreset_n_in;
  logic [3:0]  ev_loaded;
  logic [1:0]  buffer_in, buffer_out;
  logic        done_out, start_load_n, mbreset_n_out, crate_master_oe;
  logic        scl_init, vbd_done, l2_answer_ready, vbd_start_req;
  logic [3:0]  j2_cm_out;
  logic [7:0]  user_out, user_in;
  logic [4:0]  ga;
  logic        gap;
  logic [31:0] tsl_out, spy;
  logic [1:0]  spy_sel;

  l2b_fpga #(.FIFO_DEPTH(DEPTH), .HOLDOFF(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the MBus seen by the FPGA: this testbench is the only other driver
  logic [31:0]  m_ad = 0;
  logic [127:0] m_da = 0;
  logic         m_strobe = 0;
  always_comb begin
    mb_i         = '0;
    mb_i.ad      = m_ad | (mb_ad_dir ? mb_o.ad : '0);
    mb_i.da      = m_da | (mb_da_dir ? mb_o.da : '0);
    mb_i.rd      = mb_ctl_oe && mb_o.rd;
    mb_i.dstrobe = m_strobe || (mb_ctl_oe && mb_o.dstrobe);
    mb_i.ddone   = mb_o.ddone;
  end

  // events from spy group 0 (one clock late)
  int n_wr = 0, n_drop = 0;
  always @(posedge clk)
    if (rst_n && spy_sel == 2'd0) begin
      if (spy[23]) n_wr++;
      if (spy[18]) n_drop++;
    end

  // one 32-bit register beat in window 0
  task automatic reg_acc(input bit w, input logic [15:0] a, input logic [31:0] d,
                         output logic [31:0] r);
    @(negedge clk);
    lb_req        = '0;
    lb_req.valid  = 1'b1;
    lb_req.win    = WIN_CTRL;
    lb_req.addr   = {4'h0, a};
    lb_req.write  = w;
    lb_req.last   = 1'b1;
    lb_req.wdata  = {32'h0, d};
    #1;
    check(lb_rsp.ready, $sformatf("register 0x%0h answered at once", a));
    r = lb_rsp.rdata[31:0];
    @(posedge clk);
    #1 lb_req = '0;
  endtask

  // one MBus broadcast write; returns the clocks until DDONE
  task automatic bcast(input logic [9:0] ch, input logic [127:0] d, output int lat);
    @(negedge clk);
    m_ad = {22'h0, ch}; m_da = d; m_strobe = 1'b1;
    lat = 0;
    while (!mb_o.ddone && lat < 50) begin @(negedge clk); lat++; end
    m_strobe = 1'b0;
    while (mb_o.ddone) @(negedge clk);
    m_ad = '0; m_da = '0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] r;
  int lat, maxlat;
  initial begin
    lb_req = '0; dma_cmd_ready = 0; lm_ready = 0; lm_rdata = '0;
    boss_in = 0; bossgrin = 0; mod_done = '0; ap_fifo_empty = 0; mbreset_n_in = 1;
    ev_loaded = '0; buffer_in = '0; scl_init = 0; vbd_done = 0; l2_answer_ready = 0;
    user_in = '0; ga = 5'd3; gap = 1; spy_sel = 2'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // DMA off, nothing drains the FIFO
    reg_acc(1, OFS_IOCTRL, 32'h0, r);
    maxlat = 0;
    for (int i = 0; i < DEPTH + 4; i++) begin
      bcast(10'(i % 7), {4{32'(i)}}, lat);
      check(lat < 50, $sformatf("word %0d acknowledged", i));
      if (lat > maxlat) maxlat = lat;
    end
    repeat (2) @(posedge clk);
    check(maxlat <= 2, $sformatf("DDONE within 2 clocks even when full (%0d)", maxlat));
    check(n_wr == DEPTH, $sformatf("%0d words stored (%0d)", DEPTH, n_wr));
    check(n_drop == 4, $sformatf("4 words dropped (%0d)", n_drop));

    spy_sel = 2'd2;
    repeat (2) @(posedge clk);
    check(spy == 32'(DEPTH), $sformatf("FIFO count %0d (%0d)", DEPTH, spy));
    reg_acc(0, TSI_BSTAT, 32'h0, r);
    check(!r[19], "status: local FIFO not empty");

    // clear through the I/O control register
    reg_acc(1, OFS_IOCTRL, 32'h4, r);
    repeat (2) @(posedge clk);
    check(spy == 32'h0, "FIFO count 0 after clear");
    reg_acc(0, TSI_BSTAT, 32'h0, r);
    check(r[19], "status: local FIFO empty after clear");
    reg_acc(0, OFS_IOCTRL, 32'h0, r);
    check(r == 32'h0, "clear bit reads 0");

    // lockout: acknowledged, not stored
    reg_acc(1, OFS_IOCTRL, 32'h2, r);
    bcast(10'd5, '1, lat);
    check(lat < 50, "locked-out word acknowledged");
    repeat (2) @(posedge clk);
    check(spy == 32'h0, "locked-out word not stored");

    $display("stored %0d, dropped %0d, longest DDONE wait %0d clocks", n_wr, n_drop, maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
