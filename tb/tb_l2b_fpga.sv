// tb_l2b_fpga: end-to-end test of the L2beta adapter FPGA at full size.
//
// One l2b_fpga with every parameter at its default (4096-word broadcast
// FIFO, 1024-entry Mapper) sits in a modelled Level 2 crate:
//   * a broadcast source that also arbitrates the crate: it writes words to
//     broadcast channels (MBus addresses 0..1023) in batches while it holds
//     BOSS, and otherwise hands a grant pulse to the head of the BOSSGRIN
//     chain, alternating fairly between itself and the boards;
//   * a second board downstream on the grant chain (BOSSGRIN = the FPGA's
//     BOSSGROUT) that reads and writes this card's host memory through the
//     MBus target window (MBus words 0x0040_0000-0x0040_FFFF);
//   * a memory target answering MBus words 0x0050_0000-0x0050_FFFF, which
//     this card reaches through PIO windows A and B;
//   * the PLX 9656: one local bus master that serialises CPU register and
//     PIO beats with DMA data beats, retries a beat that is answered with
//     retry, and runs a DMA burst from the command address until a beat
//     carries end-of-transfer; and host memory behind the PLX, which also
//     serves the FPGA's local-master beats.
// Every MBus line is the OR of its enabled drivers; two drivers at once count
// as a failure.
//
// Phases: configuration and Mapper set-up; broadcast traffic with DMA on
// while both boards do PIO (bursts, channel changes, the Mapper wrap at
// 512 KB, DMA preempted by PIO, PCI retries for an unwon bus); single PIO
// checks (window A and B write rules, reads and the read buffer, a read of
// host memory from the MBus, a timeout, a retry because the MBus side has
// precedence); broadcast lockout; filling the FIFO to its 4096 words with
// DMA off so that DDONE is withheld, then clearing it; TSI interrupts,
// crate-master lines, scaler and spy channels. All DMA data is checked word
// by word in host memory against addresses computed here from the Mapper
// bases (16 bytes per word, wrap of bits 18:3). Each mechanism is counted
// and one that never happened counts as a failure.
module tb_l2b_fpga;
  import l2b_pkg::*;
  localparam int DEPTH     = 4096;   // the top's default FIFO depth
  localparam int MBT_BATCH = 32;     // words per bus tenure of the source

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------- the DUT
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

  l2b_fpga dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------- host memory
  logic [63:0] hmem [int unsigned];     // key: byte address / 8
  function automatic logic [63:0] hget(input logic [31:0] a);
    return hmem.exists(a >> 3) ? hmem[a >> 3] : 64'h0;
  endfunction

  // FPGA as local bus master (MBus-initiated PIO): answers after lm_delay clocks
  int lm_delay = 1, lm_cnt = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      lm_ready <= 0; lm_cnt <= 0; lm_rdata <= '0;
    end else if (lm_valid && !lm_ready) begin
      if (lm_cnt < lm_delay) lm_cnt <= lm_cnt + 1;
      else begin
        lm_cnt   <= 0;
        lm_ready <= 1;
        if (lm_write) hmem[lm_addr >> 3] = lm_wdata;
        else          lm_rdata <= hget(lm_addr);
      end
    end else lm_ready <= 0;
  end

  // --------------------------------------------- MBus: models and wiring
  // broadcast source / crate arbiter
  typedef struct packed { logic [9:0] ch; logic [127:0] data; logic keep; } bword_t;
  bword_t      bq [$];
  int          mbt_state = 0, gwait = 0, batch = 0, bc_sent = 0, n_lockout_ack = 0;
  bit          lockout_on = 0;
  logic        mbt_boss = 0, mbt_drv = 0, mbt_strobe = 0, head_grant = 0, turn = 0;
  logic [31:0] mbt_ad = 0;
  logic [127:0] mbt_da = 0;

  // second board, as MBus master
  typedef struct { bit write; logic [15:0] off; logic [127:0] data; } rop_t;
  rop_t        rq [$];
  logic [127:0] rres [$];
  int          rstate = 0;
  logic        rem_req = 0, rem_own = 0, rem_drv = 0, rem_strobe = 0, rem_rd = 0, grout_q = 0;
  logic [31:0] rem_ad = 0;
  logic [127:0] rem_da = 0;

  // memory target at MBus words 0x0050_xxxx
  logic [127:0] rmem [int unsigned];
  logic        tgt_ddone = 0, tgt_drv = 0;
  logic [127:0] tgt_da = 0;
  int          tcnt = 0, n_rmem_writes = 0;

  wire boss_line = mbt_boss | rem_own | boss_out;
  wire board_req = bossreq | rem_req;
  assign boss_in  = boss_line;
  assign bossgrin = head_grant;

  always_comb begin
    mb_i = '0;
    if (mb_ad_dir) mb_i.ad = mb_i.ad | mb_o.ad;
    if (mbt_drv)   mb_i.ad = mb_i.ad | mbt_ad;
    if (rem_drv)   mb_i.ad = mb_i.ad | rem_ad;
    if (mb_da_dir)            mb_i.da = mb_i.da | mb_o.da;
    if (mbt_drv)              mb_i.da = mb_i.da | mbt_da;
    if (rem_drv && !rem_rd)   mb_i.da = mb_i.da | rem_da;
    if (tgt_drv)              mb_i.da = mb_i.da | tgt_da;
    mb_i.rd      = (mb_ctl_oe && mb_o.rd) || (rem_drv && rem_rd);
    mb_i.dstrobe = (mb_ctl_oe && mb_o.dstrobe) || mbt_strobe || rem_strobe;
    mb_i.ddone   = mb_o.ddone || tgt_ddone;
  end

  int n_contention = 0;
  always @(posedge clk)
    if (rst_n && ((int'(mb_ad_dir) + int'(mbt_drv) + int'(rem_drv) > 1) ||
                  (int'(mb_da_dir) + int'(mbt_drv) + int'(rem_drv && !rem_rd) + int'(tgt_drv) > 1)))
      n_contention++;

  // expected DMA results
  typedef struct { logic [31:0] addr; logic [127:0] data; } exp_t;
  exp_t        expq [$];
  logic [31:0] map_base [1024];
  int          kch [1024];
  int          n_wrap = 0;

  // Mapper entry after k words: bits 18:3 advance by 2 per 16-byte word
  function automatic logic [31:0] map_addr(input logic [31:0] b, input int k);
    logic [15:0] f;
    f = b[18:3] + 16'(2 * k);
    return {b[31:19], f, b[2:0]};
  endfunction

  always @(posedge clk) begin
    head_grant <= 0;
    if (!rst_n) begin
      mbt_state <= 0; mbt_boss <= 0; mbt_drv <= 0; mbt_strobe <= 0; turn <= 0;
    end else begin
      case (mbt_state)
        0: if (!boss_line) begin
             if (bq.size() > 0 && (turn || !board_req)) begin
               mbt_boss <= 1; batch <= 0; turn <= 0; mbt_state <= 1;
             end else if (board_req) begin
               head_grant <= 1; gwait <= 6; turn <= 1; mbt_state <= 4;
             end
           end
        4: if (gwait == 0) mbt_state <= 0; else gwait <= gwait - 1;
        1: begin
             mbt_drv <= 1; mbt_ad <= {22'h0, bq[0].ch}; mbt_da <= bq[0].data; mbt_state <= 2;
           end
        2: if (!mbt_strobe) mbt_strobe <= 1;
           else if (mb_i.ddone) begin mbt_strobe <= 0; mbt_state <= 3; end
        3: if (!mb_i.ddone) begin
             if (lockout_on) n_lockout_ack++;
             if (bq[0].keep) begin
               logic [31:0] a;
               a = map_addr(map_base[bq[0].ch], kch[bq[0].ch]);
               if (kch[bq[0].ch] > 0 && a[18:3] == 16'h0) n_wrap++;
               expq.push_back('{a, bq[0].data});
               kch[bq[0].ch]++;
             end
             bq.pop_front();
             bc_sent++;
             batch <= batch + 1;
             if (bq.size() > 0 && batch < MBT_BATCH - 1) mbt_state <= 1;
             else begin mbt_boss <= 0; mbt_drv <= 0; mbt_state <= 0; end
           end
        default: mbt_state <= 0;
      endcase
    end
  end

  always @(posedge clk) begin
    grout_q <= bossgrout;
    if (!rst_n) begin
      rstate <= 0; rem_req <= 0; rem_own <= 0; rem_drv <= 0; rem_strobe <= 0;
    end else begin
      if (rem_req && !rem_own && bossgrout && !grout_q && !mbt_boss && !boss_out) rem_own <= 1;
      case (rstate)
        0: if (rq.size() > 0) begin rem_req <= 1; rstate <= 1; end
        1: if (rem_own) begin
             rem_drv <= 1; rem_ad <= {16'h0040, rq[0].off}; rem_rd <= !rq[0].write;
             rem_da <= rq[0].data; rstate <= 2;
           end
        2: if (!rem_strobe) rem_strobe <= 1;
           else if (mb_i.ddone) begin
             if (rem_rd) rres.push_back(mb_i.da);
             rem_strobe <= 0; rstate <= 3;
           end
        3: if (!mb_i.ddone) begin
             rq.pop_front();
             rem_drv <= 0; rem_req <= 0; rem_own <= 0; rstate <= 0;
           end
        default: rstate <= 0;
      endcase
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      tgt_ddone <= 0; tgt_drv <= 0; tcnt <= 0;
    end else if (!tgt_ddone) begin
      if (mb_i.dstrobe && mb_i.ad[31:16] == 16'h0050) begin
        if (tcnt < 2) tcnt <= tcnt + 1;
        else begin
          tcnt <= 0; tgt_ddone <= 1;
          if (mb_i.rd) begin
            tgt_drv <= 1;
            tgt_da  <= rmem.exists(mb_i.ad[15:0]) ? rmem[mb_i.ad[15:0]] : 128'h0;
          end else begin
            rmem[mb_i.ad[15:0]] = mb_i.da;
            n_rmem_writes++;
          end
        end
      end
    end else if (!mb_i.dstrobe) begin
      tgt_ddone <= 0; tgt_drv <= 0;
    end
  end

  // ------------------------------------------------------- PLX model
  bit lb_lock = 0;
  int n_plx_retry = 0, n_plx_burst = 0;

  task automatic lb_beat(input lb_win_e win, input logic [19:0] addr, input bit write,
                         input bit s64, input bit last, input logic [63:0] wd,
                         output logic [63:0] rdv, output bit eot);
    forever begin
      @(negedge clk);
      while (lb_lock) @(negedge clk);
      lb_lock = 1;
      lb_req = '0;
      lb_req.valid = 1; lb_req.win = win; lb_req.addr = addr; lb_req.write = write;
      lb_req.size64 = s64; lb_req.last = last; lb_req.wdata = wd;
      #1;
      while (!lb_rsp.ready && !lb_rsp.retry) begin @(negedge clk); #1; end
      if (lb_rsp.ready) begin
        rdv = lb_rsp.rdata; eot = lb_rsp.eot;
        @(posedge clk); #1 lb_req.valid = 0; lb_lock = 0;
        return;
      end
      n_plx_retry++;
      @(posedge clk); #1 lb_req.valid = 0; lb_lock = 0;
      repeat (4) @(posedge clk);
    end
  endtask

  task automatic reg_wr(input logic [15:0] ofs, input logic [31:0] d);
    logic [63:0] q; bit e;
    lb_beat(WIN_CTRL, {4'h0, ofs}, 1, 0, 1, {32'h0, d}, q, e);
  endtask
  task automatic reg_rd(input logic [15:0] ofs, output logic [31:0] d);
    logic [63:0] q; bit e;
    lb_beat(WIN_CTRL, {4'h0, ofs}, 0, 0, 1, 64'h0, q, e);
    d = q[31:0];
  endtask
  task automatic pio_wr(input lb_win_e w, input logic [19:0] a, input bit s64,
                        input bit last, input logic [63:0] d);
    logic [63:0] q; bit e;
    lb_beat(w, a, 1, s64, last, d, q, e);
  endtask
  task automatic pio_rd(input lb_win_e w, input logic [19:0] a, output logic [63:0] d);
    bit e;
    lb_beat(w, a, 0, 1, 1, 64'h0, d, e);
  endtask

  // PLX DMA engine: set-up from the FPGA's command, then read until eot
  initial begin
    logic [31:0] a;
    logic [63:0] d;
    bit e;
    dma_cmd_ready = 0;
    forever begin
      @(negedge clk);
      if (rst_n && dma_cmd_valid) begin
        a = dma_cmd_pci_addr;
        dma_cmd_ready = 1;
        @(negedge clk) dma_cmd_ready = 0;
        n_plx_burst++;
        do begin
          lb_beat(WIN_DMA, 20'h0, 0, 1, 0, 64'h0, d, e);
          hmem[a >> 3] = d;
          a += 8;
        end while (!e);
      end
    end
  end

  // ------------------------------------------------- mechanism counters
  // Events are watched on the spy header, group 0, as a logic analyser
  // would: each bit is the registered copy of an internal pulse or level.
  localparam int SP_BOSS_OWN = 24, SP_FIFO_WR = 23, SP_FIFO_RD = 22, SP_FULL = 21;
  localparam int SP_EMPTY = 20, SP_HELD = 19, SP_CLR = 17, SP_DMA_BUSY = 15;
  localparam int SP_BURST = 14, SP_CHAN = 12, SP_PREEMPT = 11, SP_MM_DONE = 9;
  localparam int SP_MM_TO = 8, SP_PT_BUSY = 7, SP_RETRY = 6, SP_HIT = 5;
  localparam int SP_INT1 = 2, SP_INT2 = 1, SP_NEW_EVT = 0;
  logic [1:0]  sel_q = 0;
  logic [31:0] spy_q = 0;
  logic        ddone_q = 0, grout_q2 = 0;
  wire         ev_ok = (sel_q == 2'd0);   // spy shows group 0 this clock
  int n_store = 0, n_burst = 0, n_dma_words = 0, n_chan = 0, n_preempt = 0;
  int n_held = 0, n_full = 0, n_clear = 0, n_retry_grant = 0, n_retry_tgt = 0;
  int n_hit = 0, n_timeout = 0, n_tgt_wr = 0, n_tgt_rd = 0, n_taken = 0, n_passed = 0;
  int n_int1 = 0, n_int2 = 0, n_new_evt = 0, n_win_a = 0, n_win_b = 0, n_pio_rd = 0;
  always @(posedge clk) begin
    sel_q    <= spy_sel;
    grout_q2 <= bossgrout;
    ddone_q  <= mb_o.ddone;
    if (rst_n) begin
      if (bossgrout && !grout_q2) n_passed++;
      if (mb_o.ddone && !ddone_q && mb_i.ad[31:16] == 16'h0040) begin
        if (mb_i.rd) n_tgt_rd++; else n_tgt_wr++;
      end
    end
    if (rst_n && ev_ok) begin
      spy_q <= spy;
      if (spy[SP_FIFO_WR])                    n_store++;
      if (spy[SP_BURST])                      n_burst++;
      if (spy[SP_FIFO_RD])                    n_dma_words++;
      if (spy[SP_CHAN])                       n_chan++;
      if (spy[SP_PREEMPT])                    n_preempt++;
      if (spy[SP_HELD])                       n_held++;
      if (spy[SP_FULL])                       n_full++;
      if (spy[SP_CLR])                        n_clear++;
      if (spy[SP_RETRY] && !spy[SP_PT_BUSY])  n_retry_grant++;
      if (spy[SP_RETRY] && spy[SP_PT_BUSY])   n_retry_tgt++;
      if (spy[SP_HIT])                        n_hit++;
      if (spy[SP_MM_DONE] && spy[SP_MM_TO])   n_timeout++;
      if (spy[SP_BOSS_OWN] && !spy_q[SP_BOSS_OWN]) n_taken++;
      if (spy[SP_INT1] && !spy_q[SP_INT1])    n_int1++;
      if (spy[SP_INT2] && !spy_q[SP_INT2])    n_int2++;
      if (spy[SP_NEW_EVT] && !spy_q[SP_NEW_EVT]) n_new_evt++;
    end
  end

  // wait until the spy shows group 0 with bit b at level lvl
  task automatic wait_spy(input int b, input bit lvl);
    do @(posedge clk); while (!(ev_ok && spy[b] == lvl));
  endtask

  // FIFO fill count, read from spy group 2
  task automatic fifo_count(output int c);
    @(negedge clk) spy_sel = 2'd2;
    repeat (2) @(posedge clk);
    #1 c = int'(spy);
    @(negedge clk) spy_sel = 2'd0;
    repeat (2) @(posedge clk);
  endtask

  task automatic settle();
    repeat (2) @(posedge clk);
    #1;
  endtask

  // ------------------------------------------------------------ helpers
  task automatic send(input logic [9:0] ch, input bit keep);
    bq.push_back('{ch, {$urandom, $urandom, $urandom, $urandom}, keep});
  endtask

  task automatic wait_bus_idle();
    while (bq.size() > 0 || mbt_state != 0 || rq.size() > 0 || rstate != 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic drain_and_verify(input string what);
    int bad;
    wait_bus_idle();
    for (int quiet = 0; quiet < 8; ) begin
      @(posedge clk);
      quiet = (ev_ok && spy[SP_EMPTY] && !spy[SP_DMA_BUSY]) ? quiet + 1 : 0;
    end
    bad = 0;
    foreach (expq[i])
      if (hget(expq[i].addr) != expq[i].data[63:0] || hget(expq[i].addr + 8) != expq[i].data[127:64])
        bad++;
    check(bad == 0, $sformatf("%s: %0d of %0d DMA words wrong in host memory", what, bad, expq.size()));
    expq.delete();
  endtask

  localparam logic [31:0] IOC_EN  = 32'h1;
  localparam logic [31:0] IOC_LCK = 32'h2;
  localparam logic [31:0] IOC_CLR = 32'h4;
  localparam logic [31:0] IOC_TGT = 32'h100;

  initial begin
    #5000000;
    failures++;
    $display("watchdog: stopped in a phase that did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------- main flow
  initial begin
    logic [31:0] v;
    logic [63:0] q;
    logic [127:0] w;
    int chans [5] = '{0, 1, 2, 5, 1023};
    int cnt;
    lb_req = '0;
    mod_done = 0; ap_fifo_empty = 0; ev_loaded = 0; mbreset_n_in = 1; buffer_in = 0;
    scl_init = 0; vbd_done = 0; l2_answer_ready = 0; user_in = 8'h5A; ga = 5'd7; gap = 1;
    spy_sel = 0;
    for (int i = 0; i < 1024; i++) begin map_base[i] = 0; kch[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- configuration
    reg_wr(OFS_PCI_TB,   32'h0050_0000);   // PIO windows -> MBus words 0x0050_xxxx
    reg_wr(OFS_MB_LOWER, 32'h0040_0000);   // MBus target window 0x0040_0000..
    reg_wr(OFS_MB_UPPER, 32'h0041_0000);   //   ..0x0040_FFFF
    reg_wr(OFS_MB_TB,    32'h1230_0000);   // -> host 0x1230_0000 + 16 * word
    reg_wr(OFS_IOCTRL,   IOC_TGT);
    foreach (chans[i]) begin
      map_base[chans[i]] = (chans[i] == 1023) ? 32'h0207_FFE0 : 32'h0100_0000 + chans[i] * 32'h1_0000;
      reg_wr(OFS_MAP_LO + 16'(chans[i] * 4), map_base[chans[i]]);
    end
    reg_rd(OFS_MAP_LO + 16'(1023 * 4), v);
    check(v == 32'h0207_FFE0, "Mapper entry read back");
    reg_rd(OFS_MB_TB, v);
    check(v == 32'h1230_0000, "MBus translation base read back");
    reg_rd(TSI_GA, v);
    check(v == 32'h27, "geographic address");

    // ---- phase A: broadcast traffic with DMA on, PIO from both sides
    reg_wr(OFS_IOCTRL, IOC_TGT | IOC_EN);
    for (int n = 0; n < 300; ) begin
      int ch, len;
      ch  = chans[$urandom % 5];
      len = 1 + $urandom % 8;
      for (int j = 0; j < len; j++) send(10'(ch), 1);
      n += len;
    end
    for (int j = 0; j < 4; j++) send(10'd1023, 1);   // crosses the 512 KB wrap
    fork
      begin
        for (int k = 0; k < 16; k++) begin
          repeat (20 + $urandom % 40) @(posedge clk);
          rq.push_back('{1, 16'(k), {$urandom, $urandom, $urandom, $urandom}});
        end
      end
      begin
        for (int k = 0; k < 6; k++) begin
          repeat (30 + $urandom % 60) @(posedge clk);
          pio_wr(WIN_A, 20'h00400 + 20'(k * 16), 1, 0, {32'hA000_0000 + k, 32'h0});
          pio_wr(WIN_A, 20'h00408 + 20'(k * 16), 1, 1, {32'hB000_0000 + k, 32'h1});
        end
      end
    join
    drain_and_verify("phase A");
    check(hmem.exists(32'h0208_0000 >> 3) == 0, "no DMA data past the wrap boundary");
    for (int k = 0; k < 6; k++)
      check(rmem.exists(16'h0040 + k) &&
            rmem[16'h0040 + k] == {32'hB000_0000 + k, 32'h1, 32'hA000_0000 + k, 32'h0},
            $sformatf("PIO write %0d reached the MBus target", k));
    n_win_a += 6;

    // ---- phase B: single PIO checks
    // window A: written to the MBus on the beat marked last
    v = n_rmem_writes;
    pio_wr(WIN_A, 20'h00120, 1, 0, 64'h1111_2222_3333_4444);
    check(n_rmem_writes == v, "window A: no MBus cycle before the last beat");
    pio_wr(WIN_A, 20'h00128, 1, 1, 64'h5555_6666_7777_8888);
    check(rmem[16'h0012] == 128'h5555_6666_7777_8888_1111_2222_3333_4444, "window A write");
    n_win_a++;
    // window B: written when the upper word arrives, 32-bit beats
    v = n_rmem_writes;
    pio_wr(WIN_B, 20'h00230, 0, 0, 64'hC0);
    pio_wr(WIN_B, 20'h00234, 0, 0, 64'hC1);
    pio_wr(WIN_B, 20'h00238, 0, 1, 64'hC2);
    check(n_rmem_writes == v, "window B: no MBus cycle before the upper word");
    pio_wr(WIN_B, 20'h0023C, 0, 0, 64'hC3);
    check(rmem[16'h0023] == {32'hC3, 32'hC2, 32'hC1, 32'hC0}, "window B write");
    n_win_b++;
    // reads, second half from the read buffer
    v = n_hit;
    pio_rd(WIN_A, 20'h00120, q);
    check(q == 64'h1111_2222_3333_4444, "PIO read, lower half");
    pio_rd(WIN_A, 20'h00128, q);
    check(q == 64'h5555_6666_7777_8888, "PIO read, upper half");
    settle();
    check(n_hit == v + 1, "upper half served from the read buffer");
    pio_rd(WIN_B, 20'h00238, q);
    check(q == 64'h0000_00C3_0000_00C2, "PIO read through window B");
    n_pio_rd += 2;
    // the second board reads a word of host memory written earlier
    rq.push_back('{0, 16'h0003, 128'h0});
    wait_bus_idle();
    check(rres.size() == 1 && rres[0] == {hget(32'h1230_0038), hget(32'h1230_0030)},
          "MBus read of host memory through the target window");
    rres.delete();
    // no target: timeout, all ones, error register
    reg_wr(OFS_PCI_TB, 32'h0070_0000);
    pio_rd(WIN_A, 20'h00000, q);
    check(q == 64'hFFFF_FFFF_FFFF_FFFF, "timed-out read returns all ones");
    reg_rd(OFS_MB_ERR, v);
    check(v[ERR_TIMEOUT] == 1, "error register shows the timeout");
    reg_wr(OFS_PCI_TB, 32'h0050_0000);
    // MBus-side PIO in progress: the PCI-side access is retried
    lm_delay = 40;
    v = n_retry_tgt;
    w = {$urandom, $urandom, $urandom, $urandom};
    rq.push_back('{1, 16'h0100, w});
    wait_spy(SP_PT_BUSY, 1);
    pio_wr(WIN_A, 20'h00500, 1, 0, 64'hDEAD);
    pio_wr(WIN_A, 20'h00508, 1, 1, 64'hBEEF);
    check(n_retry_tgt > v, "PCI-side PIO retried while the MBus side has the card");
    check(rmem[16'h0050] == {64'hBEEF, 64'hDEAD}, "retried PIO write completes");
    n_win_a++;
    wait_bus_idle();
    lm_delay = 1;
    check({hget(32'h1230_1008), hget(32'h1230_1000)} == w, "MBus write into host memory");

    // ---- phase C: broadcast lockout
    reg_wr(OFS_IOCTRL, IOC_TGT | IOC_LCK);
    lockout_on = 1;
    v = n_store;
    for (int j = 0; j < 10; j++) send(10'd2, 0);
    wait_bus_idle();
    settle();
    check(n_store == v && spy[SP_EMPTY], "locked-out words are not stored");
    reg_rd(TSI_BSTAT, v);
    check(v[19] == 1, "status: local FIFO empty");

    // ---- phase D: fill the FIFO with DMA off, DDONE withheld, then clear
    reg_wr(OFS_IOCTRL, IOC_TGT);
    lockout_on = 0;
    for (int j = 0; j < DEPTH; j++) send(10'(chans[j % 4]), 0);
    for (int j = 0; j < 8; j++) send(10'd2, 1);
    wait_spy(SP_FULL, 1);
    repeat (100) @(posedge clk);
    #1 check(spy[SP_HELD] && mbt_state == 2, "source held in its strobe while the FIFO is full");
    fifo_count(cnt);
    check(cnt == DEPTH, "FIFO holds 4096 words");
    reg_rd(TSI_BSTAT, v);
    check(v[19] == 0, "status: local FIFO not empty");
    reg_wr(OFS_IOCTRL, IOC_TGT | IOC_CLR);
    wait_bus_idle();
    fifo_count(cnt);
    check(cnt == 8, "after clear only the later words are stored");
    reg_wr(OFS_IOCTRL, IOC_TGT | IOC_EN);
    drain_and_verify("phase D");

    // ---- phase E: interrupts
    reg_wr(OFS_IOCTRL, IOC_TGT);
    reg_wr(TSI_ICTRL, 32'h7 | (32'h1 << 19) | (32'h1 << 20) | (32'h1 << 30));
    mod_done = 19'h3;
    repeat (2) @(posedge clk);
    check(!lint, "no interrupt while a masked module is not done");
    send(10'd0, 1);
    wait_bus_idle();
    mod_done = 19'h7;
    repeat (2) @(posedge clk);
    check(!lint, "no new-event interrupt while the FIFO holds data");
    reg_wr(OFS_IOCTRL, IOC_TGT | IOC_EN);
    drain_and_verify("phase E");
    settle();
    check(lint && spy[SP_INT1], "new-event interrupt once the FIFO is empty");
    reg_rd(TSI_IREQ, v);
    check(v[30] && v[2], "request register: INT_1 and new event");
    reg_wr(TSI_ICTRL, (32'h1 << 22) | (32'h1 << 31));
    check(!lint, "interrupts off");
    scl_init = 1;
    repeat (2) @(posedge clk);
    settle();
    check(lint && spy[SP_INT2], "external SCL interrupt on INT_2");
    reg_rd(TSI_IREQ, v);
    check(v[31] && v[1] && v[8], "request register: INT_2, external, SCL line");
    scl_init = 0;
    reg_wr(TSI_ICTRL, (32'h1 << 21) | (32'h1 << 30));
    reg_wr(TSI_ITEST, 32'h1);
    settle();
    check(lint && spy[SP_INT1], "internal test interrupt");
    reg_wr(TSI_ITEST, 32'h0);
    check(!lint, "test interrupt removed");

    // ---- phase F: crate master lines, scaler, spy channels
    reg_wr(TSI_CMASTER, 32'h03BC);
    check(crate_master_oe && done_out && buffer_out == 2'b11 && !start_load_n
          && mbreset_n_out && vbd_start_req, "crate master lines");
    reg_wr(TSI_SCALER, 32'h8765_4321);
    check(tsl_out == 32'h8765_4321, "scaler outputs");
    spy_sel = 2'd3;
    repeat (2) @(posedge clk);
    check(spy == dma_cmd_pci_addr, "spy group 3 shows the DMA address");
    spy_sel = 2'd2;
    repeat (2) @(posedge clk);
    check(spy == 32'h0, "spy group 2 shows the empty FIFO");

    // ---- mechanisms
    check(n_contention == 0, "no two drivers on an MBus line");
    $display("broadcast words sent %0d, stored %0d, DMA words %0d, PLX bursts %0d",
             bc_sent, n_store, n_dma_words, n_plx_burst);
    begin
      string names [21] = '{"broadcast store", "DMA burst", "burst continued", "channel change",
                            "DMA preempted by PIO", "Mapper wrap", "DDONE withheld (FIFO full)",
                            "FIFO full", "FIFO clear", "broadcast lockout", "retry: no grant",
                            "retry: MBus side first", "read buffer hit", "MBus timeout",
                            "MBus target write", "MBus target read", "grant taken",
                            "grant passed on", "INT_1", "INT_2", "new event"};
      int counts [21];
      counts = '{n_store, n_burst, n_dma_words - n_burst, n_chan, n_preempt, n_wrap, n_held,
                 n_full, n_clear, n_lockout_ack, n_retry_grant, n_retry_tgt, n_hit, n_timeout,
                 n_tgt_wr, n_tgt_rd, n_taken, n_passed, n_int1, n_int2, n_new_evt};
      foreach (names[i]) begin
        $display("  %-28s %0d", names[i], counts[i]);
        check(counts[i] > 0, $sformatf("mechanism never happened: %s", names[i]));
      end
      $display("  %-28s %0d / %0d / %0d", "window A, B writes, reads", n_win_a, n_win_b, n_pio_rd);
      $display("  %-28s %0d", "PLX retries", n_plx_retry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
