// tb_boss_arbiter: self-checking test of the MBus BOSS daisy chain.
// Three arbiters are chained BOSSGRIN -> BOSSGROUT. A crate-level grant
// source (test model) pulses the first BOSSGRIN whenever someone requests
// and the BOSS line is free. Checks: never two owners, the board nearest the
// head of the chain wins when several request, a board that does not
// request passes the grant on after GRANT_DELAY clocks, an owner blocks the
// grant, ownership lasts exactly as long as the request, and every request
// is eventually served.
module tb_boss_arbiter;
  logic clk = 0, rst_n = 0;
  logic [2:0] req = 0, bossreq, boss_drv, local_boss;
  logic [3:0] gr;   // gr[i] = grant into board i, gr[3] = out of the chain
  logic head_grant = 0;
  wire boss_bus = |boss_drv;
  int checks = 0, failures = 0;

  assign gr[0] = head_grant;
  for (genvar i = 0; i < 3; i++) begin : g
    boss_arbiter dut (.clk, .rst_n, .local_req(req[i]), .boss_bus, .grin(gr[i]),
      .bossreq(bossreq[i]), .boss_drv(boss_drv[i]), .grout(gr[i+1]), .local_boss(local_boss[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Crate grant source: a one-clock pulse, then wait for the chain to settle.
  initial forever begin
    @(posedge clk);
    if (rst_n && |bossreq && !boss_bus) begin
      #1 head_grant = 1;
      @(posedge clk); #1 head_grant = 0;
      repeat (6) @(posedge clk);
    end
  end

  int two_owners = 0;
  always @(posedge clk) if (rst_n && $countones(local_boss) > 1) two_owners++;

  task automatic wait_owner(input int b, output int clocks);
    clocks = 0;
    while (!local_boss[b] && clocks < 100) begin @(posedge clk); #1; clocks++; end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // single request from board 2: boards 0 and 1 pass the grant
    @(negedge clk) req[2] = 1;
    wait_owner(2, c);
    check(local_boss == 3'b100, "board 2 owns the bus");
    check(c <= 8, $sformatf("grant passed through two boards in %0d clocks", c));
    check(bossreq == 3'b100, "BOSSREQ follows the request");
    // grant pulses while board 2 owns: nobody else may take it
    @(negedge clk) req[0] = 1;
    repeat (20) @(posedge clk); #1;
    check(local_boss == 3'b100, "owner keeps bus while requesting");
    @(negedge clk) req[2] = 0;
    @(posedge clk); #1;
    check(!local_boss[2], "ownership ends with the request");
    wait_owner(0, c);
    check(local_boss == 3'b001, "waiting board 0 served next");
    @(negedge clk) req[0] = 0;
    repeat (3) @(posedge clk);
    // simultaneous requests: head of chain wins, then the others in turn
    @(negedge clk) req = 3'b110;
    wait_owner(1, c);
    check(local_boss == 3'b010, "board 1 (nearer the head) wins over board 2");
    check(gr[2] == 0, "owner blocks BOSSGROUT");
    repeat (5) @(posedge clk);
    @(negedge clk) req[1] = 0;
    wait_owner(2, c);
    check(local_boss == 3'b100, "board 2 served after board 1");
    @(negedge clk) req[2] = 0;
    // random traffic
    for (int k = 0; k < 40; k++) begin
      int b;
      b = $urandom_range(0, 2);
      @(negedge clk) req[b] = 1;
      wait_owner(b, c);
      check(local_boss[b], $sformatf("random request %0d from board %0d served", k, b));
      repeat ($urandom_range(1, 4)) @(posedge clk);
      @(negedge clk) req[b] = 0;
    end
    check(two_owners == 0, "never two owners");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
