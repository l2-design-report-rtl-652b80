// boss_arbiter: MBus bus-ownership ("BOSS") daisy-chain arbitration.
//
// Each board on the MBus raises BOSSREQ while it wants the bus. A grant
// travels down the crate on the BOSSGRIN -> BOSSGROUT chain. A board that is
// requesting and sees the BOSS line free when the grant arrives (rising edge
// of BOSSGRIN) becomes the owner and drives BOSS; it keeps the bus until it
// withdraws its request. A board that does not take the grant passes it on
// to BOSSGROUT after a delay, so the board downstream only sees the grant
// once an upstream taker already drives BOSS.
//
// The signal set (BOSSREQ, BOSS, BOSSGRIN, BOSSGROUT, local request, local
// BOSS) and the structure -- an ownership flip-flop triggered by the grant,
// cleared when the local request goes away, and a delayed grant pass-through
// blocked by ownership -- follow the document's drawing. Here the flip-flop
// is clocked by clk and the grant edge is detected synchronously, and the
// "gate delay" is GRANT_DELAY clocks; that is this design's choice (the
// original is asynchronous, at gate speed).
//
// Timing: ownership is taken on the clock after the grant edge is sampled;
// BOSSGROUT follows BOSSGRIN GRANT_DELAY clocks later unless the board owns
// the bus.
module boss_arbiter #(
  parameter int unsigned GRANT_DELAY = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic local_req,   // this board wants the MBus
  input  logic boss_bus,    // BOSS line as seen on the backplane
  input  logic grin,        // BOSSGRIN
  output logic bossreq,     // BOSSREQ driven to the backplane
  output logic boss_drv,    // drive BOSS (this board owns the bus)
  output logic grout,       // BOSSGROUT
  output logic local_boss   // ownership, to the local MBus master
);
  logic grin_q;
  logic [GRANT_DELAY-1:0] dly;
  logic owner;

  wire grin_rise = grin && !grin_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grin_q <= 1'b0;
      dly    <= '0;
      owner  <= 1'b0;
    end else begin
      grin_q <= grin;
      dly    <= GRANT_DELAY'({dly, grin});
      if (!local_req)                          owner <= 1'b0;
      else if (grin_rise && !boss_bus)         owner <= 1'b1;
    end
  end

  assign bossreq    = local_req;
  assign boss_drv   = owner;
  assign local_boss = owner;
  assign grout      = dly[GRANT_DELAY-1] && !owner;

endmodule
