// bcast_decode: MBus broadcast address decode (DMA receive side).
//
// The lowest 1024 MBus addresses (MBAD bits 31:10 all zero) are DMA broadcast
// channels. When a write cycle (RD low, DSTROBE high) addresses one of them,
// this block clocks the 128-bit MBus data and address bits 9:0 into the
// broadcast FIFO once and answers with DDONE, which it holds until the
// master drops DSTROBE (a four-phase handshake).
//
// Full FIFO: with HOLDOFF=1 DDONE is withheld until the FIFO has room, so
// the sending board waits (the hold-off scheme the document recommends for
// the first firmware). With HOLDOFF=0 the word is acknowledged and lost, as
// on the original boards; `dropped` pulses for each lost word.
// Broadcast lockout (I/O control bit 1): the word is acknowledged but not
// stored, so a locked-out board never stalls the bus (this design's choice).
//
// Timing: the FIFO write happens on the first clock DSTROBE is seen high
// with a broadcast address; DDONE rises on the next clock. All inputs are
// assumed already synchronous to clk.
module bcast_decode
  import l2b_pkg::*;
#(
  parameter bit HOLDOFF = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mb_sig_t       mb_i,          // MBus lines as seen on the backplane
  input  logic          lockout,       // I/O control: broadcast lockout
  input  logic          fifo_full,
  output logic          fifo_wr,
  output logic [BC_ADDR_W+MB_DATA_W-1:0] fifo_wdata, // {addr[9:0], data[127:0]}
  output logic          ddone,         // drive DDONE
  output logic          dropped,       // a word was lost (HOLDOFF=0 only)
  output logic          held           // DDONE is being withheld (FIFO full)
);
  typedef enum logic [1:0] {S_IDLE, S_ACK} state_e;
  state_e state;

  logic sel;
  assign sel = mb_i.dstrobe && !mb_i.rd && (mb_i.ad[MB_ADDR_W-1:BC_ADDR_W] == '0);

  assign fifo_wdata = {mb_i.ad[BC_ADDR_W-1:0], mb_i.da};

  always_comb begin
    fifo_wr = 1'b0;
    dropped = 1'b0;
    held    = 1'b0;
    if (state == S_IDLE && sel && !lockout) begin
      if (!fifo_full)    fifo_wr = 1'b1;
      else if (HOLDOFF)  held    = 1'b1;
      else               dropped = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ddone <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (sel && !held) begin
          state <= S_ACK;
          ddone <= 1'b1;
        end
        S_ACK: if (!mb_i.dstrobe) begin
          state <= S_IDLE;
          ddone <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Exactly one FIFO write per acknowledged MBus cycle.
  assert property (@(posedge clk) disable iff (!rst_n) fifo_wr |-> state == S_IDLE);

endmodule
