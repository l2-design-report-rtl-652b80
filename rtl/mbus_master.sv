// mbus_master: one MBus master cycle, as used by PCI-initiated PIO.
//
// A cycle is: request the bus from the BOSS arbitration (bus_req), wait for
// ownership (local_boss), drive address, RD and (for writes) data, raise
// DSTROBE, wait for the target's DDONE, latch read data, drop DSTROBE, wait
// for DDONE to fall, release the bus. The MBus is a 128-bit data bus
// addressed in 128-bit words, so every cycle moves one whole MBus word.
//
// The document requires a timeout so that the PCI bus is released when no
// target answers; TIMEOUT clocks after DSTROBE without DDONE the cycle ends
// with `timeout` set. While still waiting for the bus, the caller may
// withdraw (abort), which is how the 16-clock PCI retry rule is met.
//
// Interface: hold req (with rd/addr/wdata stable) until done pulses; done
// comes with timeout and, for reads, rdata. ad_oe/da_oe/ctl_oe are the
// direction controls of the board's MBus drivers (AD_DIR, DA_DIR).
// Timing: setup clock before DSTROBE, DSTROBE-DDONE four-phase handshake;
// a cycle with an immediately answering target takes 6 clocks after the
// grant. The phase sequence and the timeout value are this design's choices.
module mbus_master
  import l2b_pkg::*;
#(
  parameter int unsigned TIMEOUT = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req,
  input  logic                 abort,
  input  logic                 rd,
  input  logic [MB_ADDR_W-1:0] addr,
  input  logic [MB_DATA_W-1:0] wdata,
  output logic                 done,
  output logic                 timeout,
  output logic [MB_DATA_W-1:0] rdata,
  output logic                 waiting,   // asking for the bus, no grant yet
  // arbitration
  output logic                 bus_req,
  input  logic                 local_boss,
  // MBus lines
  input  mb_sig_t              mb_i,
  output mb_sig_t              mb_o,
  output logic                 ad_oe,
  output logic                 da_oe,
  output logic                 ctl_oe
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_SETUP, S_STROBE, S_RELEASE, S_DONE} state_e;
  state_e state;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic to_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      timer   <= '0;
      to_flag <= 1'b0;
      rdata   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          state   <= S_REQ;
          to_flag <= 1'b0;
        end
        S_REQ: begin
          if (abort)           state <= S_IDLE;
          else if (local_boss) state <= S_SETUP;
        end
        S_SETUP: begin
          state <= S_STROBE;
          timer <= '0;
        end
        S_STROBE: begin
          timer <= timer + 1'b1;
          if (mb_i.ddone) begin
            if (rd) rdata <= mb_i.da;
            state <= S_RELEASE;
            timer <= '0;
          end else if (timer == TIMEOUT[$bits(timer)-1:0]) begin
            to_flag <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_RELEASE: begin
          timer <= timer + 1'b1;
          if (!mb_i.ddone) state <= S_DONE;
          else if (timer == TIMEOUT[$bits(timer)-1:0]) begin
            to_flag <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  wire driving = (state == S_SETUP) || (state == S_STROBE) || (state == S_RELEASE);

  assign bus_req = (state == S_REQ) || driving;
  assign waiting = (state == S_REQ);
  assign done    = (state == S_DONE);
  assign timeout = to_flag;

  always_comb begin
    mb_o         = '0;
    mb_o.ad      = addr;
    mb_o.da      = wdata;
    mb_o.rd      = rd;
    mb_o.dstrobe = (state == S_STROBE);
  end
  assign ad_oe  = driving;
  assign ctl_oe = driving;
  assign da_oe  = driving && !rd;

  // Request fields must not change while a cycle is in flight.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state inside {S_SETUP, S_STROBE}) |-> $stable(addr) && $stable(rd));

endmodule
