// pio_master: PCI-initiated programmed I/O onto the MBus (PIO windows A/B).
//
// The CPU reaches MBus memory through two 64 KB PCI windows of the PLX.
// Both map onto the same MBus addresses: the MBus word address is the upper
// 16 bits of the PCI Translation Base register followed by PCI address bits
// 19:4 (one MBus word is 16 bytes), as in the document's translation figure.
// The two windows differ in when an MBus cycle starts:
//   * Window A (transfers narrower than 128 bits): a write burst of one to
//     four 32-bit or one to two 64-bit beats is collected and the MBus write
//     starts on the last beat of the PCI burst.
//   * Window B (always 128 bits): the MBus write starts when the upper 32
//     bits of an MBus word (byte offset 0xC) are written.
// A read from either window at a 128-bit aligned address starts an MBus
// read; the word is kept, so the following reads of the other parts of the
// same word are answered from the buffer without a new MBus cycle.
//
// Transactions are coupled: the beat that starts an MBus cycle is answered
// only when the MBus cycle has finished. If the bus is not won within
// RETRY_LIMIT clocks, or an MBus-originated access to this board is in
// progress (it takes precedence), the beat is answered with retry so the
// PLX stops the PCI transaction and the PCI controller repeats it. A cycle
// that gets no DDONE ends by timeout (in mbus_master); a read then returns
// all ones. err reflects the last transaction (bits: 0 timeout, 1 no grant,
// 2 lost to MBus-side access).
//
// Which lanes of the buffer a beat fills, clearing the write buffer after
// each MBus write, and the error bit layout are this design's choices.
module pio_master
  import l2b_pkg::*;
#(
  parameter int unsigned RETRY_LIMIT = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          pci_tb,      // PCI Translation Base (0x10)
  input  logic                 tgt_busy,    // MBus-originated PIO in progress
  input  lb_req_t              lb_req,      // beats of windows A and B only
  output lb_rsp_t              lb_rsp,
  output logic [2:0]           err,
  // to mbus_master
  output logic                 mm_req,
  output logic                 mm_abort,
  output logic                 mm_rd,
  output logic [MB_ADDR_W-1:0] mm_addr,
  output logic [MB_DATA_W-1:0] mm_wdata,
  input  logic                 mm_done,
  input  logic                 mm_timeout,
  input  logic [MB_DATA_W-1:0] mm_rdata,
  input  logic                 mm_waiting,
  // events
  output logic                 ev_retry,
  output logic                 ev_buf_hit
);
  typedef enum logic [1:0] {S_IDLE, S_BUS} state_e;
  state_e state;

  logic [MB_DATA_W-1:0] wbuf, rbuf;
  logic                 rbuf_valid;
  logic [MB_ADDR_W-1:0] rbuf_addr;
  logic [$clog2(RETRY_LIMIT+1)-1:0] wcnt;

  wire [MB_ADDR_W-1:0] beat_mbaddr = {pci_tb[31:16], lb_req.addr[19:4]};
  wire upper_word = lb_req.size64 ? lb_req.addr[3] : (lb_req.addr[3:2] == 2'd3);
  wire go_write   = lb_req.write && ((lb_req.win == WIN_A) ? lb_req.last : upper_word);
  wire rd_hit     = rbuf_valid && (rbuf_addr == beat_mbaddr) && (lb_req.addr[3:0] != 4'h0);

  // Place a beat into a 128-bit word.
  function automatic logic [MB_DATA_W-1:0] merge(input logic [MB_DATA_W-1:0] w,
                                                 input logic [3:0] a, input logic s64,
                                                 input logic [63:0] d);
    logic [MB_DATA_W-1:0] r;
    r = w;
    if (s64) r[a[3]*64 +: 64] = d;
    else     r[a[3:2]*32 +: 32] = d[31:0];
    return r;
  endfunction

  // Take a beat out of a 128-bit word.
  function automatic logic [63:0] lane(input logic [MB_DATA_W-1:0] w,
                                       input logic [3:0] a, input logic s64);
    if (s64) return w[a[3]*64 +: 64];
    else     return {32'h0, w[a[3:2]*32 +: 32]};
  endfunction

  wire give_up = mm_waiting && ((wcnt >= RETRY_LIMIT[$bits(wcnt)-1:0]) || tgt_busy);

  always_comb begin
    lb_rsp     = LB_RSP_IDLE;
    mm_req     = (state == S_BUS);
    mm_abort   = (state == S_BUS) && give_up;
    ev_retry   = 1'b0;
    ev_buf_hit = 1'b0;
    if (lb_req.valid) begin
      unique case (state)
        S_IDLE: begin
          if (lb_req.write && !go_write) lb_rsp.ready = 1'b1;
          if (!lb_req.write && rd_hit) begin
            lb_rsp.ready = 1'b1;
            lb_rsp.rdata = lane(rbuf, lb_req.addr[3:0], lb_req.size64);
            ev_buf_hit   = 1'b1;
          end
        end
        S_BUS: begin
          if (give_up) begin
            lb_rsp.retry = 1'b1;
            ev_retry     = 1'b1;
          end else if (mm_done) begin
            lb_rsp.ready = 1'b1;
            if (mm_rd)
              lb_rsp.rdata = mm_timeout ? '1 : lane(mm_rdata, lb_req.addr[3:0], lb_req.size64);
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      wbuf       <= '0;
      rbuf       <= '0;
      rbuf_valid <= 1'b0;
      rbuf_addr  <= '0;
      mm_rd      <= 1'b0;
      mm_addr    <= '0;
      wcnt       <= '0;
      err        <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (lb_req.valid) begin
          wcnt <= '0;
          if (lb_req.write) begin
            wbuf <= merge(wbuf, lb_req.addr[3:0], lb_req.size64, lb_req.wdata);
            if (go_write) begin
              mm_rd      <= 1'b0;
              mm_addr    <= beat_mbaddr;
              rbuf_valid <= 1'b0;
              state      <= S_BUS;
            end
          end else if (!rd_hit) begin
            mm_rd   <= 1'b1;
            mm_addr <= beat_mbaddr;
            state   <= S_BUS;
          end
        end
        S_BUS: begin
          if (mm_waiting) wcnt <= wcnt + 1'b1;
          if (give_up) begin
            err   <= 3'b0;
            err[tgt_busy ? ERR_PREEMPT : ERR_NO_GRANT] <= 1'b1;
            state <= S_IDLE;
          end else if (mm_done) begin
            err <= {2'b00, mm_timeout};
            if (mm_rd) begin
              rbuf       <= mm_timeout ? '1 : mm_rdata;
              rbuf_addr  <= mm_addr;
              rbuf_valid <= !mm_timeout;
            end else begin
              wbuf <= '0;
            end
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mm_wdata = wbuf;

  // A beat is answered at most one way.
  assert property (@(posedge clk) disable iff (!rst_n) !(lb_rsp.ready && lb_rsp.retry));

endmodule
