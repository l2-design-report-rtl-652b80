// dma_engine: moves broadcast FIFO data into host memory through the PLX.
//
// The PLX 9656 does the PCI mastering; this block only programs it and
// feeds it data. When DMA is enabled and the FIFO is not empty, the engine
// takes the head entry, looks up the channel's PCI address in the Mapper and
// hands that address to the PLX (cmd_valid/cmd_pci_addr, accepted with
// cmd_ready: the "set up the DMA registers and go" step). The PLX then reads
// the DMA data port on the local bus; each MBus word is given as two 64-bit
// beats, bits 63:0 first. After the second beat the Mapper entry is advanced
// by 16 bytes.
//
// Burst rule: while the next FIFO entry is for the same channel, the burst
// continues under the one PCI address. When the channel changes, the FIFO
// runs empty, DMA is disabled, or a PIO transaction is pending (pio_hold),
// the second beat of the current word carries eot and the burst ends; the
// burst also ends where the Mapper address wraps at a 512 KB boundary, since
// the PLX counts its PCI address linearly. The next burst starts again from
// the Mapper, so PIO takes precedence over DMA at MBus-word granularity.
//
// Timing: FIFO pop and Mapper read in one clock, address to the PLX the clock
// after. Beats are answered in the clock they are requested (ready is
// combinational on the request), so a burst runs at the PLX's pace.
// The command handshake and the eot flag are this design's model of the
// PLX local bus DMA signals; the document gives the behaviour, not the pins.
module dma_engine
  import l2b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dma_en,        // I/O control bit 0
  input  logic        pio_hold,      // PIO pending: end the burst
  // broadcast FIFO, fall-through read side
  input  logic        fifo_empty,
  input  logic [BC_ADDR_W+MB_DATA_W-1:0] fifo_head,
  output logic        fifo_rd,
  // Mapper
  output logic        map_rd,
  output logic        map_inc,
  output logic [BC_ADDR_W-1:0] map_idx,
  output logic [31:0] map_cur,
  input  logic [31:0] map_rdata,
  input  logic [31:0] map_next,
  // PLX DMA set-up
  output logic        cmd_valid,
  output logic [31:0] cmd_pci_addr,
  input  logic        cmd_ready,
  // local bus: DMA data port
  input  lb_req_t     lb_req,
  output lb_rsp_t     lb_rsp,
  // events, for status and test
  output logic        ev_burst_start,
  output logic        ev_burst_end,
  output logic        ev_chan_change,   // burst ended because the channel changed
  output logic        ev_preempt,       // burst ended because of pio_hold
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_CMD, S_LO, S_HI} state_e;
  state_e state;

  logic [BC_ADDR_W-1:0] cur_ch;
  logic [MB_DATA_W-1:0] cur_data;
  logic [31:0]          pci;

  wire [BC_ADDR_W-1:0] head_ch = fifo_head[BC_ADDR_W+MB_DATA_W-1:MB_DATA_W];
  wire beat = lb_req.valid && !lb_req.write;
  wire wraps = (map_next[18:3] == 16'h0);   // Mapper address wraps at 512 KB
  wire cont = dma_en && !pio_hold && !fifo_empty && (head_ch == cur_ch) && !wraps;
  wire start = dma_en && !pio_hold && !fifo_empty;

  assign busy         = (state != S_IDLE);
  assign cmd_valid    = (state == S_CMD);
  assign cmd_pci_addr = pci;
  assign map_idx      = (state == S_IDLE) ? head_ch : cur_ch;
  assign map_cur      = pci;

  always_comb begin
    fifo_rd        = 1'b0;
    map_rd         = 1'b0;
    map_inc        = 1'b0;
    lb_rsp         = LB_RSP_IDLE;
    ev_burst_start = 1'b0;
    ev_burst_end   = 1'b0;
    ev_chan_change = 1'b0;
    ev_preempt     = 1'b0;
    unique case (state)
      S_IDLE: if (start) begin
        fifo_rd = 1'b1;
        map_rd  = 1'b1;
        ev_burst_start = 1'b1;
      end
      S_LO: if (beat) begin
        lb_rsp.ready = 1'b1;
        lb_rsp.rdata = cur_data[63:0];
      end
      S_HI: if (beat) begin
        lb_rsp.ready = 1'b1;
        lb_rsp.rdata = cur_data[127:64];
        map_inc      = 1'b1;
        if (cont) begin
          fifo_rd = 1'b1;
        end else begin
          lb_rsp.eot     = 1'b1;
          ev_burst_end   = 1'b1;
          ev_chan_change = dma_en && !pio_hold && !fifo_empty && (head_ch != cur_ch);
          ev_preempt     = pio_hold;
        end
      end
      default: if (lb_req.valid) lb_rsp.retry = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_ch   <= '0;
      cur_data <= '0;
      pci      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cur_ch   <= head_ch;
          cur_data <= fifo_head[MB_DATA_W-1:0];
          state    <= S_LOOK;
        end
        S_LOOK: begin
          pci   <= map_rdata;
          state <= S_CMD;
        end
        S_CMD:  if (cmd_ready) state <= S_LO;
        S_LO:   if (beat) state <= S_HI;
        S_HI:   if (beat) begin
          pci <= map_next;
          if (cont) begin
            cur_data <= fifo_head[MB_DATA_W-1:0];
            state    <= S_LO;
          end else begin
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The PLX only reads the DMA data port.
  assert property (@(posedge clk) disable iff (!rst_n) lb_req.valid |-> !lb_req.write);

endmodule
