// tsi: Trigger System Interface registers, interrupts and scaler outputs.
//
// A set of 32-bit registers in the Control & Monitor window (offsets
// 0x10C-0x148) through which software reads trigger and MBus status lines
// and drives trigger outputs:
//   0x10C broadcast status (R): MOD_DONE(18:0), local FIFO empty,
//         AP_FIFO_EMPTY, EV_LOADED(3:0), MBRESET*, BUFFER(1:0) as seen on
//         the backplane.
//   0x110 crate master (R/W bits 15:0): CRATE_MASTER (bit 2), DONE_OUT (3),
//         BUFFER(1:0) (5:4), START_LOAD* (6), MBRESET* (7), VBD_START_REQ
//         (9); reads VBD_DONE (16) and L2_ANSWER_READY (18). Lines of bits
//         7:4 are driven only while CRATE_MASTER is set (cm_oe).
//   0x114 scaler: TSL_OUT(31:0), the 32 front-panel ECL lines.
//   0x130 internal control (R/W): MOD_DONE_MASK(18:0), FIFO flag select
//         (19: 0 AP_FIFO_EMPTY, 1 local FIFO), new-event (20), internal test
//         (21), external SCL (22) interrupt enables, primary (30) and
//         secondary (31) interrupt enables.
//   0x134 interrupt request (R): internal (0), external (1), new event (2),
//         raw SCL line (8), INT_1 (30), INT_2 (31).
//   0x13C internal test (R/W): test interrupt request (0), J2 crate master
//         outputs (4:1).  0x140 user J2 outputs (7:0).  0x144 user J2 inputs
//         (7:0, R).  0x148 geographic address GA(4:0), GAP (5) (R).
// As the document requires, reading an output bit returns the register that
// drives the line, not the line level; the line level is read back through
// the status register.
//
// Interrupts: new event = every MOD_DONE bit selected by the mask is set,
// and the selected FIFO empty flag is set, and new-event interrupts are
// enabled; internal = test request and its enable; INT_1 = (new event or
// internal) and primary enable; external = SCL line and its enable; INT_2 =
// external and secondary enable. All are combinational from the registers
// and input lines.
//
// Register access: reg_sel with reg_we/reg_addr/reg_wdata; writes take
// effect on the clock edge, reg_rdata is combinational. Reset values of
// START_LOAD* and MBRESET* (1, the inactive level) and reading a mask that
// selects nothing as satisfied are this design's choices. Input lines are
// taken as already synchronous to clk.
module tsi
  import l2b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic        reg_sel,
  input  logic        reg_we,
  input  logic [15:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // MBus status lines (monitor)
  input  logic [18:0] mod_done,
  input  logic        ap_fifo_empty,
  input  logic [3:0]  ev_loaded,
  input  logic        mbreset_n_in,
  input  logic [1:0]  buffer_in,
  input  logic        fifo_ef,        // on-board broadcast FIFO empty
  // MBus crate-master outputs
  output logic        done_out,
  output logic [1:0]  buffer_out,
  output logic        start_load_n,
  output logic        mbreset_n_out,
  output logic        cm_oe,          // transceiver direction for bits 7:4
  // J2 trigger lines
  input  logic        scl_init,       // Ext Test Interrupt, J2 A24
  input  logic        vbd_done,       // J2 C25
  input  logic        l2_answer_ready,// J2 A23
  output logic        vbd_start_req,  // J2 A21
  output logic [3:0]  j2_cm_out,      // J2 test outputs 3:0
  output logic [7:0]  user_out,
  input  logic [7:0]  user_in,
  input  logic [4:0]  ga,
  input  logic        gap,
  // scaler (ECL) outputs
  output logic [31:0] tsl_out,
  // interrupts
  output logic        int1,
  output logic        int2,
  output logic        new_evt_req
);
  logic [15:0] cm_reg;
  logic [31:0] ictrl;
  logic [4:0]  itest;
  logic [7:0]  uout;
  logic [31:0] scaler;

  // ---------------------------------------------------------- interrupts
  logic mask_ok, fifo_flag, int_req, ext_req;
  assign mask_ok     = &(mod_done | ~ictrl[18:0]);
  assign fifo_flag   = ictrl[19] ? fifo_ef : ap_fifo_empty;
  assign new_evt_req = mask_ok && fifo_flag && ictrl[20];
  assign int_req     = itest[0] && ictrl[21];
  assign ext_req     = scl_init && ictrl[22];
  assign int1        = (int_req || new_evt_req) && ictrl[30];
  assign int2        = ext_req && ictrl[31];

  // ------------------------------------------------------------ outputs
  assign cm_oe         = cm_reg[2];
  assign done_out      = cm_reg[3];
  assign buffer_out    = cm_reg[5:4];
  assign start_load_n  = cm_reg[6];
  assign mbreset_n_out = cm_reg[7];
  assign vbd_start_req = cm_reg[9];
  assign j2_cm_out     = itest[4:1];
  assign user_out      = uout;
  assign tsl_out       = scaler;

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cm_reg <= 16'h00C0;
      ictrl  <= '0;
      itest  <= '0;
      uout   <= '0;
      scaler <= '0;
    end else if (reg_sel && reg_we) begin
      unique case (reg_addr)
        TSI_CMASTER: cm_reg <= reg_wdata[15:0];
        TSI_SCALER:  scaler <= reg_wdata;
        TSI_ICTRL:   ictrl  <= reg_wdata;
        TSI_ITEST:   itest  <= reg_wdata[4:0];
        TSI_UOUT:    uout   <= reg_wdata[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      TSI_BSTAT:   reg_rdata = {4'h0, buffer_in[1], buffer_in[0], mbreset_n_in,
                                ev_loaded, ap_fifo_empty, fifo_ef, mod_done};
      TSI_CMASTER: reg_rdata = {13'h0, l2_answer_ready, 1'b0, vbd_done, cm_reg};
      TSI_SCALER:  reg_rdata = scaler;
      TSI_ICTRL:   reg_rdata = ictrl;
      TSI_IREQ:    reg_rdata = {int2, int1, 21'h0, scl_init, 5'h0,
                                new_evt_req, ext_req, int_req};
      TSI_ITEST:   reg_rdata = {27'h0, itest};
      TSI_UOUT:    reg_rdata = {24'h0, uout};
      TSI_UIN:     reg_rdata = {24'h0, user_in};
      TSI_GA:      reg_rdata = {26'h0, gap, ga};
      default:     reg_rdata = '0;
    endcase
  end

endmodule
