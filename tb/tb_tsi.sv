// tb_tsi: self-checking test of the trigger system interface registers.
// Checks every register's bit map against the document's tables: status
// inputs appear at their bit positions, output registers drive their lines
// and read back the register (not the line), read-only registers ignore
// writes, and the two interrupt outputs and the request register follow the
// interrupt equations for random masks, enables and line states.
module tb_tsi;
  import l2b_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_sel = 0, reg_we = 0;
  logic [15:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [18:0] mod_done = 0;
  logic ap_fifo_empty = 0, mbreset_n_in = 1, fifo_ef = 0;
  logic [3:0] ev_loaded = 0;
  logic [1:0] buffer_in = 0;
  logic done_out, start_load_n, mbreset_n_out, cm_oe, vbd_start_req;
  logic [1:0] buffer_out;
  logic scl_init = 0, vbd_done = 0, l2_answer_ready = 0;
  logic [3:0] j2_cm_out;
  logic [7:0] user_out, user_in = 0;
  logic [4:0] ga = 0;
  logic gap = 0;
  logic [31:0] tsl_out;
  logic int1, int2, new_evt_req;
  int checks = 0, failures = 0;

  tsi dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); reg_sel = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_sel = 0; reg_we = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); reg_sel = 1; reg_we = 0; reg_addr = a;
    #1 d = reg_rdata;
    @(negedge clk); reg_sel = 0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(start_load_n && mbreset_n_out && !cm_oe, "reset: active-low lines inactive, not crate master");
    // broadcast status 0x10C
    mod_done = 19'h5_A5A5; fifo_ef = 1; ap_fifo_empty = 0; ev_loaded = 4'hB;
    mbreset_n_in = 0; buffer_in = 2'b10;
    rd(TSI_BSTAT, v);
    check(v[18:0] == 19'h5_A5A5, "status: MOD_DONE(18:0)");
    check(v[19] == 1 && v[20] == 0, "status: FIFO_EF bit 19, AP_FIFO_EMPTY bit 20");
    check(v[24:21] == 4'hB, "status: EV_LOADED bits 24:21");
    check(v[25] == 0 && v[26] == 0 && v[27] == 1, "status: MBRESET* 25, BUFFER(0) 26, BUFFER(1) 27");
    check(v[31:28] == 0, "status: top bits zero");
    // crate master 0x110
    wr(TSI_CMASTER, 32'hFFFF_0000 | 32'b10_1111_1100);
    check(cm_oe && done_out && buffer_out == 2'b11 && start_load_n && mbreset_n_out,
          "crate master bits drive lines");
    check(vbd_start_req, "VBD_START_REQ bit 9");
    wr(TSI_CMASTER, 32'b00_0100_0100);
    check(cm_oe && !done_out && buffer_out == 2'b00 && start_load_n == 1 && !mbreset_n_out,
          "START_LOAD* bit 6, MBRESET* bit 7");
    vbd_done = 1; l2_answer_ready = 1;
    rd(TSI_CMASTER, v);
    check(v[15:0] == 16'b00_0100_0100, "readback is the register value");
    check(v[16] && !v[17] && v[18] && v[31:19] == 0, "VBD_DONE bit 16, L2_ANSWER_READY bit 18");
    // scaler 0x114
    wr(TSI_SCALER, 32'hDEAD_BEEF);
    check(tsl_out == 32'hDEAD_BEEF, "scaler drives TSL_OUT");
    rd(TSI_SCALER, v); check(v == 32'hDEAD_BEEF, "scaler readback");
    // test / user / GA registers
    wr(TSI_ITEST, 32'h1E);
    check(j2_cm_out == 4'hF, "J2 crate master outputs bits 4:1");
    wr(TSI_UOUT, 32'h1A5);
    check(user_out == 8'hA5, "user outputs 7:0");
    user_in = 8'h3C; ga = 5'h13; gap = 1;
    rd(TSI_UIN, v); check(v == 32'h3C, "user inputs");
    wr(TSI_UIN, 32'hFF);
    rd(TSI_UIN, v); check(v == 32'h3C, "user input register is read-only");
    rd(TSI_GA, v); check(v == 32'h33, "GA(4:0) and GAP bit 5");
    // interrupts, random
    for (int k = 0; k < 300; k++) begin
      logic [31:0] ictrl;
      logic [18:0] mask;
      logic test_req, flag, nev, ireq, ereq, e1, e2;
      ictrl = $urandom;
      mask = (k % 3 == 0) ? 19'h0_0007 : ictrl[18:0];
      ictrl[18:0] = mask;
      mod_done = (k % 2 == 0) ? (19'($urandom) | mask) : 19'($urandom);
      fifo_ef = $urandom; ap_fifo_empty = $urandom; scl_init = $urandom;
      test_req = $urandom;
      wr(TSI_ICTRL, ictrl);
      wr(TSI_ITEST, {27'h0, 4'h0, test_req});
      flag = ictrl[19] ? fifo_ef : ap_fifo_empty;
      nev  = ((mod_done & mask) == mask) && flag && ictrl[20];
      ireq = test_req && ictrl[21];
      ereq = scl_init && ictrl[22];
      e1   = (nev || ireq) && ictrl[30];
      e2   = ereq && ictrl[31];
      #1;
      check(int1 == e1 && int2 == e2 && new_evt_req == nev, $sformatf("interrupt outputs %0d", k));
      rd(TSI_IREQ, v);
      check(v == {e2, e1, 21'h0, scl_init, 5'h0, nev, ereq, ireq}, $sformatf("request register %0d", k));
      rd(TSI_ICTRL, v);
      check(v == ictrl, "internal control readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
