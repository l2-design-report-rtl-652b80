// tb_bcast_fifo: self-checking test of the broadcast FIFO at its full
// 4K x 138-bit size. Fills it completely with random words, checks the full
// flag appears after exactly DEPTH writes and that a write to a full FIFO is
// ignored, drains it and compares every word in order against a queue model,
// then checks simultaneous read/write, the count output and the clear input.
module tb_bcast_fifo;
  localparam int W = 138, D = 4096;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  bcast_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(empty && !full && count == 0, "empty after reset");
    // fill
    for (int i = 0; i < D; i++) begin
      wr_data = rnd(); wr_en = 1; model.push_back(wr_data);
      @(posedge clk); #1;
    end
    wr_en = 0;
    check(full && !empty, "full after DEPTH writes");
    check(count == D, "count == DEPTH");
    wr_data = rnd(); wr_en = 1; @(posedge clk); #1; wr_en = 0;
    check(count == D, "write while full ignored");
    // drain
    for (int i = 0; i < D; i++) begin
      logic [W-1:0] exp;
      exp = model.pop_front();
      if (rd_data !== exp) begin failures++; $display("FAIL: word %0d", i); end
      checks++;
      rd_en = 1; @(posedge clk); #1;
    end
    rd_en = 0;
    check(empty && count == 0, "empty after drain");
    // simultaneous read and write
    wr_data = rnd(); model.push_back(wr_data); wr_en = 1; @(posedge clk); #1;
    for (int i = 0; i < 50; i++) begin
      check(rd_data == model[0], "streaming head");
      wr_data = rnd(); model.push_back(wr_data);
      rd_en = 1; wr_en = 1; @(posedge clk); #1;
      void'(model.pop_front());
      check(count == 1, "count stays 1 while streaming");
    end
    wr_en = 0; rd_en = 0;
    // clear
    for (int i = 0; i < 5; i++) begin wr_data = rnd(); wr_en = 1; @(posedge clk); #1; end
    wr_en = 0;
    check(count == 6, "count before clear");
    clr = 1; @(posedge clk); #1; clr = 0;
    check(empty && count == 0, "clear empties FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
