// tb_spy_mux: self-checking test of the logic-analyser spy selector.
// Drives four groups of random probe values and a random group select, and
// checks that the spy pins show the selected group one clock later.
module tb_spy_mux;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel = 0;
  logic [31:0] probes [4];
  logic [31:0] spy, expect_q;
  int checks = 0, failures = 0;

  spy_mux #(.WIDTH(32), .GROUPS(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 4; g++) probes[g] = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (spy != 0) begin failures++; $display("FAIL: reset value"); end
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      for (int g = 0; g < 4; g++) probes[g] = $urandom;
      sel = 2'($urandom);
      expect_q = probes[sel];
      @(posedge clk); #1;
      checks++;
      if (spy != expect_q) begin failures++; $display("FAIL: group %0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
