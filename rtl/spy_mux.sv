// spy_mux: logic-analyser spy channels.
//
// Thirty-two FPGA pins drive a header so that internal signals can be
// watched with a logic analyser while debugging firmware. Which signals
// appear is chosen by firmware settings; here the on-board configuration
// switch selects one of GROUPS groups of 32 internal signals, and the chosen
// group is registered once before it leaves the chip so the header sees
// clean, clock-aligned edges.
// Interface: probes[g] is group g; sel picks the group (values past the last
// group show zeros). Timing: one clock from probe to pin.
// The number of groups, their contents (set where this block is
// instantiated) and the output register are this design's choices; the
// document gives the 32 channels and the selection by firmware settings.
module spy_mux #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned GROUPS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(GROUPS)-1:0] sel,
  input  logic [WIDTH-1:0]          probes [GROUPS],
  output logic [WIDTH-1:0]          spy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spy <= '0;
    else        spy <= probes[sel];
  end
endmodule
