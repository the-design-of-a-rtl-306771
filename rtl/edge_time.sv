// edge_time: coarse time base of the coincidence trigger.
//
// A free-running binary counter clocked by the core clock (250 MHz, so one
// count is 4 ns). Every edge processing unit of the system reads the same
// counter, which gives all channels one common time base; the fine part of a
// time stamp comes from the sample index inside the sampled word. The 40-bit
// width and the 250 MHz clock are those of the reference design; at 250 MHz
// the counter wraps after about 73 minutes.
//
// Interface: clk, synchronous active-high rst (a design choice) which clears
// the count, coarse_o the current count. The count advances by one on every
// rising clock edge after reset has been released and wraps to zero.
`timescale 1ps / 1ps

module edge_time
  import tdc_pkg::*;
#(
  parameter int unsigned WIDTH = COARSE_W
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] coarse_o
);

  always_ff @(posedge clk) begin
    if (rst) coarse_o <= '0;
    else     coarse_o <= coarse_o + 1'b1;
  end

endmodule
