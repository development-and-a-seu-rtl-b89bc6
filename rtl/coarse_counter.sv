// coarse_counter: the 13-bit coarse time counter of the TDC.
//
// It counts periods of the 80 MHz PLL clock (12.5 ns), so together with the
// 4-bit fine time of a channel it gives the 17-bit time of a hit in
// 0.78125 ns units. A bunch count reset (bcr, one clock pulse) loads the
// offset, so that hit times and trigger tags are counted from a chosen bunch
// crossing; the counter wraps at 2^13 (102.4 us). The bunch id used for
// trigger tags is coarse[12:1] (25 ns units). The counter width follows the
// chip's 13-bit coarse range; the reset-to-offset behaviour is this design's
// choice. Timing: coarse changes one cycle after each clock edge; after bcr
// the counter reads offset on the next cycle.
module coarse_counter
  import amt_pkg::*;
#(
  parameter int unsigned W = COARSE_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bcr,        // bunch count reset
  input  logic [W-1:0] offset,     // value loaded by bcr and reset
  output logic [W-1:0] coarse
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   coarse <= '0;
    else if (bcr) coarse <= offset;
    else          coarse <= coarse + 1'b1;
  end
endmodule
