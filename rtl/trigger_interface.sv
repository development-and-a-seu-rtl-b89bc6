// trigger_interface: accepts level 1 triggers and queues their time tags.
//
// On each trigger pulse the current bunch id (coarse time in 25 ns units,
// coarse[12:1]) is written into the 8-word trigger FIFO as the trigger time
// tag. The matcher pops tags in order; the event id of the popped trigger
// is a 12-bit count of popped triggers since the last event count reset
// (ecr). A trigger that finds the FIFO full is lost and pulses overflow.
// Following the document: 8-word trigger FIFO holding the trigger time tag.
// This design's own: 12-bit tag, event id counted on the read side, loss on
// overflow. Timing: a tag is available (trg_valid) the cycle after its
// trigger pulse. The whole coarse count comes in but bit 0 (the 12.5 ns
// half of a bunch) is not needed for the tag and stays unused.
module trigger_interface
  import amt_pkg::*;
#(
  parameter int unsigned DEPTH = TRG_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   trigger,
  input  logic                   ecr,
  input  logic [COARSE_BITS-1:0] coarse,
  output logic                   trg_valid,
  output logic [BC_BITS-1:0]     trg_bc,
  output logic [BC_BITS-1:0]     trg_evid,
  input  logic                   trg_pop,
  output logic                   overflow,
  output logic [AW:0]            count,
  input  logic                   bist_en,
  input  logic                   bist_we,
  input  logic [AW-1:0]          bist_addr,
  input  logic [BC_BITS-1:0]     bist_wdata,
  output logic [BC_BITS-1:0]     bist_rdata
);
  logic empty, full;

  sync_fifo #(.WIDTH(BC_BITS), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(trigger), .din(coarse[COARSE_BITS-1:1]),
    .pop(trg_pop), .dout(trg_bc), .empty, .full, .count,
    .bist_en, .bist_we, .bist_addr, .bist_wdata, .bist_rdata
  );

  assign trg_valid = !empty && !bist_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trg_evid <= '0; overflow <= 1'b0;
    end else begin
      overflow <= trigger && full;
      if (ecr)                       trg_evid <= '0;
      else if (trg_pop && trg_valid) trg_evid <= trg_evid + 1'b1;
    end
  end
endmodule
