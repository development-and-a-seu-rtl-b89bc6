// sync_fifo: single-clock FIFO used as the 8-word trigger FIFO and the
// 64-word read-out FIFO.
//
// A word array with read and write pointers that carry one extra wrap bit
// for the full/empty test. The head word is visible on dout while empty is
// low (show-ahead); pop removes it. A push while full is ignored and the
// owner is expected to check full first. A BIST port gives the memory
// test direct access to the array while bist_en is high; normal pushes and
// pops are then ignored. Depths and the BIST access follow the document;
// the rest is this design's choice. Timing: a pushed word is on dout the
// next cycle; bist_rdata is registered (one cycle after bist_addr).
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  input  logic             bist_en,
  input  logic             bist_we,
  input  logic [AW-1:0]    bist_addr,
  input  logic [WIDTH-1:0] bist_wdata,
  output logic [WIDTH-1:0] bist_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_push, do_pop;

  assign count   = wp - rp;
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full && !bist_en;
  assign do_pop  = pop && !empty && !bist_en;
  assign dout    = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (bist_en && bist_we) mem[bist_addr] <= bist_wdata;
    else if (do_push)       mem[wp[AW-1:0]] <= din;
    bist_rdata <= mem[bist_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end
endmodule
