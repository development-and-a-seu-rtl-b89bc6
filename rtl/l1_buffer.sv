// l1_buffer: the 256-word level 1 hit buffer.
//
// Measurements are written like a circular buffer at the write pointer
// (wp, with one extra wrap bit). Reading is random access so the trigger
// matcher can look for the hits of each trigger; the matcher hands back a
// release pointer (base) below which words may be overwritten. A write that
// finds all 256 words in use is lost and pulses overflow. Each word carries
// a parity bit, checked on every read (rd_parity_err, one cycle with the
// data). A BIST port takes over both memory ports while bist_en is high.
//
// Following the document: 256 words, circular write, random-access read,
// word parity, BIST access. This design's own: word layout (hit_t plus
// parity, 36 bits), release-pointer protocol, drop on full.
// Timing: synchronous read, data one cycle after rd_addr.
module l1_buffer
  import amt_pkg::*;
#(
  parameter int unsigned DEPTH = L1_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr,
  input  hit_t                wr_hit,
  output logic [AW:0]         wp,
  input  logic [AW:0]         base,
  output logic                overflow,
  input  logic [AW-1:0]       rd_addr,
  output hit_t                rd_hit,
  output logic                rd_parity_err,
  // BIST access
  input  logic                bist_en,
  input  logic                bist_we,
  input  logic [AW-1:0]       bist_addr,
  input  logic [L1_WIDTH-1:0] bist_wdata,
  output logic [L1_WIDTH-1:0] bist_rdata
);
  logic [L1_WIDTH-1:0] mem [DEPTH];
  logic [L1_WIDTH-1:0] q;
  logic                full;

  assign full = (wp - base) == (AW+1)'(DEPTH);

  always_ff @(posedge clk) begin
    if (bist_en) begin
      if (bist_we) mem[bist_addr] <= bist_wdata;
      q <= mem[bist_addr];
    end else begin
      if (wr && !full) mem[wp[AW-1:0]] <= {^wr_hit, wr_hit};
      q <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; overflow <= 1'b0;
    end else begin
      overflow <= wr && full && !bist_en;
      if (wr && !full && !bist_en) wp <= wp + 1'b1;
    end
  end

  assign rd_hit        = q[L1_WIDTH-2:0];
  assign rd_parity_err = ^q;
  assign bist_rdata    = q;
endmodule
