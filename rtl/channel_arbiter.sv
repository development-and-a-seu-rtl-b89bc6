// channel_arbiter: moves measurements from the 24 channel buffers into the
// common L1 buffer.
//
// The L1 buffer takes one word per clock, so the arbiter grants one channel
// with a waiting word per cycle. The grant is round robin: the search starts
// one past the channel granted last, so no channel can be starved by a busy
// neighbour. The document states only that channel buffers hold words until
// they can be written into the L1 buffer; round robin is this design's
// choice. Timing: combinational grant; the granted channel's ack and the
// L1 write (l1_wr) happen in the same cycle.
module channel_arbiter
  import amt_pkg::*;
#(
  parameter int unsigned N = NUM_CH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ch_valid,
  input  hit_t         ch_hit [N],
  output logic [N-1:0] ch_ack,
  output logic         l1_wr,
  output hit_t         l1_hit
);
  localparam int unsigned CW = $clog2(N);
  logic [CW-1:0] last, grant;
  logic          any;

  always_comb begin
    any   = 1'b0;
    grant = last;
    for (int k = 1; k <= N; k++) begin
      logic [CW-1:0] c;
      c = CW'((int'(last) + k) % N);
      if (!any && ch_valid[c]) begin
        any   = 1'b1;
        grant = CW'(c);
      end
    end
    ch_ack = '0;
    if (any) ch_ack[grant] = 1'b1;
    l1_wr  = any;
    l1_hit = ch_hit[grant];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   last <= CW'(N - 1);
    else if (any) last <= grant;
  end
endmodule
