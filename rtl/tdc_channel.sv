// tdc_channel: one TDC input channel with its 4-word channel buffer.
//
// Each 12.5 ns clock period the channel receives the hit input as 16
// samples, one per fine bin (bin 0 earliest), taken by the 16 phases of the
// ring oscillator. A 0->1 step between neighbouring samples is a leading
// edge, a 1->0 step a trailing edge; the bin of the step is the 4-bit fine
// time and the coarse counter gives the upper 13 bits. At most one leading
// and one trailing edge per period are recorded (the chip's double-hit
// resolution is under 10 ns).
//
// Edge mode (pair_mode=0) stores leading and trailing times as separate
// words. Pair mode stores one word per pulse: leading time plus pulse width
// (saturated at 2^10-1 bins). Words go into a 4-deep channel buffer that
// holds them until the L1 arbiter takes them; every word carries a parity
// bit that is checked on the way out and reported in the word's err bit and
// on parity_err. Up to two words can be written per clock (a short pulse in
// edge mode). A word that finds the buffer full is lost and pulses overflow.
//
// Following the document: both edges or leading time plus width, 16 fine
// bins, 4-word buffer with parity. This design's own: sampling interface,
// width field size, drop-on-full. Timing: a word is readable (out_valid)
// the cycle after the period holding its edge; out_ack pops it.
module tdc_channel
  import amt_pkg::*;
#(
  parameter int unsigned CH    = 0,
  parameter int unsigned DEPTH = CHB_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic                   pair_mode,
  input  logic [15:0]            samples,   // hit level per fine bin
  input  logic [COARSE_BITS-1:0] coarse,
  output logic                   out_valid,
  output hit_t                   out_hit,
  input  logic                   out_ack,
  output logic                   overflow,  // one-cycle pulse
  output logic                   parity_err // one-cycle pulse on a bad read
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned DW = 2 + WIDTH_BITS + TIME_BITS; // kind, width, t

  logic [DW:0]   mem [DEPTH];   // {parity, data}
  logic [PW:0]   wp, rp;
  logic          prev;
  logic          pend;          // pair mode: leading edge waiting
  logic [TIME_BITS-1:0] lead_t;

  logic [4:0]    le, te;
  logic [TIME_BITS-1:0] lt, tt;
  logic [DW-1:0] w0, w1;
  logic          v0, v1;
  logic          n_pend;
  logic [TIME_BITS-1:0] n_lead_t;

  function automatic logic [WIDTH_BITS-1:0] sat_width(input logic [TIME_BITS-1:0] a,
                                                      input logic [TIME_BITS-1:0] b);
    logic [TIME_BITS-1:0] d;
    d = b - a;
    return (d > TIME_BITS'((1 << WIDTH_BITS) - 1)) ? '1 : d[WIDTH_BITS-1:0];
  endfunction

  always_comb begin
    le = find_edge(samples, prev, 1'b1);
    te = find_edge(samples, prev, 1'b0);
    lt = {coarse, le[3:0]};
    tt = {coarse, te[3:0]};
    v0 = 1'b0; v1 = 1'b0; w0 = '0; w1 = '0;
    n_pend = pend; n_lead_t = lead_t;
    if (enable) begin
      if (!pair_mode) begin
        // edge mode: up to two words, earlier edge first
        if (le[4] && te[4]) begin
          v0 = 1'b1; v1 = 1'b1;
          if (le[3:0] < te[3:0]) begin
            w0 = {HIT_LEAD, WIDTH_BITS'(0), lt}; w1 = {HIT_TRAIL, WIDTH_BITS'(0), tt};
          end else begin
            w0 = {HIT_TRAIL, WIDTH_BITS'(0), tt}; w1 = {HIT_LEAD, WIDTH_BITS'(0), lt};
          end
        end else if (le[4]) begin
          v0 = 1'b1; w0 = {HIT_LEAD, WIDTH_BITS'(0), lt};
        end else if (te[4]) begin
          v0 = 1'b1; w0 = {HIT_TRAIL, WIDTH_BITS'(0), tt};
        end
      end else begin
        // pair mode: a trailing edge closes the pending leading edge
        if (le[4] && te[4] && le[3:0] < te[3:0]) begin
          v0 = 1'b1; w0 = {HIT_PAIR, sat_width(lt, tt), lt};
          n_pend = 1'b0;
        end else begin
          if (te[4] && pend) begin
            v0 = 1'b1; w0 = {HIT_PAIR, sat_width(lead_t, tt), lead_t};
            n_pend = 1'b0;
          end
          if (le[4]) begin
            n_pend = 1'b1; n_lead_t = lt;
          end
        end
      end
    end
  end

  // buffer write: two words per cycle at most
  logic [PW:0] used, free;
  logic [1:0]  nwr;
  logic        pop;
  assign used = wp - rp;
  assign pop  = out_ack && out_valid;
  assign free = (PW+1)'(DEPTH) - used;

  always_comb begin
    nwr = 2'd0;
    if (v0 && free >= 1) nwr = 2'd1;
    if (v0 && v1 && free >= 2) nwr = 2'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; prev <= 1'b0; pend <= 1'b0; lead_t <= '0;
      overflow <= 1'b0;
    end else begin
      prev   <= samples[15];
      pend   <= n_pend;
      lead_t <= n_lead_t;
      overflow <= (v0 && nwr == 2'd0) || (v1 && nwr != 2'd2);
      if (nwr >= 2'd1) mem[wp[PW-1:0]]          <= {^w0, w0};
      if (nwr == 2'd2) mem[PW'(wp[PW-1:0] + 1'b1)] <= {^w1, w1};
      wp <= wp + (PW+1)'(nwr);
      if (pop) rp <= rp + 1'b1;
    end
  end

  logic [DW:0] head;
  assign head      = mem[rp[PW-1:0]];
  assign out_valid = (used != 0);
  assign out_hit   = {^head, head[DW-1 -: 2], 5'(CH), head[DW-3:0]};
  assign parity_err = pop && (^head);

endmodule
