// amt_pkg: types and constants shared by the AMT-2 TDC core.
//
// Time is kept in units of 0.78125 ns: a 13-bit coarse count of 12.5 ns
// periods (the 80 MHz PLL clock) and a 4-bit fine part that splits each
// period into 16 bins, 17 bits in all, as in the chip's specification.
// The trigger time tag ("bunch id") is 12 bits in 25 ns units, i.e. the
// upper 12 bits of a hit time. Word layouts below are this design's own:
// the chip's data formats are not given beyond the buffer sizes. They were
// chosen so that L1 buffer (256 x 36), trigger FIFO (8 x 12) and read-out
// FIFO (64 x 32) hold 11,360 bits together, the total quoted for the chip.
package amt_pkg;

  localparam int unsigned NUM_CH      = 24;   // input channels
  localparam int unsigned FINE_BITS   = 4;    // 16 bins per 12.5 ns
  localparam int unsigned COARSE_BITS = 13;
  localparam int unsigned TIME_BITS   = COARSE_BITS + FINE_BITS; // 17
  localparam int unsigned BC_BITS     = 12;   // bunch id, 25 ns units
  localparam int unsigned WIDTH_BITS  = 10;   // pulse width in 0.78125 ns
  localparam int unsigned CHB_DEPTH   = 4;    // channel buffer words
  localparam int unsigned L1_DEPTH    = 256;
  localparam int unsigned TRG_DEPTH   = 8;
  localparam int unsigned RO_DEPTH    = 64;
  localparam int unsigned L1_WIDTH    = 36;   // 35 data bits + parity
  localparam int unsigned RO_WIDTH    = 32;
  localparam int unsigned NUM_CR      = 15;   // control registers
  localparam int unsigned NUM_SR      = 6;    // status registers
  localparam int unsigned REG_BITS    = 12;

  // Kind of a time measurement.
  typedef enum logic [1:0] {
    HIT_LEAD  = 2'd0,   // leading edge time
    HIT_TRAIL = 2'd1,   // trailing edge time
    HIT_PAIR  = 2'd2,   // leading edge time plus pulse width
    HIT_NONE  = 2'd3
  } hit_kind_e;

  // One measurement as stored in a channel buffer and in the L1 buffer.
  typedef struct packed {
    logic                  err;    // parity error seen in the channel buffer
    hit_kind_e             kind;
    logic [4:0]            chan;
    logic [WIDTH_BITS-1:0] width;
    logic [TIME_BITS-1:0]  t;
  } hit_t;                         // 35 bits

  // Read-out word type codes (upper 4 bits of a 32-bit word).
  typedef enum logic [3:0] {
    RO_HEADER  = 4'hA,  // {type, event id[11:0], bunch id[11:0], 4'h0}
    RO_TRAILER = 4'hC,  // {type, event id[11:0], 8'h0, word count[7:0]}
    RO_LEAD    = 4'h3,  // {type, chan[4:0], err, 5'h0, time[16:0]}
    RO_TRAIL   = 4'h4,  // same as RO_LEAD
    RO_PAIR    = 4'h5,  // {type, chan[4:0], width[7:0], time[14:0]}
    RO_ERROR   = 4'h6   // {type, 16'h0, error flags[11:0]}
  } ro_type_e;

  // Control register indices (12 bits each).
  localparam int unsigned CR_MODE      = 0;  // see csr.sv for bit map
  localparam int unsigned CR_WINDOW    = 1;  // match window, bunch units
  localparam int unsigned CR_LATENCY   = 2;  // trigger latency, bunch units
  localparam int unsigned CR_SEARCH    = 3;  // search margin, bunch units
  localparam int unsigned CR_REJECT    = 4;  // reject margin, bunch units
  localparam int unsigned CR_CHEN_LO   = 5;  // channel enable 11:0
  localparam int unsigned CR_CHEN_HI   = 6;  // channel enable 23:12
  localparam int unsigned CR_COARSE_OFS= 7;  // coarse counter offset (x2)
  localparam int unsigned CR_GPO       = 8;  // general purpose outputs
  localparam int unsigned CR_ERR_EN    = 9;  // error enables

  // Error flag bits (status register 0 and error word).
  localparam int unsigned ERR_CSR_PARITY = 0;
  localparam int unsigned ERR_CHB_PARITY = 1;
  localparam int unsigned ERR_L1_PARITY  = 2;
  localparam int unsigned ERR_CHB_OVF    = 3;
  localparam int unsigned ERR_L1_OVF     = 4;
  localparam int unsigned ERR_TRG_OVF    = 5;

  // Position of a 0->1 (rise=1) or 1->0 (rise=0) step in a 16-bin sample
  // vector, bin 0 being earliest; prev is the last bin of the previous
  // period. Returns {found, bin}; found is 0 if there is no such step.
  function automatic logic [4:0] find_edge(input logic [15:0] s,
                                           input logic prev,
                                           input logic rise);
    logic [16:0] v;
    logic [4:0] r;
    v = {s, prev};
    r = 5'd0;
    for (int i = 15; i >= 0; i--) begin
      if (rise ? (v[i+1] & ~v[i]) : (~v[i+1] & v[i])) r = {1'b1, 4'(i)};
    end
    return r;
  endfunction

endpackage
