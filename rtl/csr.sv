// csr: the 15 control and 6 status registers, 12 bits each.
//
// Control registers are written either one at a time through the 12-bit
// parallel control bus (bus_we, bus_addr 0..14) or all 180 bits at once from
// the JTAG control data register (jtag_load). On every write the total
// parity of all control bits is stored; the parity of the present contents
// is compared with it all the time, so a single event upset in any control
// flip-flop raises parity_err until the registers are written again.
// Status registers 0..5 are read on the bus at addresses 16..21; register
// 5 bit 11 holds the stored control parity, the other status bits come from
// the core (sr_in). The general purpose outputs are control register 8 and
// the 3 general purpose inputs are returned in status register 5 bits 2:0
// (sampled through two flip-flops).
//
// Control bit map (this design's own; the document gives only the counts):
//   CR0  [0] pair mode  [1] matching enable [2] serial enable [3] DS mode
//        [5:4] serial speed [6] parallel output [7] ASD reset [8] error packet
//        enable [9] PLL check start (rising edge) [10] clear error flags
//   CR1 match window  CR2 trigger latency  CR3 search margin  CR4 reject
//   margin (bunch units)  CR5/CR6 channel enable 11:0 / 23:12
//   CR7 coarse counter offset (bunch units)  CR8 general outputs
//   CR9 error enables (error pin and error word)  CR10..14 spare, stored and
//   covered by parity.
// Timing: writes take effect on the next clock edge; bus_rdata is
// combinational from bus_addr.
module csr
  import amt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bus_we,
  input  logic [4:0]          bus_addr,
  input  logic [REG_BITS-1:0] bus_wdata,
  output logic [REG_BITS-1:0] bus_rdata,
  input  logic                jtag_load,
  input  logic [NUM_CR*REG_BITS-1:0] jtag_data,
  output logic [NUM_CR*REG_BITS-1:0] cr_flat,
  output logic [REG_BITS-1:0] cr [NUM_CR],
  input  logic [REG_BITS-1:0] sr_in [NUM_SR],
  output logic [REG_BITS-1:0] sr [NUM_SR],
  output logic                parity_err,
  output logic [11:0]         gpo,
  input  logic [2:0]          gpi
);
  localparam logic [REG_BITS-1:0] CR_RESET [NUM_CR] = '{
    12'h106, 12'd20, 12'd100, 12'd8, 12'd4, 12'hFFF, 12'hFFF,
    12'd0, 12'd0, 12'hFFF, 12'd0, 12'd0, 12'd0, 12'd0, 12'd0};

  logic stored_par;
  logic [2:0] gpi_s1, gpi_s2;

  function automatic logic par_of(input logic [REG_BITS-1:0] r [NUM_CR]);
    logic p;
    p = 1'b0;
    for (int i = 0; i < NUM_CR; i++) p ^= ^r[i];
    return p;
  endfunction

  // register contents after a JTAG load or a bus write
  logic [REG_BITS-1:0] cr_next [NUM_CR];
  logic                cr_wr;
  always_comb begin
    cr_next = cr;
    cr_wr   = 1'b0;
    if (jtag_load) begin
      for (int i = 0; i < NUM_CR; i++) cr_next[i] = jtag_data[i*REG_BITS +: REG_BITS];
      cr_wr = 1'b1;
    end else if (bus_we && bus_addr < 5'(NUM_CR)) begin
      cr_next[bus_addr[3:0]] = bus_wdata;
      cr_wr = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CR; i++) cr[i] <= CR_RESET[i];
      stored_par <= par_of(CR_RESET);
      gpi_s1 <= '0; gpi_s2 <= '0;
    end else begin
      gpi_s1 <= gpi; gpi_s2 <= gpi_s1;
      if (cr_wr) begin
        cr <= cr_next;
        stored_par <= par_of(cr_next);
      end
    end
  end

  assign parity_err = (par_of(cr) != stored_par);
  assign gpo        = cr[CR_GPO];

  always_comb begin
    for (int i = 0; i < NUM_CR; i++) cr_flat[i*REG_BITS +: REG_BITS] = cr[i];
    for (int i = 0; i < NUM_SR; i++) sr[i] = sr_in[i];
    sr[5][11]  = stored_par;
    sr[5][2:0] = gpi_s2;
    bus_rdata  = '0;
    if (bus_addr < 5'(NUM_CR))                          bus_rdata = cr[bus_addr[3:0]];
    else if (bus_addr >= 5'd16 && bus_addr < 5'(16 + NUM_SR)) bus_rdata = sr[3'(bus_addr - 5'd16)];
  end
endmodule
