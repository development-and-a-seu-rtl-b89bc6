// amt2_top: digital core of the AMT-2 24-channel TDC for the ATLAS muon
// drift tubes.
//
// Data path: 24 tdc_channel blocks turn the 16-bin samples of their hit
// inputs into time words (13-bit coarse count from coarse_counter plus a
// 4-bit fine time, 0.78125 ns per bin) and hold them in 4-word channel
// buffers; channel_arbiter moves one word per clock into the 256-word
// l1_buffer. Triggers are tagged with the bunch id and queued in the 8-word
// trigger FIFO (trigger_interface); trigger_matcher reads each tag, picks the
// L1 hits inside the trigger's time window and writes header, data words and
// trailer into the 64-word read-out FIFO, from where they leave either as
// 32-bit parallel words or through serial_tx (DS protocol or data+clock,
// 10 to 80 Mbit/s).
//
// Control path: csr holds 15 control and 6 status registers with a stored
// total parity of the control bits; they are reached through the 12-bit
// control bus or through jtag_tap, which also reaches the BIST of the three
// buffer memories (bist_ctrl), the ASD chain (asd_ctrl) and the boundary-scan
// register over the logic pins (boundary_scan, 50 input and 64 output cells;
// EXTEST drives the output pins from it). A 64-bit JTAG DEBUG register
// captures {PLL done, serial busy, BIST busy, matcher busy, error flags 5:0,
// read-out FIFO count 7, trigger FIFO count 4, event id 12, L1 release
// pointer 9, L1 write pointer 9, coarse count 13}. pll_check_counter
// counts PLL clocks over a fixed number of reference clocks.
//
// Errors (control parity, channel buffer and L1 parity, channel buffer, L1
// and trigger FIFO overflow) are kept in sticky flags (status register 0),
// drive the error pin where enabled by control register 9, and are written
// into the data stream as an error word when control register 0 bit 8 is set.
// Control register 0 bit 9 starts the PLL check on its rising edge, bit 10
// held high clears the error flags.
//
// The ring oscillator PLL, the LVDS receivers and drivers are analog and
// not part of this RTL: clk is the 80 MHz PLL clock, clk40 the 40 MHz
// reference, and hit_samples[c] the hit input of channel c as seen by the
// 16 oscillator phases during the current clock period (bin 0 earliest).
// Status registers: SR0 error flags, SR1 L1 occupancy, SR2 {trigger FIFO
// count, read-out FIFO count}, SR3 PLL count[11:0], SR4 {PLL done, matcher
// busy, BIST busy, BIST done, BIST fail, 3'b0, PLL count[15:12]},
// SR5 {stored parity, 5'b0, ASD chain selected, ASD busy, serial busy,
// general inputs}. These maps are this design's. BIST command bits 11:8
// (JTAG BIST register) are spare and ignored.
module amt2_top
  import amt_pkg::*;
#(
  parameter int unsigned PLL_GATE = 4096
) (
  input  logic                clk,
  input  logic                clk40,
  input  logic                rst_n,
  input  logic [15:0]         hit_samples [NUM_CH],
  input  logic                trigger,
  input  logic                bcr,
  input  logic                ecr,
  // read-out
  output logic                sdata,
  output logic                sstrobe,
  output logic [RO_WIDTH-1:0] par_data,
  output logic                par_valid,
  input  logic                par_ready,
  output logic                error_out,
  // control bus
  input  logic                bus_we,
  input  logic [4:0]          bus_addr,
  input  logic [REG_BITS-1:0] bus_wdata,
  output logic [REG_BITS-1:0] bus_rdata,
  // JTAG
  input  logic                tck,
  input  logic                tms,
  input  logic                tdi,
  input  logic                trst_n,
  output logic                tdo,
  // ASD control lines
  output logic                asd_clk,
  output logic                asd_out,
  input  logic                asd_in,
  output logic                asd_load,
  output logic                asd_rst,
  // general purpose I/O
  output logic [11:0]         gpo,
  input  logic [2:0]          gpi
);
  localparam int unsigned L1AW = $clog2(L1_DEPTH);
  localparam int unsigned ROAW = $clog2(RO_DEPTH);
  localparam int unsigned TGAW = $clog2(TRG_DEPTH);

  // ---------------- registers
  logic [REG_BITS-1:0] cr [NUM_CR];
  logic [REG_BITS-1:0] sr_in [NUM_SR];
  logic [REG_BITS-1:0] sr [NUM_SR];
  logic [NUM_CR*REG_BITS-1:0] cr_flat, jtag_cr_data;
  logic [NUM_SR*REG_BITS-1:0] sr_flat;
  logic jtag_cr_load, csr_parity_err;
  logic [REG_BITS-1:0] bus_rdata_c;
  logic [11:0] gpo_c;

  logic pair_mode, match_en, ser_en, ds_mode, par_mode, asd_reset, errpkt_en;
  logic [1:0] ser_speed;
  logic [NUM_CH-1:0] ch_en;
  assign pair_mode = cr[CR_MODE][0];
  assign match_en  = cr[CR_MODE][1];
  assign ser_en    = cr[CR_MODE][2];
  assign ds_mode   = cr[CR_MODE][3];
  assign ser_speed = cr[CR_MODE][5:4];
  assign par_mode  = cr[CR_MODE][6];
  assign asd_reset = cr[CR_MODE][7];
  assign errpkt_en = cr[CR_MODE][8];
  assign ch_en     = {cr[CR_CHEN_HI], cr[CR_CHEN_LO]};

  csr u_csr (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata(bus_rdata_c),
    .jtag_load(jtag_cr_load), .jtag_data(jtag_cr_data), .cr_flat, .cr,
    .sr_in, .sr, .parity_err(csr_parity_err), .gpo(gpo_c), .gpi
  );

  // ---------------- time base
  logic [COARSE_BITS-1:0] coarse;
  coarse_counter u_coarse (
    .clk, .rst_n, .bcr, .offset({cr[CR_COARSE_OFS], 1'b0}), .coarse
  );

  // ---------------- BIST wiring
  logic        bist_en_l1, bist_en_trg, bist_en_ro, bist_mem_en, bist_we;
  logic [7:0]  bist_addr, bist_last;
  logic [35:0] bist_wdata, bist_rdata, bist_mask, bist_sig;
  logic [35:0] l1_bist_rdata;
  logic [BC_BITS-1:0]  trg_bist_rdata;
  logic [RO_WIDTH-1:0] ro_bist_rdata;
  logic        bist_busy, bist_done, bist_fail, bist_paused;
  logic [2:0]  bist_elem, bist_stop;
  logic [1:0]  bist_sel;
  logic        bist_pattern, bist_start, bist_resume;
  logic        bist_cmd_valid;
  logic [11:0] bist_cmd, bist_status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bist_sel <= '0; bist_pattern <= 1'b0; bist_stop <= 3'd7;
      bist_start <= 1'b0; bist_resume <= 1'b0;
    end else begin
      bist_start  <= 1'b0;
      bist_resume <= 1'b0;
      if (bist_cmd_valid) begin
        bist_start  <= bist_cmd[0] && !bist_busy;
        bist_resume <= bist_cmd[1];
        bist_stop   <= bist_cmd[7:5];
        if (!bist_busy) begin
          bist_pattern <= bist_cmd[2];
          bist_sel     <= bist_cmd[4:3];
        end
      end
    end
  end

  always_comb begin
    case (bist_sel)
      2'd1:    begin bist_last = 8'(TRG_DEPTH - 1); bist_mask = 36'((64'd1 << BC_BITS) - 1);
                     bist_rdata = 36'(trg_bist_rdata); end
      2'd2:    begin bist_last = 8'(RO_DEPTH - 1);  bist_mask = 36'((64'd1 << RO_WIDTH) - 1);
                     bist_rdata = 36'(ro_bist_rdata); end
      default: begin bist_last = 8'(L1_DEPTH - 1);  bist_mask = '1;
                     bist_rdata = l1_bist_rdata; end
    endcase
  end
  assign bist_en_l1  = bist_mem_en && (bist_sel == 2'd0 || bist_sel == 2'd3);
  assign bist_en_trg = bist_mem_en && (bist_sel == 2'd1);
  assign bist_en_ro  = bist_mem_en && (bist_sel == 2'd2);
  assign bist_status = {bist_elem, bist_paused, bist_fail, bist_done, bist_busy,
                        bist_sel, 3'b000};

  bist_ctrl #(.W(36), .AW(8)) u_bist (
    .clk, .rst_n, .start(bist_start), .resume(bist_resume),
    .pattern(bist_pattern), .stop_elem(bist_stop), .last_addr(bist_last),
    .data_mask(bist_mask), .mem_en(bist_mem_en), .mem_we(bist_we),
    .mem_addr(bist_addr), .mem_wdata(bist_wdata), .mem_rdata(bist_rdata),
    .busy(bist_busy), .done(bist_done), .fail(bist_fail), .paused(bist_paused),
    .elem(bist_elem), .signature(bist_sig)
  );

  // ---------------- channels
  logic [NUM_CH-1:0] ch_valid, ch_ack, ch_ovf, ch_perr;
  hit_t              ch_hit [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    tdc_channel #(.CH(c)) u_ch (
      .clk, .rst_n, .enable(ch_en[c]), .pair_mode,
      .samples(hit_samples[c]), .coarse,
      .out_valid(ch_valid[c]), .out_hit(ch_hit[c]), .out_ack(ch_ack[c]),
      .overflow(ch_ovf[c]), .parity_err(ch_perr[c])
    );
  end

  logic l1_wr;
  hit_t l1_wr_hit;
  channel_arbiter u_arb (
    .clk, .rst_n, .ch_valid, .ch_hit, .ch_ack, .l1_wr, .l1_hit(l1_wr_hit)
  );

  // ---------------- L1 buffer
  logic [L1AW:0]   l1_wp, l1_base;
  logic [L1AW-1:0] l1_rd_addr;
  hit_t            l1_rd_hit;
  logic            l1_rd_perr, l1_ovf, l1_perr;

  l1_buffer u_l1 (
    .clk, .rst_n, .wr(l1_wr), .wr_hit(l1_wr_hit), .wp(l1_wp), .base(l1_base),
    .overflow(l1_ovf), .rd_addr(l1_rd_addr), .rd_hit(l1_rd_hit),
    .rd_parity_err(l1_rd_perr),
    .bist_en(bist_en_l1), .bist_we(bist_we), .bist_addr(bist_addr[L1AW-1:0]),
    .bist_wdata(bist_wdata), .bist_rdata(l1_bist_rdata)
  );

  // ---------------- triggers
  logic               trg_valid, trg_pop, trg_ovf;
  logic [BC_BITS-1:0] trg_bc, trg_evid;
  logic [TGAW:0]      trg_count;

  trigger_interface u_trg (
    .clk, .rst_n, .trigger, .ecr, .coarse, .trg_valid, .trg_bc, .trg_evid,
    .trg_pop, .overflow(trg_ovf), .count(trg_count),
    .bist_en(bist_en_trg), .bist_we(bist_we), .bist_addr(bist_addr[TGAW-1:0]),
    .bist_wdata(bist_wdata[BC_BITS-1:0]), .bist_rdata(trg_bist_rdata)
  );

  // ---------------- errors
  logic [11:0] err_flags, err_en;
  logic        error_c;
  assign err_en = cr[CR_ERR_EN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_flags <= '0;
    else if (cr[CR_MODE][10]) err_flags <= '0;
    else begin
      err_flags[ERR_CSR_PARITY] <= err_flags[ERR_CSR_PARITY] | csr_parity_err;
      err_flags[ERR_CHB_PARITY] <= err_flags[ERR_CHB_PARITY] | (|ch_perr);
      err_flags[ERR_L1_PARITY]  <= err_flags[ERR_L1_PARITY]  | l1_perr;
      err_flags[ERR_CHB_OVF]    <= err_flags[ERR_CHB_OVF]    | (|ch_ovf);
      err_flags[ERR_L1_OVF]     <= err_flags[ERR_L1_OVF]     | l1_ovf;
      err_flags[ERR_TRG_OVF]    <= err_flags[ERR_TRG_OVF]    | trg_ovf;
    end
  end
  assign error_c = |(err_flags & err_en);

  // ---------------- trigger matching and read-out FIFO
  logic                ro_push, ro_pop, ro_empty, ro_full, matcher_busy;
  logic [RO_WIDTH-1:0] ro_din, ro_dout;
  logic [ROAW:0]       ro_count;

  trigger_matcher u_match (
    .clk, .rst_n, .enable(match_en && !bist_busy), .cur_bc(coarse[COARSE_BITS-1:1]),
    .cfg_window(cr[CR_WINDOW]), .cfg_latency(cr[CR_LATENCY]),
    .cfg_search(cr[CR_SEARCH]), .cfg_reject(cr[CR_REJECT]),
    .trg_valid, .trg_bc, .trg_evid, .trg_pop,
    .l1_wp, .l1_base, .l1_rd_addr, .l1_rd_hit, .l1_rd_parity_err(l1_rd_perr),
    .err_flags(errpkt_en ? (err_flags & err_en) : 12'h000),
    .ro_push, .ro_data(ro_din), .ro_full,
    .busy(matcher_busy), .l1_parity_err(l1_perr)
  );

  sync_fifo #(.WIDTH(RO_WIDTH), .DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst_n, .push(ro_push), .din(ro_din), .pop(ro_pop), .dout(ro_dout),
    .empty(ro_empty), .full(ro_full), .count(ro_count),
    .bist_en(bist_en_ro), .bist_we(bist_we), .bist_addr(bist_addr[ROAW-1:0]),
    .bist_wdata(bist_wdata[RO_WIDTH-1:0]), .bist_rdata(ro_bist_rdata)
  );

  // ---------------- data output: parallel or serial
  logic ser_pop, ser_busy;
  logic sdata_c, sstrobe_c, par_valid_c;
  logic [RO_WIDTH-1:0] par_data_c;
  assign par_valid_c = par_mode && !ro_empty && !bist_en_ro;
  assign par_data_c  = ro_dout;

  serial_tx #(.W(RO_WIDTH)) u_ser (
    .clk, .rst_n, .enable(ser_en && !par_mode && !bist_en_ro), .ds_mode,
    .speed(ser_speed), .word_valid(!ro_empty), .word(ro_dout),
    .word_pop(ser_pop), .sdata(sdata_c), .sstrobe(sstrobe_c), .busy(ser_busy)
  );
  assign ro_pop = par_mode ? (par_valid_c && par_ready) : ser_pop;

  // ---------------- PLL check
  logic        pll_start, pll_done, cr0_b9_d;
  logic [15:0] pll_count;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cr0_b9_d <= 1'b0;
    else        cr0_b9_d <= cr[CR_MODE][9];
  end
  assign pll_start = cr[CR_MODE][9] && !cr0_b9_d;

  pll_check_counter #(.GATE(PLL_GATE), .CW(16)) u_pll_chk (
    .clk, .clk40, .rst_n, .start(pll_start), .count(pll_count), .done(pll_done)
  );

  // ---------------- JTAG and ASD
  logic asd_sel, asd_shift, asd_bit, asd_update, asd_busy;
  logic bs_extest, bs_capture, bs_shift, bs_bit, bs_update, bs_tdo;

  // internal registers for the JTAG DEBUG register (bit 63 first listed)
  logic [63:0] debug_flat;
  assign debug_flat = {pll_done, ser_busy, bist_busy, matcher_busy, err_flags[5:0],
                       7'(ro_count), 4'(trg_count), trg_evid, l1_base, l1_wp, coarse};
  logic asd_clk_c, asd_out_c, asd_load_c, asd_rst_c;

  always_comb begin
    for (int i = 0; i < NUM_SR; i++) sr_flat[i*REG_BITS +: REG_BITS] = sr[i];
  end

  jtag_tap u_jtag (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo,
    .cr_flat, .cr_load(jtag_cr_load), .cr_data(jtag_cr_data), .sr_flat,
    .asd_sel, .asd_shift, .asd_bit, .asd_update, .asd_in,
    .bist_signature(bist_sig), .bist_status, .bist_cmd_valid, .bist_cmd,
    .bs_extest, .bs_capture, .bs_shift, .bs_bit, .bs_update, .bs_tdo,
    .debug_flat
  );

  // ---------------- boundary scan of the logic pins
  // cells from tdo: input pins (trigger, bcr, ecr, par_ready, bus_we,
  // bus_addr, bus_wdata, asd_in, gpi, then the 24 hit inputs as seen at the
  // end of the period), then output pins (sdata, sstrobe, par_data,
  // par_valid, error_out, bus_rdata, asd_clk, asd_out, asd_load, asd_rst, gpo)
  logic [NUM_CH-1:0] hit_level;
  always_comb for (int c = 0; c < NUM_CH; c++) hit_level[c] = hit_samples[c][15];

  localparam int unsigned BS_NI = 26 + NUM_CH;
  localparam int unsigned BS_NO = 64;
  logic [BS_NI-1:0] bs_pin_in;
  logic [BS_NO-1:0] bs_core_out, bs_pin_out;
  assign bs_pin_in   = {hit_level, gpi, asd_in, bus_wdata, bus_addr, bus_we, par_ready,
                        ecr, bcr, trigger};
  assign bs_core_out = {gpo_c, asd_rst_c, asd_load_c, asd_out_c, asd_clk_c, bus_rdata_c,
                        error_c, par_valid_c, par_data_c, sstrobe_c, sdata_c};
  assign {gpo, asd_rst, asd_load, asd_out, asd_clk, bus_rdata,
          error_out, par_valid, par_data, sstrobe, sdata} = bs_pin_out;

  boundary_scan #(.NI(BS_NI), .NO(BS_NO)) u_bsr (
    .clk, .rst_n, .pin_in(bs_pin_in), .core_out(bs_core_out), .pin_out(bs_pin_out),
    .extest(bs_extest), .capture(bs_capture), .shift(bs_shift), .update(bs_update),
    .tdi(bs_bit), .tdo(bs_tdo)
  );

  asd_ctrl u_asd (
    .clk, .rst_n, .shift(asd_shift), .shift_bit(asd_bit), .update(asd_update),
    .reset_req(asd_reset), .asd_clk(asd_clk_c), .asd_out(asd_out_c), .asd_load(asd_load_c),
    .asd_rst(asd_rst_c),
    .busy(asd_busy)
  );

  // ---------------- status registers
  always_comb begin
    sr_in[0] = err_flags;
    sr_in[1] = 12'(l1_wp - l1_base);
    sr_in[2] = {4'(trg_count), 1'b0, 7'(ro_count)};
    sr_in[3] = pll_count[11:0];
    sr_in[4] = {pll_done, matcher_busy, bist_busy, bist_done, bist_fail, 3'b000,
                pll_count[15:12]};
    sr_in[5] = {6'b0, asd_sel, asd_busy, ser_busy, 3'b000};
  end
endmodule
