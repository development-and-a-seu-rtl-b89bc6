// tb_amt2_rates: the hit and trigger rates the TDC is specified for, run
// through the whole core at its default sizes.
//
// All 24 channels get random pulses (gaps uniform over 20..20+gap_max bins,
// widths 3..303 bins), random triggers arrive with a mean spacing of 800
// clocks (100 kHz), and every event is compared with the hits a reference
// picks for the trigger's window (20 bunches, latency 100 bunches: the
// control register defaults). Runs:
//   1 400 kHz per channel, leading and trailing edges, parallel read-out
//   2 400 kHz per channel, edges, DS serial at 80 Mbit/s
//   3 100 kHz per channel, edges, data+clock serial at 40 Mbit/s
//   4 400 kHz per channel, pair words, data+clock serial at 40 Mbit/s
// Each run checks that no event was lost or changed, that no overflow flag
// was set (100 % efficiency at that rate), that the measured hit and trigger
// rates are within 10 % (hits) and 15 % (triggers, about 500 per run) of the intended ones, and, for the serial runs, the
// frame spacing of the line rate.
module tb_amt2_rates;
  import amt_pkg::*;
  localparam int WIN = 20, LAT = 100;   // control register defaults

  logic clk = 0, clk40 = 0, rst_n = 0;
  logic [15:0] hit_samples [NUM_CH];
  logic trigger = 0, bcr = 0, ecr = 0;
  logic sdata, sstrobe, par_valid, par_ready = 1, error_out;
  logic [31:0] par_data;
  logic bus_we = 0;
  logic [4:0] bus_addr = '0;
  logic [11:0] bus_wdata = '0, bus_rdata;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo;
  logic asd_clk, asd_out, asd_in, asd_load, asd_rst;
  logic [11:0] gpo;
  logic [2:0] gpi = 3'b110;

  amt2_top dut (.clk, .clk40, .rst_n, .hit_samples, .trigger, .bcr, .ecr, .sdata, .sstrobe,
    .par_data, .par_valid, .par_ready, .error_out, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .tck, .tms, .tdi, .trst_n, .tdo, .asd_clk, .asd_out, .asd_in, .asd_load, .asd_rst, .gpo, .gpi);

  assign asd_in = asd_out;

  always #5 clk = ~clk;
  always @(posedge clk) clk40 <= ~clk40;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- stimulus
  int unsigned tnow = 0;          // coarse count the next edge will see
  int unsigned cyc = 0;
  bit gen_on = 0, trig_on = 0, check_on = 0, pair_mode = 0;
  int trig_per_100k = 125;        // 100 kHz: one trigger per 800 clocks
  int unsigned gap_max = 6060;    // pulse gap 20..20+gap_max bins
  int unsigned n_pulses = 0, n_trig = 0, gen_cycles = 0;
  int unsigned lead [NUM_CH], trail [NUM_CH];
  typedef struct { logic [31:0] word; logic [11:0] bc; int unsigned c; } ref_t;
  ref_t hits [$];
  logic [11:0] tags [$];
  int unsigned tag_cyc [$];

  function automatic logic [31:0] word_of(hit_kind_e k, int ch, int unsigned t, int unsigned w);
    logic [16:0] t17;
    t17 = 17'(t);
    case (k)
      HIT_PAIR:  return {4'h5, 5'(ch), (w > 255) ? 8'hFF : 8'(w), t17[14:0]};
      HIT_TRAIL: return {4'h4, 5'(ch), 1'b0, 5'h0, t17};
      default:   return {4'h3, 5'(ch), 1'b0, 5'h0, t17};
    endcase
  endfunction

  task automatic new_pulse(int ch, int unsigned from);
    int unsigned gap, w;
    gap = 20 + $urandom_range(0, gap_max);
    w   = 3 + $urandom_range(0, 300);
    lead[ch]  = from + gap;
    trail[ch] = lead[ch] + w;
  endtask

  always @(posedge clk) begin
    cyc++;
    // the trigger FIFO takes coarse[12:1] at the edge that sees trigger
    if (trigger && check_on) begin tags.push_back(12'(tnow >> 1)); tag_cyc.push_back(cyc); end
    tnow = bcr ? 0 : tnow + 1;
    #1;
    trigger = trig_on && ($urandom_range(0, 99999) < trig_per_100k);
    if (trigger) n_trig++;
    if (gen_on) gen_cycles++;
    // samples for the period the next edge sees (coarse = tnow)
    for (int ch = 0; ch < NUM_CH; ch++) begin
      int unsigned t0;
      t0 = tnow * 16;
      for (int k = 0; k < 16; k++)
        hit_samples[ch][k] = gen_on && (t0 + k >= lead[ch]) && (t0 + k < trail[ch]);
      if (gen_on && trail[ch] < t0 + 16) begin
        ref_t r;
        r.c = cyc;
        if (pair_mode) begin
          r.word = word_of(HIT_PAIR, ch, lead[ch], trail[ch] - lead[ch]);
          r.bc = 12'(lead[ch] >> 5); hits.push_back(r);
        end else begin
          r.word = word_of(HIT_LEAD, ch, lead[ch], 0); r.bc = 12'(lead[ch] >> 5); hits.push_back(r);
          r.word = word_of(HIT_TRAIL, ch, trail[ch], 0); r.bc = 12'(trail[ch] >> 5); hits.push_back(r);
        end
        n_pulses++;
        new_pulse(ch, trail[ch]);
      end
      if (!gen_on) new_pulse(ch, t0 + 16);
    end
  end

  // ---------------------------------------------------------------- read-out
  int n_events = 0, n_data = 0, n_err_words = 0, n_lead = 0, n_trail = 0, n_pair = 0;
  int n_par_words = 0, n_ds_words = 0, n_dc_words = 0;
  int ev_state = 0, ev_words = 0, exp_evid = 0;
  logic [31:0] got [$], expw [$];
  int rx_mode = 0;   // 0 parallel, 1 DS, 2 data+clock

  // serial line rate: a 34-bit frame takes 34 clocks at 80 Mbit/s (DS) and
  // 68 at 40 Mbit/s (data+clock); back-to-back frames must show exactly that
  int unsigned last_end = 0; int n_b2b = 0;
  task automatic frame_time();
    int unsigned per;
    per = (rx_mode == 1) ? 34 : 68;
    if (last_end != 0) begin
      check(cyc - last_end >= per, $sformatf("frames %0d clocks apart", cyc - last_end));
      if (cyc - last_end == per) n_b2b++;
    end
    last_end = cyc;
  endtask

  task automatic take_word(logic [31:0] w);
    case (rx_mode) 0: n_par_words++; 1: n_ds_words++; default: n_dc_words++; endcase
    case (w[31:28])
      4'h6: n_err_words++;
      4'hA: begin
        if (check_on) begin
          logic [11:0] tag; int unsigned tc;
          check(ev_state == 0, "header inside an event");
          if (tags.size() == 0) check(0, "header without trigger");
          else begin
            tag = tags.pop_front(); tc = tag_cyc.pop_front();
            check(w[27:16] == 12'(exp_evid) && w[15:4] == tag,
                  $sformatf("header %h, expected event %0d tag %0d", w, exp_evid, tag));
            while (hits.size() > 0 && hits[0].c + 6000 < tc) void'(hits.pop_front());
            expw.delete();
            foreach (hits[i])
              if (12'(hits[i].bc - (tag - 12'(LAT))) < 12'(WIN) && hits[i].c + 4000 > tc)
                expw.push_back(hits[i].word);
          end
        end
        got.delete(); ev_state = 1; ev_words = 1;
      end
      4'hC: begin
        ev_words++;
        if (check_on) begin
          got.sort(); expw.sort();
          check(got == expw, $sformatf("event %0d: %0d words, expected %0d", exp_evid, got.size(), expw.size()));
          check(w == {4'hC, 12'(exp_evid), 8'h0, 8'(ev_words)}, $sformatf("trailer %h", w));
        end
        exp_evid++; n_events++; ev_state = 0;
      end
      default: begin
        ev_words++; n_data++; got.push_back(w);
        if (w[31:28] == 4'h3) n_lead++;
        if (w[31:28] == 4'h4) n_trail++;
        if (w[31:28] == 4'h5) n_pair++;
      end
    endcase
  endtask

  // parallel port
  int ready_pct = 100;
  always @(negedge clk) if (rst_n) begin
    if (rx_mode == 0 && par_valid && par_ready) take_word(par_data);
    par_ready = ($urandom_range(0, 99) < ready_pct);
  end

  // serial receiver
  logic pd = 0, ps = 0; bit inword = 0; int nb = 0; logic [31:0] rsh;
  task automatic rx_bit(logic b);
    if (!inword) begin if (b) begin inword = 1; nb = 0; end end
    else if (nb < 32) begin
      rsh = {rsh[30:0], b}; nb++;
      if (nb == 32) begin frame_time(); take_word(rsh); end
    end else begin
      check(!b, "stop bit"); inword = 0;
    end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (rx_mode == 1 && ((sdata ^ sstrobe) != (pd ^ ps))) rx_bit(sdata);
    if (rx_mode == 2 && sstrobe && !ps) rx_bit(sdata);
    pd <= sdata; ps <= sstrobe;
  end

  // ---------------------------------------------------------------- helpers
  task automatic bus_write(int a, logic [11:0] d);
    @(negedge clk); bus_addr = 5'(a); bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic bus_read(int a, output logic [11:0] d);
    @(negedge clk); bus_addr = 5'(a); #1 d = bus_rdata;
  endtask
  task automatic drain();
    logic [11:0] s2, s4, s5;
    int guard = 0;
    do begin
      repeat (50) @(posedge clk);
      bus_read(18, s2); bus_read(20, s4); bus_read(21, s5);
      guard++;
    end while ((s2 != 0 || s4[10] || s5[3] || inword) && guard < 2000);
    repeat (400) @(posedge clk);
  endtask
  task automatic run_phase(int cycles);
    gen_on = 1; trig_on = 1;
    repeat (cycles) @(posedge clk);
    trig_on = 0;
    repeat (400) @(posedge clk);
    gen_on = 0;
    drain();
  endtask

  initial begin
    #900000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one run: rate in kHz per channel, a mode word for control register 0
  task automatic rate_run(string name, int khz, logic [11:0] mode, int rx, bit pairs, int cycles);
    logic [11:0] r;
    int unsigned p0, t0, e0;
    real hz, thz;
    // mean pulse period = 20 + gap_max/2 + 153 bins = 1 280 000 / khz bins
    gap_max = 2 * (1_280_000 / khz - 173);
    rx_mode = rx; pair_mode = pairs; last_end = 0;
    bus_write(CR_MODE, mode);
    p0 = n_pulses; t0 = n_trig; e0 = n_events; gen_cycles = 0;
    run_phase(cycles);
    hz  = real'(n_pulses - p0) / (real'(gen_cycles) * 12.5e-9 * NUM_CH);
    thz = real'(n_trig - t0) / (real'(cycles) * 12.5e-9);
    $display("%s: %0.0f kHz per channel, %0.1f kHz triggers, %0d events",
             name, hz / 1e3, thz / 1e3, n_events - e0);
    check(hz > 0.9e3 * khz && hz < 1.1e3 * khz, {name, ": hit rate"});
    check(thz > 85e3 && thz < 115e3, {name, ": trigger rate"});
    check(n_events - e0 == n_trig - t0, {name, ": every trigger read out"});
    check(tags.size() == 0, {name, ": no trigger left over"});
    bus_read(16, r);
    check(r == 0 && !error_out, $sformatf("%s: no overflow, flags %h", name, r));
  endtask

  initial begin
    for (int ch = 0; ch < NUM_CH; ch++) begin hit_samples[ch] = '0; lead[ch] = 0; trail[ch] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) bcr = 1;
    @(negedge clk) bcr = 0;
    check_on = 1;
    rate_run("400 kHz edges, parallel",      400, 12'h146, 0, 0, 400000);
    rate_run("400 kHz edges, DS 80 Mbit/s",  400, 12'h10E, 1, 0, 400000);
    rate_run("100 kHz edges, 40 Mbit/s",     100, 12'h116, 2, 0, 400000);
    rate_run("400 kHz pairs, 40 Mbit/s",     400, 12'h117, 2, 1, 400000);
    check(n_b2b > 0, "back-to-back serial frames");
    $display("events %0d, data words %0d", n_events, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
