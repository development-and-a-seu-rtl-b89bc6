// tb_amt2_top: end-to-end test of the TDC core at its default sizes.
//
// Random pulses on all 24 channels are fed in as 16-bin samples; random
// triggers are applied; every event read out (parallel port, DS serial line
// or data+clock serial line, decoded here) is compared with the hits a
// reference picks from the pulse list: those whose bunch id lies in the
// trigger's window. Data words are compared as a set, since the arbiter
// interleaves channels. Phases:
//   1 edge mode, parallel read-out
//   2 pair mode (set over the control bus), DS serial at 80 Mbit/s
//   3 edge mode set over JTAG, data+clock serial at 40 Mbit/s
//   4 stress, not compared: dense bursts (channel buffer overflow), matching
//     off (L1 buffer and trigger FIFO overflow), slow parallel read-out
//     (read-out FIFO full, matcher stalls), then error words in the stream
//   5 control: IDCODE, general outputs and inputs, status and internal
//     registers over JTAG,
//     boundary scan (SAMPLE of the pins, EXTEST driving the outputs), ASD
//     chain load through three ASD models, BIST of the L1 buffer over JTAG
//     (full run and a stopped-and-resumed run, signature checked), PLL
//     frequency check.
// Serial frames sent back to back are checked for the line rate. Only the
// chip's pins are used, so the bench also runs against an empty core.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_amt2_top;
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
  logic a1, a2;
  logic [19:0] sh1, sh2, sh3;

  amt2_top dut (.clk, .clk40, .rst_n, .hit_samples, .trigger, .bcr, .ecr, .sdata, .sstrobe,
    .par_data, .par_valid, .par_ready, .error_out, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .tck, .tms, .tdi, .trst_n, .tdo, .asd_clk, .asd_out, .asd_in, .asd_load, .asd_rst, .gpo, .gpi);

  asd_chip_model u_asd1 (.asd_clk, .asd_load, .asd_rst, .din(asd_out), .dout(a1), .shadow(sh1));
  asd_chip_model u_asd2 (.asd_clk, .asd_load, .asd_rst, .din(a1), .dout(a2), .shadow(sh2));
  asd_chip_model u_asd3 (.asd_clk, .asd_load, .asd_rst, .din(a2), .dout(asd_in), .shadow(sh3));

  `include "jtag_tasks.svh"

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
  bit gen_on = 0, burst = 0, trig_on = 0, check_on = 0, pair_mode = 0;
  int trig_per_mille = 3;
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
    gap = burst ? 20 : 20 + $urandom_range(0, 10000);
    w   = burst ? 3 : 3 + $urandom_range(0, 300);
    lead[ch]  = from + gap;
    trail[ch] = lead[ch] + w;
  endtask

  always @(posedge clk) begin
    cyc++;
    // the trigger FIFO takes coarse[12:1] at the edge that sees trigger
    if (trigger && check_on) begin tags.push_back(12'(tnow >> 1)); tag_cyc.push_back(cyc); end
    tnow = bcr ? 0 : tnow + 1;
    #1;
    trigger = trig_on && ($urandom_range(0, 999) < trig_per_mille);
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
        new_pulse(ch, trail[ch]);
      end
      if (!gen_on) new_pulse(ch, t0 + 16);
    end
  end

  // ---------------------------------------------------------------- read-out
  int n_events = 0, n_data = 0, n_err_words = 0, n_lead = 0, n_trail = 0, n_pair = 0;
  int n_extest = 0;
  int n_par_words = 0, n_ds_words = 0, n_dc_words = 0, n_ro_full = 0;
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

  function automatic logic [35:0] misr(logic [35:0] s, logic [35:0] d);
    return {s[34:0], 1'b0} ^ (s[35] ? 36'h801 : 36'h0) ^ d;
  endfunction

  initial begin
    #400000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- phases
  initial begin
    logic [11:0] r;
    logic [179:0] o, v;
    for (int ch = 0; ch < NUM_CH; ch++) begin hit_samples[ch] = '0; lead[ch] = 0; trail[ch] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) bcr = 1;
    @(negedge clk) bcr = 0;
    check_on = 1;

    // 1: edge mode, parallel read-out
    bus_write(CR_MODE, 12'h146);      // matching, serial off by parallel, error words
    rx_mode = 0;
    trig_per_mille = 4;
    run_phase(12000);
    $display("phase 1: events %0d data %0d", n_events, n_data);

    // 2: pair mode, DS serial 80 Mbit/s
    rx_mode = 1; pair_mode = 1;
    bus_write(CR_MODE, 12'h10F);
    trig_per_mille = 2;
    run_phase(12000);
    $display("phase 2: events %0d pair words %0d", n_events, n_pair);

    // 3: edge mode written over JTAG, data+clock serial 40 Mbit/s
    rx_mode = 2; pair_mode = 0; last_end = 0;
    jtag_reset();
    jtag_ir(4'h8);
    jtag_dr(180, '0, o);               // read the control registers
    v = o;
    check(o[11:0] == 12'h10F && o[23:12] == 12'(WIN), "control registers read over JTAG");
    v[11:0] = 12'h116;                  // edge mode, serial, data+clock, speed 1
    jtag_ir(4'h8);
    jtag_dr(180, v, o);
    bus_read(CR_MODE, r);
    check(r == 12'h116, "control register written over JTAG");
    check(o[11:0] == 12'h000, "second scan returns what the first loaded");
    trig_per_mille = 1;
    run_phase(12000);
    $display("phase 3: events %0d dc words %0d", n_events, n_dc_words);

    // 4: stress
    check_on = 0;
    rx_mode = 0;
    bus_write(CR_MODE, 12'h144);       // parallel, matching off
    ready_pct = 2;
    burst = 1; gen_on = 1; trig_on = 1; trig_per_mille = 100;
    repeat (3000) @(posedge clk);
    burst = 0;
    bus_write(CR_MODE, 12'h146);       // matching on again, slow read-out
    for (int i = 0; i < 300; i++) begin   // watch the read-out FIFO fill
      repeat (18) @(posedge clk);
      bus_read(18, r);
      if (r[6:0] == 7'(RO_DEPTH)) n_ro_full++;
    end
    trig_on = 0; gen_on = 0;
    ready_pct = 100;
    drain();
    bus_read(16, r);
    check(r[ERR_CHB_OVF], "channel buffer overflow flag");
    check(r[ERR_L1_OVF], "L1 overflow flag");
    check(r[ERR_TRG_OVF], "trigger FIFO overflow flag");
    check(error_out, "error pin");
    bus_write(CR_MODE, 12'h546);       // clear error flags
    bus_write(CR_MODE, 12'h146);
    @(negedge clk) ecr = 1;
    @(negedge clk) ecr = 0;
    exp_evid = 0; tags.delete(); tag_cyc.delete(); ev_state = 0;
    bus_read(16, r);
    check(r == 0 && !error_out, "error flags cleared");
    // a short compared run after the stress
    check_on = 1;
    trig_per_mille = 4;
    run_phase(4000);

    // 5: control functions
    jtag_reset();
    jtag_dr(32, '0, o);
    check(o[31:0] == 32'h0A4D_2001, "IDCODE");
    bus_write(CR_GPO, 12'hA5C);
    check(gpo == 12'hA5C, "general outputs");
    jtag_ir(4'h9);
    jtag_dr(72, '0, o);
    check(o[62:60] == gpi && o[11:0] == 12'h000, "status over JTAG: general inputs, no errors");
    // DEBUG register: everything drained, L1 empty, event id counted
    jtag_ir(4'hC);
    jtag_dr(64, '0, o);
    // {pll done, serial, BIST, matcher busy, errors 6, read-out count 7,
    //  trigger count 4, event id 12, L1 base 9, L1 wp 9, coarse 13}
    check(o[21:13] == o[30:22] && o[42:31] == 12'(exp_evid) && o[46:43] == 0
          && o[53:47] == 0 && o[59:54] == 0 && !o[60],
          $sformatf("DEBUG register %h, event id %0d", o[63:0], exp_evid));
    // boundary scan: SAMPLE sees the pins, EXTEST drives the outputs
    begin
      logic [113:0] pat;
      jtag_ir(4'h2);
      pat = '0;
      pat[113:102] = 12'h3C5;                // gpo cells
      jtag_dr(114, 180'(pat), o);
      check(o[2:0] == 3'b000 && o[4] == 1'b0 && o[9:5] == 5'(CR_GPO) && o[21:10] == 12'hA5C
            && o[25:23] == gpi && o[49:26] == '0, "SAMPLE captures the input pins");
      check(o[113:102] == 12'hA5C && o[85] == error_out, "SAMPLE captures the output pins");
      check(gpo == 12'hA5C, "SAMPLE leaves the pins to the core");
      jtag_ir(4'h0);
      repeat (4) @(posedge clk);
      check(gpo == 12'h3C5 && !par_valid, "EXTEST drives the output pins");
      if (gpo == 12'h3C5) n_extest++;
      jtag_ir(4'hF);
      repeat (4) @(posedge clk);
      check(gpo == 12'hA5C, "pins back to the core after EXTEST");
    end
    // ASD: load 60 bits into the three chips
    begin
      logic [59:0] pat;
      pat = 60'({$urandom, $urandom});
      jtag_ir(4'hA);
      jtag_dr(60, 180'(pat), o);
      repeat (20) @(posedge clk);
      for (int i = 0; i < 60; i++) begin
        int pos; logic b;
        pos = 59 - i;
        b = (pos < 20) ? sh1[pos] : (pos < 40) ? sh2[pos - 20] : sh3[pos - 40];
        check(b == pat[i], $sformatf("ASD bit %0d", i));
      end
    end
    // BIST of the L1 buffer, pattern 0, full run
    begin
      logic [35:0] s;
      jtag_ir(4'hB);
      jtag_dr(48, 180'h0E1, o);        // start, stop never (7), L1, pattern 0
      repeat (13 * 256 + 100) @(posedge clk);
      jtag_dr(48, '0, o);
      s = '0;
      for (int e = 1; e <= 4; e++)
        for (int k = 0; k < 256; k++) begin
          bit f; f = (e == 2 || e == 4);
          s = misr(s, f ? '1 : '0);
          s = misr(s, f ? '0 : '1);
        end
      check(o[35:0] == s, $sformatf("BIST signature %h expected %h", o[35:0], s));
      check(o[42] && !o[43] && !o[41], "BIST done, no fail");
      // stepping: stop before element 2, then resume
      jtag_dr(48, 180'h041, o);        // start, stop before element 2
      repeat (4 * 256 + 100) @(posedge clk);
      jtag_dr(48, '0, o);
      check(o[44] && o[47:45] == 3'd2, "BIST paused before element 2");
      jtag_dr(48, 180'h0E2, o);        // resume
      repeat (9 * 256 + 100) @(posedge clk);
      jtag_dr(48, '0, o);
      check(o[42] && !o[43] && o[35:0] == s, "BIST resumed to the same signature");
    end
    // PLL check
    bus_write(CR_MODE, 12'h346);
    bus_write(CR_MODE, 12'h146);
    repeat (2 * 4096 + 100) @(posedge clk);
    begin
      logic [11:0] lo, hi; int n;
      bus_read(19, lo); bus_read(20, hi);
      n = int'({hi[3:0], lo});
      check(hi[11] && n >= 8190 && n <= 8194, $sformatf("PLL check count %0d", n));
    end

    // mechanisms seen
    check(n_lead > 0 && n_trail > 0, "leading and trailing words");
    check(n_pair > 0, "pair words");
    check(n_events > 100, $sformatf("events %0d", n_events));
    check(n_par_words > 0 && n_ds_words > 0 && n_dc_words > 0, "all three read-out paths");
    check(n_ro_full > 0, "read-out FIFO full");
    check(n_extest > 0, "boundary-scan EXTEST");
    check(n_b2b > 0, "back-to-back serial frames at the line rate");
    check(n_err_words > 0, "error words");
    $display("events %0d data %0d lead %0d trail %0d pair %0d par %0d ds %0d dc %0d ro_full %0d err_words %0d b2b %0d",
             n_events, n_data, n_lead, n_trail, n_pair, n_par_words, n_ds_words, n_dc_words,
             n_ro_full, n_err_words, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
