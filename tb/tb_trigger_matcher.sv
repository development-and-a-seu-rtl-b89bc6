// tb_trigger_matcher: the matcher with an L1 buffer, a trigger FIFO and a
// read-out FIFO around it. Random hits (in time order, with a few clocks of
// write delay) go into the L1 buffer, random triggers into the trigger FIFO,
// and the read-out FIFO is drained at a varying rate so that it fills and
// the matcher stalls. Every event read out is compared with the hits a
// reference picks from the list of all hits written: those whose bunch id
// lies in [tag - latency, tag - latency + window), in write order. Checks
// header, data words, trailer word count, event ids, that the L1 buffer
// never overflows (hits are released), and that a raised error flag gives
// exactly one error word. The time base wraps several times.
module tb_trigger_matcher;
  import amt_pkg::*;
  localparam int WIN = 20, LAT = 100, SEARCH = 8, REJECT = 4;
  logic clk = 0, rst_n = 0;
  logic [12:0] coarse = '0;
  // L1
  logic l1_wr = 0; hit_t l1_wr_hit = '0, l1_rd_hit;
  logic [8:0] l1_wp, l1_base; logic l1_ovf, l1_rd_perr; logic [7:0] l1_rd_addr;
  logic [35:0] l1_brd;
  // triggers
  logic trigger = 0, trg_valid, trg_pop, trg_ovf;
  logic [11:0] trg_bc, trg_evid, trg_brd;
  logic [3:0] trg_count;
  // read-out
  logic ro_push, ro_full, ro_empty, ro_pop = 0;
  logic [31:0] ro_din, ro_dout, ro_brd;
  logic [6:0] ro_count;
  logic [11:0] err_flags = '0;
  logic busy, l1_perr;
  int checks = 0, failures = 0, n_full = 0, n_events = 0, n_err_words = 0, n_hits_matched = 0;
  int n_l1_ovf = 0, n_trg_lost = 0;

  l1_buffer u_l1 (.clk, .rst_n, .wr(l1_wr), .wr_hit(l1_wr_hit), .wp(l1_wp), .base(l1_base),
    .overflow(l1_ovf), .rd_addr(l1_rd_addr), .rd_hit(l1_rd_hit), .rd_parity_err(l1_rd_perr),
    .bist_en(1'b0), .bist_we(1'b0), .bist_addr(8'd0), .bist_wdata(36'd0), .bist_rdata(l1_brd));
  trigger_interface u_trg (.clk, .rst_n, .trigger, .ecr(1'b0), .coarse, .trg_valid, .trg_bc,
    .trg_evid, .trg_pop, .overflow(trg_ovf), .count(trg_count), .bist_en(1'b0), .bist_we(1'b0),
    .bist_addr(3'd0), .bist_wdata(12'd0), .bist_rdata(trg_brd));
  sync_fifo #(.WIDTH(32), .DEPTH(64)) u_ro (.clk, .rst_n, .push(ro_push), .din(ro_din),
    .pop(ro_pop), .dout(ro_dout), .empty(ro_empty), .full(ro_full), .count(ro_count),
    .bist_en(1'b0), .bist_we(1'b0), .bist_addr(6'd0), .bist_wdata(32'd0), .bist_rdata(ro_brd));

  trigger_matcher dut (.clk, .rst_n, .enable(1'b1), .cur_bc(coarse[12:1]),
    .cfg_window(12'(WIN)), .cfg_latency(12'(LAT)), .cfg_search(12'(SEARCH)),
    .cfg_reject(12'(REJECT)), .trg_valid, .trg_bc, .trg_evid, .trg_pop, .l1_wp, .l1_base,
    .l1_rd_addr, .l1_rd_hit, .l1_rd_parity_err(l1_rd_perr), .err_flags, .ro_push,
    .ro_data(ro_din), .ro_full, .busy, .l1_parity_err(l1_perr));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  hit_t all_hits [$];
  int unsigned hit_cyc [$];
  logic [11:0] trig_tags [$];
  int unsigned trig_cyc [$];

  function automatic logic [31:0] word_of(hit_t h);
    logic [7:0] w8;
    w8 = (h.width > 255) ? 8'hFF : h.width[7:0];
    case (h.kind)
      HIT_PAIR:  return {4'h5, h.chan, w8, h.t[14:0]};
      HIT_TRAIL: return {4'h4, h.chan, h.err, 5'h0, h.t};
      default:   return {4'h3, h.chan, h.err, 5'h0, h.t};
    endcase
  endfunction

  // stimulus: time base, hits, triggers
  int unsigned cyc = 0;
  bit gen_on = 1;
  hit_t pend [$];
  int unsigned pend_at [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    coarse <= coarse + 1'b1;
    trigger <= 1'b0;
    l1_wr <= 1'b0;
    // the trigger FIFO takes the tag at this edge unless it is full
    if (trigger) begin
      if (!u_trg.full) begin
        trig_tags.push_back(coarse[12:1]);
        trig_cyc.push_back(cyc);
      end else n_trg_lost++;
    end
    if (gen_on && $urandom_range(0, 99) < 10) begin
      hit_t h;
      h = hit_t'({$urandom, 3'($urandom)});
      h.err = 1'b0;
      if (h.kind == HIT_NONE) h.kind = HIT_LEAD;
      h.t = {coarse, 4'($urandom)};
      pend.push_back(h);
      pend_at.push_back(cyc + $urandom_range(1, 3));
    end
    if (pend.size() > 0 && pend_at[0] <= cyc) begin
      hit_t h;
      h = pend.pop_front(); void'(pend_at.pop_front());
      l1_wr <= 1'b1; l1_wr_hit <= h;
      all_hits.push_back(h);
      hit_cyc.push_back(cyc);
    end
    if (gen_on && cyc > 300 && $urandom_range(0, 999) < 8) begin
      trigger <= 1'b1;
    end
  end
  always @(posedge clk) if (rst_n && l1_ovf) n_l1_ovf++;

  // read-out drain and checker
  int ev_state = 0;   // 0: expect header, 1: in event
  logic [31:0] exp_words [$];
  int exp_evid = 0, words_in_ev = 0;
  int drain_pct = 90;
  always @(negedge clk) begin
    if (rst_n) begin
      if (ro_full) n_full++;
      ro_pop = !ro_empty && ($urandom_range(0, 99) < drain_pct);
      if (ro_pop) begin
        logic [31:0] w;
        w = ro_dout;
        if (w[31:28] == 4'h6) begin
          n_err_words++;
          check(w == {4'h6, 16'h0, err_flags}, "error word");
        end else if (ev_state == 0) begin
          logic [11:0] tag;
          int unsigned tcyc;
          check(w[31:28] == 4'hA, $sformatf("expected header, got %h", w));
          tag = trig_tags.pop_front();
          tcyc = trig_cyc.pop_front();
          check(w[27:16] == 12'(exp_evid) && w[15:4] == tag, "header fields");
          exp_words.delete();
          foreach (all_hits[i]) begin
            logic [11:0] d;
            d = all_hits[i].t[16:5] - (tag - 12'(LAT));
            // the time tag wraps every 8192 clocks: older hits are gone
            if (d < 12'(WIN) && hit_cyc[i] + 4000 > tcyc) exp_words.push_back(word_of(all_hits[i]));
          end
          ev_state = 1; words_in_ev = 1;
        end else if (w[31:28] == 4'hC) begin
          words_in_ev++;
          check(exp_words.size() == 0, $sformatf("event %0d: %0d hits missing", exp_evid, exp_words.size()));
          check(w == {4'hC, 12'(exp_evid), 8'h00, 8'(words_in_ev)}, "trailer");
          exp_evid++; n_events++; ev_state = 0;
        end else begin
          words_in_ev++;
          n_hits_matched++;
          if (exp_words.size() == 0) check(0, $sformatf("unexpected data word %h", w));
          else begin logic [31:0] e; e = exp_words.pop_front(); check(w == e, $sformatf("data word %h expected %h", w, e)); end
        end
      end
    end
  end

  initial begin
    #60000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (15000) @(posedge clk);
    drain_pct = 3;                    // slow read-out: FIFO fills, matcher stalls
    repeat (15000) @(posedge clk);
    drain_pct = 90;
    err_flags = 12'h008;              // an error appears
    repeat (15000) @(posedge clk);
    gen_on = 0;
    repeat (3000) @(posedge clk);
    check(trig_tags.size() == 0, $sformatf("%0d triggers not read out", trig_tags.size()));
    check(n_full > 0, "read-out FIFO never full");
    check(n_err_words == 1, $sformatf("error words %0d", n_err_words));
    check(n_l1_ovf == 0, "L1 overflow");
    check(n_events > 50 && n_hits_matched > 200, $sformatf("events %0d hits %0d", n_events, n_hits_matched));
    check(l1_wp == l1_base || 9'(l1_wp - l1_base) < 9'd40, "old hits not released");
    $display("events %0d matched hits %0d lost triggers %0d", n_events, n_hits_matched, n_trg_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
