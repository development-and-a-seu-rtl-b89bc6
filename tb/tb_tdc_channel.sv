// tb_tdc_channel: drives random pulses into one channel as 16-bin samples
// and compares every word leaving the channel buffer with the times worked
// out from the pulse list, in edge mode and in pair mode. Also checks that
// both edges of a pulse shorter than one period are kept, that a full buffer
// reports overflow, and that a flipped bit in the buffer shows up as a
// parity error.
module tb_tdc_channel;
  import amt_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, pair_mode = 0, out_ack = 1;
  logic [15:0] samples = '0;
  logic [12:0] coarse = '0;
  logic out_valid, overflow, parity_err;
  hit_t out_hit;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_perr = 0;
  bit cmp = 1;

  tdc_channel #(.CH(7)) dut (.clk, .rst_n, .enable, .pair_mode, .samples,
    .coarse, .out_valid, .out_hit, .out_ack, .overflow, .parity_err);

  always #5 clk = ~clk;

  // pulses in fine-bin units since cycle 0
  int unsigned p_lead [$], p_trail [$];
  hit_t exp_q [$];
  int unsigned cyc;

  function automatic logic [15:0] sample_of(int unsigned c);
    logic [15:0] s;
    for (int k = 0; k < 16; k++) begin
      int unsigned t;
      t = c * 16 + k;
      s[k] = 1'b0;
      foreach (p_lead[i]) if (t >= p_lead[i] && t < p_trail[i]) s[k] = 1'b1;
    end
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // drive samples and coarse (coarse = cycle mod 8192)
  always @(posedge clk) begin
    #1;
    cyc++;
    coarse  = 13'(cyc);
    samples = sample_of(cyc);
  end

  // compare outputs
  always @(negedge clk) begin
    if (rst_n && cmp && out_valid && out_ack) begin
      hit_t e;
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        e = exp_q.pop_front();
        check(out_hit == e, $sformatf("got k%0d t%0d w%0d err%0d, expected k%0d t%0d w%0d",
              out_hit.kind, out_hit.t, out_hit.width, out_hit.err, e.kind, e.t, e.width));
      end
    end
    if (overflow) n_ovf++;
    if (parity_err) n_perr++;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_pulse(int unsigned l, int unsigned w, bit pm);
    hit_t h;
    p_lead.push_back(l); p_trail.push_back(l + w);
    h = '0; h.chan = 5'd7;
    if (pm) begin
      h.kind = HIT_PAIR; h.t = 17'(l); h.width = (w > 1023) ? 10'h3FF : 10'(w);
      exp_q.push_back(h);
    end else begin
      h.kind = HIT_LEAD; h.t = 17'(l); exp_q.push_back(h);
      h.kind = HIT_TRAIL; h.t = 17'(l + w); exp_q.push_back(h);
    end
  endtask

  initial begin
    int unsigned t;
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      @(posedge clk); #2;
      pair_mode = mode[0];
      t = (cyc + 4) * 16;
      for (int i = 0; i < 300; i++) begin
        int unsigned w, gap;
        w   = (i % 10 == 3) ? 3 + $urandom_range(0, 8) : 4 + $urandom_range(0, 200);
        if (i % 7 == 1 || i % 7 == 2) w = 30 + $urandom_range(0, 100);
        if (i == 50) w = 1500;  // saturating width in pair mode
        gap = 18 + $urandom_range(0, 60);
        if (i % 7 == 2) gap = 5;  // trailing then leading edge in one period
        t = t + gap;
        add_pulse(t, w, mode[0]);
        t = t + w;
      end
      wait (cyc * 16 > t + 64);
      repeat (8) @(posedge clk);
      check(exp_q.size() == 0, $sformatf("mode %0d: %0d words missing", mode, exp_q.size()));
      exp_q.delete();
    end
    // overflow: stop reading and send 6 pulses (12 words into 4 places)
    pair_mode = 0;
    out_ack = 0;
    cmp = 0;
    t = (cyc + 4) * 16;
    for (int i = 0; i < 6; i++) begin
      p_lead.push_back(t + 20 + 40 * i); p_trail.push_back(t + 30 + 40 * i);
    end
    wait (cyc * 16 > t + 300);
    @(posedge clk); #2;
    check(n_ovf > 0, "no overflow reported");
    check(out_valid, "buffer should hold words");
    // parity: flip a stored bit of the head word, then read it
    dut.mem[dut.rp[1:0]][3] = ~dut.mem[dut.rp[1:0]][3];
    #1;
    check(out_hit.err == 1'b1, "flipped bit not flagged in word");
    @(negedge clk); out_ack = 1;
    @(negedge clk); out_ack = 0;
    check(n_perr == 1, $sformatf("parity_err pulses %0d", n_perr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
