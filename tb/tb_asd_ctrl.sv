// tb_asd_ctrl: drives shift and update requests (as the TAP gives them)
// into asd_ctrl connected to three ASD chain models in series. Checks that
// the shadow cells of the three chips take the shifted pattern after the
// update, that the data line is stable around each rising edge of asd_clk
// (SETUP clocks before it), the clock high time, the load pulse length,
// that a request arriving while busy is not lost, and the reset line.
module tb_asd_ctrl;
  logic clk = 0, rst_n = 0, shift = 0, shift_bit = 0, update = 0, reset_req = 0;
  logic asd_clk, asd_out, asd_load, asd_rst, busy;
  logic d1, d2, d3;
  logic [19:0] sh1, sh2, sh3;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, last_out_change = 0, clk_rise = 0, load_len = 0, n_clk = 0;
  logic prev_out = 0, prev_clk = 0, prev_load = 0;

  asd_ctrl dut (.clk, .rst_n, .shift, .shift_bit, .update, .reset_req, .asd_clk, .asd_out,
    .asd_load, .asd_rst, .busy);
  asd_chip_model u1 (.asd_clk, .asd_load, .asd_rst, .din(asd_out), .dout(d1), .shadow(sh1));
  asd_chip_model u2 (.asd_clk, .asd_load, .asd_rst, .din(d1), .dout(d2), .shadow(sh2));
  asd_chip_model u3 (.asd_clk, .asd_load, .asd_rst, .din(d2), .dout(d3), .shadow(sh3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (asd_out != prev_out) last_out_change = cyc;
    if (asd_clk && !prev_clk) begin
      n_clk++;
      check(cyc - last_out_change >= 2, "data changed too close to asd_clk");
      clk_rise = cyc;
    end
    if (!asd_clk && prev_clk) check(cyc - clk_rise == 3, "asd_clk high time");
    if (asd_load) load_len++;
    if (!asd_load && prev_load) begin check(load_len == 4, "load length"); load_len = 0; end
    prev_out = asd_out; prev_clk = asd_clk; prev_load = asd_load;
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [59:0] pat;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      pat = {$urandom, $urandom};
      n_clk = 0;
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        shift = 1; shift_bit = pat[i];
        @(negedge clk); shift = 0;
        // the TAP gives a request every 16 clocks; round 2 every 7, which
        // arrive while the previous shift is still under way
        repeat (round == 2 ? 5 : 14) @(negedge clk);
      end
      @(negedge clk) update = 1;
      @(negedge clk) update = 0;
      wait (!busy); repeat (12) @(negedge clk);
      check(n_clk == 60, $sformatf("asd_clk pulses %0d", n_clk));
      // first bit shifted ends deepest: chip 3's last cell
      for (int i = 0; i < 60; i++) begin
        logic got;
        int pos;
        pos = 59 - i;                // position counted from the input
        if (pos < 20) got = sh1[pos];
        else if (pos < 40) got = sh2[pos - 20];
        else got = sh3[pos - 40];
        check(got == pat[i], $sformatf("round %0d bit %0d", round, i));
      end
    end
    @(negedge clk) reset_req = 1;
    repeat (3) @(negedge clk);
    check(asd_rst && sh1 == 0 && sh3 == 0, "ASD reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
