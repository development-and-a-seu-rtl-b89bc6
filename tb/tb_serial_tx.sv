// tb_serial_tx: sends random words at every speed in both line codes and
// decodes the lines with an independent receiver: in DS mode a bit is taken
// at each change of data XOR strobe, in data-clock mode at each rising edge
// of the clock. Checks the words, that DS mode keeps both lines still while
// idle, and the bit rate (clocks per bit) of each speed setting.
module tb_serial_tx;
  logic clk = 0, rst_n = 0, enable = 1, ds_mode = 1, word_valid = 0;
  logic [1:0] speed = 0;
  logic [31:0] word = '0;
  logic word_pop, sdata, sstrobe, busy;
  int checks = 0, failures = 0;
  logic [31:0] sent [$];
  // receiver
  logic pd = 0, ps = 0;
  bit inword = 0;
  int nb = 0;
  logic [31:0] sh;
  int unsigned cyc = 0, last_bit_cyc = 0, min_gap = 1000, max_gap = 0;

  serial_tx dut (.clk, .rst_n, .enable, .ds_mode, .speed, .word_valid, .word, .word_pop,
    .sdata, .sstrobe, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 40) $display("FAIL: %s", what); end
  endtask

  task automatic take_bit(input logic b);
    int unsigned g;
    g = cyc - last_bit_cyc;
    last_bit_cyc = cyc;
    if (!inword) begin
      if (b) begin inword = 1; nb = 0; end
    end else begin
      if (g < min_gap) min_gap = g;
      if (g > max_gap) max_gap = g;
      if (nb < 32) begin
        sh = {sh[30:0], b}; nb++;
        if (nb == 32) begin
          if (sent.size() == 0) check(0, "word not sent");
          else check(sh == sent.pop_front(), $sformatf("received %h", sh));
        end
      end else begin
        check(b == 1'b0, "stop bit");
        inword = 0;
      end
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (ds_mode) begin
        if ((sdata ^ sstrobe) != (pd ^ ps)) take_bit(sdata);
      end else begin
        if (sstrobe && !ps) take_bit(sdata);
      end
    end
    pd <= sdata; ps <= sstrobe;
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      for (int sp = 0; sp < 4; sp++) begin
        int exp_gap;
        @(negedge clk);
        ds_mode = (m == 0); speed = 2'(sp);
        min_gap = 1000; max_gap = 0; inword = 0;
        for (int w = 0; w < 20; w++) begin
          @(negedge clk);
          word = $urandom; word_valid = 1;
          #1;
          while (!word_pop) begin @(negedge clk); #1; end
          sent.push_back(word);
          @(posedge clk);
          #1 word_valid = 0;
          if (w % 5 == 4) begin
            logic d0, s0;
            do @(posedge clk); while (busy);
            repeat (3) @(posedge clk);
            d0 = sdata; s0 = sstrobe;
            repeat (20) @(posedge clk);
            if (ds_mode) check(sdata == d0 && sstrobe == s0, "DS lines moved while idle");
          end
        end
        do @(posedge clk); while (busy);
        repeat (20) @(posedge clk);
        check(sent.size() == 0, $sformatf("mode %0d speed %0d: %0d words not received", m, sp, sent.size()));
        sent.delete();
        exp_gap = 1 << sp;
        if (!ds_mode && sp == 0) exp_gap = 2;
        check(min_gap == exp_gap && max_gap == exp_gap,
              $sformatf("mode %0d speed %0d: bit gap %0d..%0d expected %0d", m, sp, min_gap, max_gap, exp_gap));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
