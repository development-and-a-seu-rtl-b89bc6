// tb_channel_arbiter: random valid patterns on 24 channels. Checks that one
// channel is granted whenever any is waiting, that the grant goes to the
// first waiting channel after the last one granted (round robin), that the
// forwarded word is the granted channel's, and that no channel waits more
// than 24 grants.
module tb_channel_arbiter;
  import amt_pkg::*;
  localparam int N = NUM_CH;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ch_valid = '0, ch_ack;
  hit_t ch_hit [N];
  logic l1_wr;
  hit_t l1_hit;
  int checks = 0, failures = 0;
  int last = N - 1;
  int waited [N];

  channel_arbiter dut (.clk, .rst_n, .ch_valid, .ch_hit, .ch_ack, .l1_wr, .l1_hit);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (waited[i]) waited[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int exp_g;
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        if (!ch_valid[c]) ch_valid[c] = ($urandom_range(0, 99) < ((cyc / 1000) * 20 + 5));
        ch_hit[c] = hit_t'(35'($urandom) ^ (35'(c) << 20));
      end
      #1;
      exp_g = -1;
      for (int k = 1; k <= N; k++) if (exp_g < 0 && ch_valid[(last + k) % N]) exp_g = (last + k) % N;
      check(l1_wr == (exp_g >= 0), "l1_wr");
      if (exp_g >= 0) begin
        check(ch_ack == (N'(1) << exp_g), $sformatf("grant %b expected %0d", ch_ack, exp_g));
        check(l1_hit == ch_hit[exp_g], "forwarded word");
        last = exp_g;
      end else check(ch_ack == '0, "ack without valid");
      for (int c = 0; c < N; c++) begin
        if (ch_valid[c] && !ch_ack[c]) waited[c]++;
        else waited[c] = 0;
        if (waited[c] > N) check(0, $sformatf("channel %0d starved", c));
      end
      @(posedge clk);
      #1 ch_valid = ch_valid & ~ch_ack;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
