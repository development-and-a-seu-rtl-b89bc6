// tb_sync_fifo: random pushes and pops against a queue model, at the
// read-out FIFO size (64 x 32); checks data order, empty, full and count,
// that a push into a full FIFO is ignored, and BIST write/read access.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] din = '0, dout;
  logic empty, full;
  logic [6:0] count;
  logic bist_en = 0, bist_we = 0;
  logic [5:0] bist_addr = '0;
  logic [31:0] bist_wdata = '0, bist_rdata;
  int checks = 0, failures = 0, n_full = 0;
  logic [31:0] q [$];

  sync_fifo #(.WIDTH(32), .DEPTH(64)) dut (.clk, .rst_n, .push, .din, .pop, .dout,
    .empty, .full, .count, .bist_en, .bist_we, .bist_addr, .bist_wdata, .bist_rdata);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int bias;
      bias = ((cyc / 2000) % 2) ? 70 : 30;
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == 64), "full");
      check(count == 7'(q.size()), "count");
      if (q.size() > 0) check(dout == q[0], $sformatf("dout %h expected %h", dout, q[0]));
      if (full) n_full++;
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 100 - bias);
      din  = $urandom;
      @(posedge clk);
      begin
        int was;
        was = q.size();
        if (pop && was > 0) void'(q.pop_front());
        if (push && was < 64) q.push_back(din);
      end
    end
    check(n_full > 0, "never full");
    // BIST access
    @(negedge clk); push = 0; pop = 0; bist_en = 1; bist_we = 1;
    for (int a = 0; a < 64; a++) begin
      bist_addr = 6'(a); bist_wdata = 32'(a * 32'h01010101) ^ 32'hA5A5_0000;
      @(negedge clk);
    end
    bist_we = 0;
    for (int a = 0; a < 64; a++) begin
      bist_addr = 6'(a);
      @(negedge clk);
      check(bist_rdata == (32'(a * 32'h01010101) ^ 32'hA5A5_0000), "bist read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
