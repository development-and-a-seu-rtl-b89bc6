// tb_trigger_interface: random triggers and pops. Checks that each tag is
// the bunch id (coarse[12:1]) at the trigger, that event ids count popped
// triggers and restart at ecr, and that a trigger into a full 8-word FIFO is
// lost and reported.
module tb_trigger_interface;
  logic clk = 0, rst_n = 0, trigger = 0, ecr = 0, trg_pop = 0;
  logic [12:0] coarse = '0;
  logic trg_valid, overflow;
  logic [11:0] trg_bc, trg_evid;
  logic [3:0] count;
  logic [11:0] bist_rdata;
  int checks = 0, failures = 0, n_ovf = 0, n_lost = 0;
  logic [11:0] q [$];
  int unsigned evid = 0;

  trigger_interface dut (.clk, .rst_n, .trigger, .ecr, .coarse, .trg_valid, .trg_bc,
    .trg_evid, .trg_pop, .overflow, .count, .bist_en(1'b0), .bist_we(1'b0),
    .bist_addr(3'd0), .bist_wdata(12'd0), .bist_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;
  always @(posedge clk) if (rst_n && overflow) n_ovf++;

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
    for (int cyc = 0; cyc < 10000; cyc++) begin
      int bias;
      @(negedge clk);
      check(trg_valid == (q.size() > 0), "valid");
      check(count == 4'(q.size()), "count");
      if (q.size() > 0) begin
        check(trg_bc == q[0], $sformatf("tag %h expected %h", trg_bc, q[0]));
        check(trg_evid == 12'(evid), "event id");
      end
      bias = ((cyc / 1000) % 2) ? 60 : 20;
      trigger = ($urandom_range(0, 99) < bias);
      trg_pop = ($urandom_range(0, 99) < 40);
      ecr = (cyc % 2500 == 1234) && q.size() == 0;
      @(posedge clk);
      begin
        int was;
        was = q.size();
        if (ecr) evid = 0;
        else if (trg_pop && was > 0) begin void'(q.pop_front()); evid++; end
        if (trigger && was < 8) q.push_back(coarse[12:1]);
        else if (trigger) n_lost++;
      end
    end
    check(n_lost > 0 && n_ovf == n_lost, $sformatf("overflow %0d lost %0d", n_ovf, n_lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
