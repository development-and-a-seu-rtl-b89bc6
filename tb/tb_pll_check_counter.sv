// tb_pll_check_counter: runs the PLL check with the PLL clock at exactly
// twice the reference (count must be 2*GATE within the synchroniser
// uncertainty of +-2) and with a PLL clock 1/6 too slow (count must drop to
// the matching value), and checks the time from start to done.
module tb_pll_check_counter;
  localparam int GATE = 4096;
  logic clk = 0, clk40 = 0, rst_n = 0, start = 0;
  logic [15:0] count;
  logic done;
  int checks = 0, failures = 0;
  int half80 = 5;

  pll_check_counter dut (.clk, .clk40, .rst_n, .start, .count, .done);

  always #10 clk40 = ~clk40;
  always #(half80) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int exp);
    int n;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(!done, "done cleared by start");
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    check(int'(count) >= exp - 1 && int'(count) <= exp + 1,
          $sformatf("count %0d expected %0d", count, exp));
    check(n > exp && n < exp + 20, $sformatf("took %0d clocks", n));
  endtask

  initial begin
    repeat (3) @(posedge clk40);
    rst_n = 1;
    run(2 * GATE);
    run(2 * GATE);
    half80 = 6;                       // PLL at 5/6 of its frequency
    repeat (4) @(posedge clk);
    run(GATE * 20 / 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
