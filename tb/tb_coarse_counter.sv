// tb_coarse_counter: checks counting, wrap-around at 2^13 and the bunch
// count reset that loads the offset, against a counter kept in the bench.
module tb_coarse_counter;
  logic clk = 0, rst_n = 0, bcr = 0;
  logic [12:0] offset = 13'd100, coarse;
  int checks = 0, failures = 0;
  int unsigned model;

  coarse_counter dut (.clk, .rst_n, .bcr, .offset, .coarse);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    model = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bcr = (cyc % 5000 == 4000);
      if (bcr) offset = 13'($urandom);
      @(posedge clk);
      #1;
      model = bcr ? offset : (model + 1) % 8192;
      checks++;
      if (coarse != 13'(model)) begin
        failures++;
        if (failures < 5) $display("cycle %0d: coarse %0d expected %0d", cyc, coarse, model);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
