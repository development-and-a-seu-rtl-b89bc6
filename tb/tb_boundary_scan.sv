// tb_boundary_scan: checks the boundary-scan register at its default size.
// Random pin and core values are captured and shifted out while a random
// pattern is shifted in; the bench compares the tdo stream with the captured
// values (input cells first), checks that an update moves the output-cell
// part of the pattern onto the output pins only with extest set, and that
// the pins follow the core otherwise, also while the register shifts.
module tb_boundary_scan;
  localparam int NI = 50, NO = 64, N = NI + NO;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] pin_in;
  logic [NO-1:0] core_out, pin_out;
  logic extest = 0, capture = 0, shift = 0, update = 0, tdi = 0, tdo;

  boundary_scan dut (.clk, .rst_n, .pin_in, .core_out, .pin_out, .extest,
                     .capture, .shift, .update, .tdi, .tdo);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [NO-1:0] rnd_out();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [N-1:0] cap, pat;
    logic [NO-1:0] last_upd;
    last_upd = '0;
    pin_in = '0; core_out = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      pin_in   = NI'({$urandom, $urandom});
      core_out = rnd_out();
      pat      = N'({$urandom, $urandom, $urandom, $urandom});
      cap      = {core_out, pin_in};
      extest   = round[0];
      @(negedge clk) capture = 1;
      @(negedge clk) capture = 0;
      // scan: tdo shows a cell, then the register moves one place
      for (int i = 0; i < N; i++) begin
        check(tdo == cap[i], $sformatf("round %0d cell %0d", round, i));
        tdi = pat[i]; shift = 1;
        core_out = rnd_out();
        #1 check(pin_out == (extest ? last_upd : core_out), "pins during shift");
        @(negedge clk) shift = 0;
      end
      @(negedge clk) update = 1;
      @(negedge clk) update = 0;
      core_out = rnd_out();
      #1;
      if (extest) check(pin_out == pat[N-1:NI], "extest drives the update latches");
      else        check(pin_out == core_out, "sample leaves the pins to the core");
      extest = 1;
      #1 check(pin_out == pat[N-1:NI], "update latches hold the pattern");
      extest = 0;
      last_upd = pat[N-1:NI];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
