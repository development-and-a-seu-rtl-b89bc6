// tb_csr: bus writes and reads of all 15 control registers, JTAG-style
// loads of all 180 bits, status read-back, general purpose I/O, and the
// control parity: after every write parity_err must be low, and flipping any
// single control bit (an upset) must raise it.
module tb_csr;
  import amt_pkg::*;
  logic clk = 0, rst_n = 0, bus_we = 0, jtag_load = 0;
  logic [4:0] bus_addr = '0;
  logic [11:0] bus_wdata = '0, bus_rdata;
  logic [179:0] jtag_data = '0, cr_flat;
  logic [11:0] cr [15];
  logic [11:0] sr_in [6], sr [6];
  logic parity_err;
  logic [11:0] gpo;
  logic [2:0] gpi = 3'b101;
  logic [11:0] model [15];
  int checks = 0, failures = 0;

  csr dut (.clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .jtag_load,
    .jtag_data, .cr_flat, .cr, .sr_in, .sr, .parity_err, .gpo, .gpi);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic check_all();
    for (int i = 0; i < 15; i++) begin
      bus_addr = 5'(i); #1;
      check(bus_rdata == model[i], $sformatf("CR%0d %h expected %h", i, bus_rdata, model[i]));
      check(cr_flat[i*12 +: 12] == model[i], "cr_flat");
    end
    check(gpo == model[8], "gpo");
    check(!parity_err, "parity error after write");
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (sr_in[i]) sr_in[i] = 12'(i * 273 + 5);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(!parity_err, "parity after reset");
    for (int i = 0; i < 15; i++) model[i] = cr[i];
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n % 20 == 7) begin
        for (int i = 0; i < 15; i++) model[i] = 12'($urandom);
        for (int i = 0; i < 15; i++) jtag_data[i*12 +: 12] = model[i];
        jtag_load = 1;
      end else begin
        bus_addr = 5'($urandom_range(0, 14)); bus_wdata = 12'($urandom); bus_we = 1;
        model[bus_addr] = bus_wdata;
      end
      @(posedge clk); #1; bus_we = 0; jtag_load = 0;
      check_all();
      // an upset in one random control bit
      if (n % 10 == 3) begin
        int r, b;
        r = $urandom_range(0, 14); b = $urandom_range(0, 11);
        dut.cr[r][b] = ~model[r][b];
        #1 check(parity_err, "upset not detected");
        dut.cr[r][b] = model[r][b];
        #1;
      end
    end
    // status registers and general inputs
    @(negedge clk); @(negedge clk); @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      bus_addr = 5'(16 + i); #1;
      if (i < 5) check(bus_rdata == sr_in[i], "status read");
      else check(bus_rdata[2:0] == gpi, "general inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
