// JTAG bit-bang tasks shared by the testbenches. The including module must
// declare logic tck, tms, tdi and tdo. TCK runs at 1/16 of the 10-unit core
// clock period. TDO is sampled just before each rising edge of TCK.
localparam int TCK_HALF = 80;

task automatic jtag_clock(input logic m, input logic d, output logic q);
  tms = m; tdi = d;
  #TCK_HALF;
  q = tdo;
  tck = 1'b1;
  #TCK_HALF;
  tck = 1'b0;
endtask

task automatic jtag_reset();
  logic q;
  for (int i = 0; i < 6; i++) jtag_clock(1'b1, 1'b0, q);
  jtag_clock(1'b0, 1'b0, q);             // Run-Test/Idle
endtask

task automatic jtag_ir(input logic [3:0] ir);
  logic q;
  jtag_clock(1'b1, 1'b0, q);             // Select-DR
  jtag_clock(1'b1, 1'b0, q);             // Select-IR
  jtag_clock(1'b0, 1'b0, q);             // Capture-IR
  jtag_clock(1'b0, 1'b0, q);             // Shift-IR
  for (int i = 0; i < 4; i++) jtag_clock(i == 3, ir[i], q);
  jtag_clock(1'b1, 1'b0, q);             // Update-IR
  jtag_clock(1'b0, 1'b0, q);             // Run-Test/Idle
endtask

task automatic jtag_dr(input int len, input logic [179:0] din, output logic [179:0] dout);
  logic q;
  dout = '0;
  jtag_clock(1'b1, 1'b0, q);             // Select-DR
  jtag_clock(1'b0, 1'b0, q);             // Capture-DR
  jtag_clock(1'b0, 1'b0, q);             // Shift-DR
  for (int i = 0; i < len; i++) begin
    jtag_clock(i == len - 1, din[i], q);
    dout[i] = q;
  end
  jtag_clock(1'b1, 1'b0, q);             // Update-DR
  jtag_clock(1'b0, 1'b0, q);             // Run-Test/Idle
endtask
