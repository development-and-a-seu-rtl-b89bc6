// tb_jtag_tap: drives the TAP through its pins. Checks the IDCODE, the
// capture-IR pattern, BYPASS (one bit of delay), capture of the 180 control
// bits and the load pulse with the shifted-in value, capture of the 72
// status bits, the BIST register in both directions, and the ASD path
// (shift pulses with the TDI bits, TDO from asd_in, update pulse), and
// SAMPLE/EXTEST on a bench boundary register (capture, 40 shifts, update,
// the extest level), and the DEBUG capture.
module tb_jtag_tap;
  import amt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo;
  logic [179:0] cr_flat, cr_data;
  logic cr_load;
  logic [71:0] sr_flat;
  logic asd_sel, asd_shift, asd_bit, asd_update, asd_in;
  logic [35:0] bist_signature = 36'h9_8765_4321;
  logic [11:0] bist_status = 12'h5A3, bist_cmd;
  logic bist_cmd_valid;
  int checks = 0, failures = 0;
  int n_load = 0, n_upd = 0, n_bist = 0;
  logic [179:0] loaded;
  logic [11:0] cmd_seen;
  logic [63:0] asd_chain;   // simple model of a shift chain outside
  logic [63:0] asd_sent;
  int n_shift = 0;

  jtag_tap dut (.clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo, .cr_flat, .cr_load,
    .cr_data, .sr_flat, .asd_sel, .asd_shift, .asd_bit, .asd_update, .asd_in,
    .bist_signature, .bist_status, .bist_cmd_valid, .bist_cmd,
    .bs_extest, .bs_capture, .bs_shift, .bs_bit, .bs_update, .bs_tdo, .debug_flat);
  logic [63:0] debug_flat = '0;

  // bench boundary register: 40 cells loaded with bs_pins on capture
  logic bs_extest, bs_capture, bs_shift, bs_bit, bs_update, bs_tdo;
  logic [39:0] bs_chain = '0, bs_pins = '0;
  int n_bs_cap = 0, n_bs_upd = 0, n_bs_shift = 0;
  always @(posedge clk) if (rst_n) begin
    if (bs_capture) begin bs_chain <= bs_pins; n_bs_cap++; end
    else if (bs_shift) begin bs_chain <= {bs_bit, bs_chain[39:1]}; n_bs_shift++; end
    if (bs_update) n_bs_upd++;
  end
  assign bs_tdo = bs_chain[0];

  `include "jtag_tasks.svh"

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  assign asd_in = asd_chain[63];
  always @(posedge clk) if (rst_n) begin
    if (cr_load) begin n_load++; loaded = cr_data; end
    if (asd_update) n_upd++;
    if (bist_cmd_valid) begin n_bist++; cmd_seen = bist_cmd; end
    if (asd_shift) begin
      asd_chain <= {asd_chain[62:0], asd_bit};
      n_shift++;
    end
  end

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [179:0] o, v;
    for (int i = 0; i < 180; i += 32) cr_flat[i +: 32] = $urandom;
    sr_flat = {$urandom, $urandom, 8'h3C};
    asd_chain = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    jtag_reset();
    // IDCODE is selected after reset
    jtag_dr(32, '0, o);
    check(o[31:0] == 32'h0A4D_2001, $sformatf("IDCODE %h", o[31:0]));
    // BYPASS: a pattern comes back one bit later
    jtag_ir(4'hF);
    v = 180'($urandom);
    jtag_dr(33, v, o);
    check(o[32:1] == v[31:0] && o[0] == 1'b0, "bypass");
    // CONTROL: capture and load
    jtag_ir(4'h8);
    for (int i = 0; i < 180; i += 32) v[i +: 32] = $urandom;
    jtag_dr(180, v, o);
    check(o == cr_flat, "control capture");
    repeat (4) @(posedge clk);
    check(n_load == 1 && loaded == v, "control load");
    // STATUS
    jtag_ir(4'h9);
    jtag_dr(72, '0, o);
    check(o[71:0] == sr_flat, "status capture");
    check(n_load == 1, "no load from status");
    // BIST
    jtag_ir(4'hB);
    jtag_dr(48, 180'h0AB, o);
    check(o[47:0] == {bist_status, bist_signature}, "bist capture");
    repeat (4) @(posedge clk);
    check(n_bist == 1 && cmd_seen == 12'h0AB, "bist command");
    // ASD: shift 64 bits through the outside chain and read its old content
    jtag_ir(4'hA);
    check(asd_sel, "asd select");
    begin
      logic [63:0] prev_chain;
      prev_chain = asd_chain;
      asd_sent = {$urandom, $urandom};
      jtag_dr(64, 180'(asd_sent), o);
      repeat (4) @(posedge clk);
      check(n_shift == 64, $sformatf("asd shifts %0d", n_shift));
      check(asd_chain == {<<{asd_sent}}, "asd chain content");
      for (int i = 0; i < 64; i++) check(o[i] == prev_chain[63 - i], "asd read");
      check(n_upd == 1, "asd update");
    end
    // DEBUG captures the internal registers
    debug_flat = {$urandom, $urandom};
    jtag_ir(4'hC);
    jtag_dr(64, '0, o);
    check(o[63:0] == debug_flat, "debug capture");
    // SAMPLE and EXTEST reach the boundary register
    begin
      logic [39:0] sent;
      bs_pins = {$urandom, $urandom};
      sent = {$urandom, $urandom};
      jtag_ir(4'h2);
      check(!bs_extest, "SAMPLE leaves the pins to the core");
      jtag_dr(40, 180'(sent), o);
      repeat (4) @(posedge clk);
      check(o[39:0] == bs_pins, "boundary capture shifted out");
      check(bs_chain == sent, "boundary register shifted in");
      check(n_bs_cap == 1 && n_bs_shift == 40 && n_bs_upd == 1, "boundary capture, shifts, update");
      jtag_ir(4'h0);
      check(bs_extest, "EXTEST drives the pins");
      jtag_ir(4'hF);
      check(!bs_extest, "BYPASS releases the pins");
    end
    // TRST returns to IDCODE
    trst_n = 0; repeat (4) @(posedge clk); trst_n = 1;
    jtag_clock(1'b0, 1'b0, o[0]);
    jtag_dr(32, '0, o);
    check(o[31:0] == 32'h0A4D_2001, "IDCODE after TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
