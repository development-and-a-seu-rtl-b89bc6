// tb_l1_buffer: writes random hits while a reader releases them in order
// at a random pace; checks random-access reads against a copy of what was
// written, the write pointer, overflow when all 256 words are in use (the
// lost word must not overwrite anything), the parity check on a flipped
// bit, and the BIST port.
module tb_l1_buffer;
  import amt_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  hit_t wr_hit = '0, rd_hit;
  logic [8:0] wp, base = '0;
  logic overflow, rd_parity_err;
  logic [7:0] rd_addr = '0;
  logic bist_en = 0, bist_we = 0;
  logic [7:0] bist_addr = '0;
  logic [35:0] bist_wdata = '0, bist_rdata;
  int checks = 0, failures = 0, n_ovf = 0;
  hit_t model [512];   // indexed by 9-bit pointer
  int unsigned mwp = 0;

  l1_buffer dut (.clk, .rst_n, .wr, .wr_hit, .wp, .base, .overflow, .rd_addr,
    .rd_hit, .rd_parity_err, .bist_en, .bist_we, .bist_addr, .bist_wdata, .bist_rdata);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && overflow) n_ovf++;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int used, rel;
      @(negedge clk);
      check(wp == 9'(mwp), "write pointer");
      // read back a random live word (data of last cycle's address)
      used = int'(9'(mwp - base));
      wr = ($urandom_range(0, 99) < 50);
      wr_hit = hit_t'({$urandom, 3'($urandom)});
      // release pace: fast in some phases, stalled in others (overflow)
      rel = ((cyc / 3000) % 2) ? 0 : $urandom_range(0, 1);
      if (used > 0) begin
        logic [8:0] a;
        a = 9'(base + 9'($urandom_range(0, used - 1)));
        rd_addr = a[7:0];
        @(posedge clk); #1;
        check(rd_hit == model[a], $sformatf("read %0d", a));
        check(!rd_parity_err, "parity error on good word");
      end else @(posedge clk);
      if (wr && used < 256) begin model[mwp % 512] = wr_hit; mwp = (mwp + 1) % 512; end
      if (rel && used > 0) base = base + 1'b1;
    end
    check(n_ovf > 0, "no overflow");
    // parity: flip one bit of a stored word
    @(negedge clk); wr = 0;
    rd_addr = 8'(base);
    dut.mem[8'(base)][7] = ~dut.mem[8'(base)][7];
    @(posedge clk); #1;
    check(rd_parity_err, "flipped bit not detected");
    // BIST port
    @(negedge clk); bist_en = 1; bist_we = 1;
    for (int a = 0; a < 256; a++) begin
      bist_addr = 8'(a); bist_wdata = {4'(a), 32'(a * 7919)}; @(negedge clk);
    end
    bist_we = 0;
    for (int a = 0; a < 256; a++) begin
      bist_addr = 8'(a); @(negedge clk);
      check(bist_rdata == {4'(a), 32'(a * 7919)}, "bist read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
