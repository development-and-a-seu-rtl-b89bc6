// tb_bist_ctrl: runs the march test over a 256 x 36 memory (and over an
// 8 x 12 one) in both patterns and compares the final signature with one
// computed in the bench from the march description; checks the run length
// (13 accesses per word), that a clean memory passes, and that a bit flipped
// while the test is stopped with all words at "1" changes the signature and
// sets fail, as in an upset test.
module tb_bist_ctrl;
  logic clk = 0, rst_n = 0, start = 0, resume = 0, pattern = 0;
  logic [2:0] stop_elem = 3'd7;
  logic [7:0] last_addr = 8'd255;
  logic [35:0] data_mask = '1;
  logic mem_en, mem_we;
  logic [7:0] mem_addr;
  logic [35:0] mem_wdata, mem_rdata, signature;
  logic busy, done, fail, paused;
  logic [2:0] elem;
  logic [35:0] mem [256];
  int checks = 0, failures = 0;

  bist_ctrl dut (.clk, .rst_n, .start, .resume, .pattern, .stop_elem, .last_addr,
    .data_mask, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .busy, .done,
    .fail, .paused, .elem, .signature);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [35:0] bgw(int a, bit pat, bit one, logic [35:0] m);
    logic [35:0] b;
    b = pat ? ((a % 2) ? 36'h5_5555_5555 : 36'hA_AAAA_AAAA) : '0;
    return (one ? ~b : b) & m;
  endfunction

  function automatic logic [35:0] misr(logic [35:0] s, logic [35:0] d);
    return {s[34:0], 1'b0} ^ (s[35] ? 36'h800 | 36'h1 : 36'h0) ^ d;
  endfunction

  // reference: the march over a fault-free memory, optional flipped bit
  // (address fa, bit fb) applied after element 1
  function automatic logic [35:0] ref_sig(int n, bit pat, logic [35:0] m, int fa, int fb);
    logic [35:0] s, v [256];
    s = '0;
    for (int a = 0; a < n; a++) v[a] = bgw(a, pat, 0, m);
    for (int e = 1; e <= 4; e++) begin
      bit first;
      first = (e == 1 || e == 3) ? 0 : 1;   // value read first
      if (e == 2 && fa >= 0) v[fa][fb] = ~v[fa][fb];
      for (int k = 0; k < n; k++) begin
        int a;
        a = (e >= 3) ? n - 1 - k : k;
        s = misr(s, v[a]);                   // r(first)
        v[a] = bgw(a, pat, !first, m);       // w(!first)
        s = misr(s, v[a]);                   // r(!first)
      end
    end
    return s;
  endfunction

  task automatic run(int n, bit pat, logic [35:0] m, bit upset);
    int cycles;
    logic [35:0] clean;
    int fa, fb;
    fa = $urandom_range(0, n - 1);
    fb = $urandom_range(0, 35);
    while (!m[fb]) fb = $urandom_range(0, 35);
    @(negedge clk);
    last_addr = 8'(n - 1); pattern = pat; data_mask = m;
    stop_elem = upset ? 3'd2 : 3'd7;
    start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && !paused) begin @(negedge clk); cycles++; end
    if (upset) begin
      check(paused && elem == 3'd2, "stopped before element 2");
      for (int a = 0; a < n; a++) check(mem[a] == bgw(a, pat, 1, m), "all words at 1");
      mem[fa][fb] = ~mem[fa][fb];           // upset during the pause
      resume = 1; @(negedge clk); resume = 0;
      while (!done) @(negedge clk);
      check(fail, "upset not flagged");
      clean = ref_sig(n, pat, m, -1, 0);
      check(signature == ref_sig(n, pat, m, fa, fb), "signature with upset");
      check(signature != clean, "upset left signature unchanged");
    end else begin
      // cycles counts negedges from the one right after the edge that took start
      check(cycles - 1 == 13 * n + 1, $sformatf("run took %0d clocks, expected %0d", cycles - 1, 13 * n + 1));
      check(!fail, "clean memory failed");
      check(signature == ref_sig(n, pat, m, -1, 0),
            $sformatf("signature %h expected %h", signature, ref_sig(n, pat, m, -1, 0)));
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      run(256, p[0], '1, 0);
      run(8, p[0], 36'hFFF, 0);
      run(256, p[0], '1, 1);
      run(64, p[0], 36'hFFFF_FFFF, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
