// pll_check_counter: production test of the PLL frequency.
//
// Counts cycles of the 80 MHz PLL clock (clk) during a fixed gate of GATE
// cycles of the 40 MHz reference clock (clk40). A locked PLL gives close to
// 2*GATE; a PLL that slipped or runs at a wrong frequency gives another
// value. The start request comes from the clk domain and is brought into the
// clk40 domain through two flip-flops; the gate goes back the same way, so
// the count may differ from 2*GATE by a few counts of synchroniser delay
// mismatch. The result and done stay until the next start.
// The document describes an internal counter of the 80 MHz PLL clock read
// after a fixed time; gate length, widths and handshake are this design's
// own. Timing: done rises about 2*GATE+8 clk cycles after start.
module pll_check_counter #(
  parameter int unsigned GATE = 4096,
  parameter int unsigned CW   = 16
) (
  input  logic          clk,      // 80 MHz PLL clock, core domain
  input  logic          clk40,    // 40 MHz reference clock
  input  logic          rst_n,
  input  logic          start,    // pulse, clk domain
  output logic [CW-1:0] count,
  output logic          done
);
  // clk domain: request level, held until the gate has been seen to close
  logic       req;
  logic [1:0] gate_s;
  logic       gate_seen;
  // clk40 domain
  logic [1:0] req_s;
  logic       gate, req_d;
  logic [$clog2(GATE+1)-1:0] gcnt;

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      req_s <= '0; gate <= 1'b0; req_d <= 1'b0; gcnt <= '0;
    end else begin
      req_s <= {req_s[0], req};
      req_d <= req_s[1];
      if (req_s[1] && !req_d) begin
        gate <= 1'b1; gcnt <= '0;
      end else if (gate) begin
        if (gcnt == ($clog2(GATE+1))'(GATE - 1)) gate <= 1'b0;
        gcnt <= gcnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req <= 1'b0; gate_s <= '0; gate_seen <= 1'b0; count <= '0; done <= 1'b0;
    end else begin
      gate_s <= {gate_s[0], gate};
      if (start) begin
        req <= 1'b1; gate_seen <= 1'b0; count <= '0; done <= 1'b0;
      end else if (req) begin
        if (gate_s[1]) begin
          gate_seen <= 1'b1;
          count     <= count + 1'b1;
        end else if (gate_seen) begin
          req  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
