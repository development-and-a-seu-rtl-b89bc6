// boundary_scan: JTAG boundary-scan register over the core's logic pins.
//
// One scan cell per pin: NI cells observe input pins, then NO cells sit
// between the core's outputs and the output pins. On capture every cell
// takes its pin's value (input pins as they arrive, output pins as the core
// drives them); on shift the chain moves one place towards tdo (cell 0
// first out, tdi enters cell NI+NO-1); on update the shifted values are
// copied into the update latches. With extest set, the output pins are
// driven from the update latches of their cells instead of by the core, so
// the board wiring can be tested; otherwise the pins follow the core and the
// register only samples (SAMPLE/PRELOAD). Input pins always reach the core
// directly, so this design has no INTEST.
//
// Following the document: a JTAG boundary-scan circuit that scans the I/O
// pins. This design's own: the cell order (set by the top level), the
// SAMPLE/EXTEST pair only, and control by one-clock capture/shift/update
// pulses from the TAP, which runs in the core clock domain.
// Timing: capture, shift and update each act on the clock edge that sees
// their pulse; tdo is cell 0 and changes after a capture or shift.
module boundary_scan #(
  parameter int unsigned NI = 50,
  parameter int unsigned NO = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NI-1:0] pin_in,     // input pins, observed
  input  logic [NO-1:0] core_out,   // values the core drives
  output logic [NO-1:0] pin_out,    // output pins
  input  logic          extest,     // drive outputs from the update latches
  input  logic          capture,
  input  logic          shift,
  input  logic          update,
  input  logic          tdi,
  output logic          tdo
);
  localparam int unsigned N = NI + NO;

  logic [N-1:0]  sr;     // shift stage
  logic [NO-1:0] upd;    // update latches of the output cells

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      upd <= '0;
    end else begin
      if (capture)     sr  <= {core_out, pin_in};
      else if (shift)  sr  <= {tdi, sr[N-1:1]};
      if (update)      upd <= sr[N-1:NI];
    end
  end

  assign tdo     = sr[0];
  assign pin_out = extest ? upd : core_out;
endmodule
