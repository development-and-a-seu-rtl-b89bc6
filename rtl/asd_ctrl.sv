// asd_ctrl: drives the control chain of the ASD (amplifier/shaper/
// discriminator) chips from the JTAG port.
//
// The ASD setting registers (shaping time, threshold DAC and so on) are a
// chain of shift cells with shadow cells behind them, run through the three
// ASD chips from asd_out back to asd_in. For each bit shifted through the
// JTAG ASD instruction (shift pulse with the TDI bit), this block puts the
// bit on asd_out, waits SETUP clocks, and gives asd_clk a high pulse of
// HIGH clocks, on whose rising edge the ASD chain shifts. Update-DR (update
// pulse) raises asd_load for LOAD clocks, which copies the shift cells into
// the shadow cells. asd_rst (the fifth line) follows a control register
// bit. Five lines between the chips and a protocol like a JTAG boundary
// scan cell follow the document; line names, pulse timing and the reset
// line are this design's own. Timing: a shift takes SETUP+HIGH+2 clocks;
// one shift and one update request arriving while a shift is under way are
// held and carried out after it, so requests must be at least that far
// apart (the TAP gives one per TCK period, 16 clocks or more).
module asd_ctrl #(
  parameter int unsigned SETUP = 2,
  parameter int unsigned HIGH  = 3,
  parameter int unsigned LOAD  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic shift_bit,
  input  logic update,
  input  logic reset_req,
  output logic asd_clk,
  output logic asd_out,
  output logic asd_load,
  output logic asd_rst,
  output logic busy
);
  typedef enum logic [1:0] {A_IDLE, A_SETUP, A_HIGH, A_LOAD} st_e;
  st_e        st;
  logic [3:0] cnt;
  logic       pend_shift, pend_bit, pend_upd;

  assign busy = (st != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; cnt <= '0; asd_clk <= 1'b0; asd_out <= 1'b0;
      asd_load <= 1'b0; asd_rst <= 1'b0;
      pend_shift <= 1'b0; pend_bit <= 1'b0; pend_upd <= 1'b0;
    end else begin
      asd_rst <= reset_req;
      if (shift)  begin pend_shift <= 1'b1; pend_bit <= shift_bit; end
      if (update) pend_upd <= 1'b1;
      case (st)
        A_IDLE: begin
          if (pend_shift) begin
            asd_out    <= pend_bit;
            pend_shift <= shift;          // a new request in this cycle stays
            cnt        <= 4'(SETUP - 1);
            st         <= A_SETUP;
          end else if (pend_upd) begin
            asd_load <= 1'b1;
            pend_upd <= update;
            cnt      <= 4'(LOAD - 1);
            st       <= A_LOAD;
          end
        end
        A_SETUP: if (cnt == 0) begin
          asd_clk <= 1'b1; cnt <= 4'(HIGH - 1); st <= A_HIGH;
        end else cnt <= cnt - 1'b1;
        A_HIGH: if (cnt == 0) begin
          asd_clk <= 1'b0; st <= A_IDLE;
        end else cnt <= cnt - 1'b1;
        A_LOAD: if (cnt == 0) begin
          asd_load <= 1'b0; st <= A_IDLE;
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end
endmodule
