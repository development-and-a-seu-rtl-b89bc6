// jtag_tap: JTAG test access port of the chip.
//
// A standard IEEE 1149.1 TAP state machine with a 4-bit instruction
// register. TCK, TMS and TDI are sampled with the 80 MHz core clock through
// two flip-flops, and the TAP acts on the detected rising edge of TCK
// (capture, shift, update) and changes TDO on the falling edge. This keeps
// the whole chip in one clock domain; it needs TCK well below the core
// clock (10 MHz or less). Data registers, selected by the instruction:
//   4'h1 IDCODE   32 bits, captured from the IDCODE parameter
//   4'h8 CONTROL  180 bits: captures the 15 control registers, and on
//                 Update-DR writes the shifted-in value to them (cr_load)
//   4'h9 STATUS   72 bits: captures the 6 status registers
//   4'hA ASD      the external ASD chain: each shift pulses asd_shift with
//                 the TDI bit, TDO is asd_in, Update-DR pulses asd_update
//   4'hB BIST     48 bits: captures {bist_status[11:0], bist_signature};
//                 Update-DR pulses bist_cmd_valid with the low 12 bits
//   4'hC DEBUG    64 bits: captures internal registers of the core
//                 (debug_flat, see the top level for the map)
//   4'h0 EXTEST   the boundary-scan register (outside this block, reached
//                 through bs_capture/bs_shift/bs_bit/bs_update and bs_tdo)
//                 with the output pins driven from it (bs_extest)
//   4'h2 SAMPLE   the same register, pins left to the core (SAMPLE/PRELOAD)
//   4'hF and all others: BYPASS (1 bit)
// Register 0 bit is shifted out first. The document names JTAG boundary
// scan of the pins, of internal registers for debugging and access to
// control and status registers, the BIST and the ASD chain; the instruction
// codes, register lengths and the oversampled TCK are this design's own.
module jtag_tap
  import amt_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h0A4D_2001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  input  logic [NUM_CR*REG_BITS-1:0] cr_flat,
  output logic        cr_load,
  output logic [NUM_CR*REG_BITS-1:0] cr_data,
  input  logic [NUM_SR*REG_BITS-1:0] sr_flat,
  output logic        asd_sel,
  output logic        asd_shift,
  output logic        asd_bit,
  output logic        asd_update,
  input  logic        asd_in,
  input  logic [35:0] bist_signature,
  input  logic [11:0] bist_status,
  input  logic [63:0] debug_flat,
  output logic        bist_cmd_valid,
  output logic [11:0] bist_cmd,
  // boundary-scan register
  output logic        bs_extest,
  output logic        bs_capture,
  output logic        bs_shift,
  output logic        bs_bit,
  output logic        bs_update,
  input  logic        bs_tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [3:0] I_IDCODE = 4'h1, I_CONTROL = 4'h8, I_STATUS = 4'h9,
                         I_ASD = 4'hA, I_BIST = 4'hB, I_EXTEST = 4'h0,
                         I_SAMPLE = 4'h2, I_DEBUG = 4'hC;
  localparam int unsigned DRW = NUM_CR * REG_BITS;   // longest register

  tap_e        st;
  logic [3:0]  ir, ir_sh;
  logic [DRW-1:0] dr;
  logic [2:0]  tck_s;
  logic [1:0]  tms_s, tdi_s;
  logic        rise, fall;
  int unsigned len;

  assign rise = tck_s[1] & ~tck_s[2];
  assign fall = ~tck_s[1] & tck_s[2];

  always_comb begin
    case (ir)
      I_IDCODE:  len = 32;
      I_CONTROL: len = DRW;
      I_STATUS:  len = NUM_SR * REG_BITS;
      I_BIST:    len = 48;
      I_DEBUG:   len = 64;
      default:   len = 1;
    endcase
  end

  function automatic tap_e next_state(input tap_e s, input logic m);
    case (s)
      TLR:    return m ? TLR : RTI;
      RTI:    return m ? SEL_DR : RTI;
      SEL_DR: return m ? SEL_IR : CAP_DR;
      CAP_DR: return m ? EX1_DR : SH_DR;
      SH_DR:  return m ? EX1_DR : SH_DR;
      EX1_DR: return m ? UPD_DR : PA_DR;
      PA_DR:  return m ? EX2_DR : PA_DR;
      EX2_DR: return m ? UPD_DR : SH_DR;
      UPD_DR: return m ? SEL_DR : RTI;
      SEL_IR: return m ? TLR : CAP_IR;
      CAP_IR: return m ? EX1_IR : SH_IR;
      SH_IR:  return m ? EX1_IR : SH_IR;
      EX1_IR: return m ? UPD_IR : PA_IR;
      PA_IR:  return m ? EX2_IR : PA_IR;
      EX2_IR: return m ? UPD_IR : SH_IR;
      default: return m ? SEL_DR : RTI;   // UPD_IR
    endcase
  endfunction

  logic bs_sel;
  assign asd_sel   = (ir == I_ASD);
  assign bs_sel    = (ir == I_EXTEST) || (ir == I_SAMPLE);
  assign bs_extest = (ir == I_EXTEST);
  assign cr_data = dr;
  assign bist_cmd = dr[11:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s <= '0; tms_s <= '1; tdi_s <= '0;
    end else begin
      tck_s <= {tck_s[1:0], tck};
      tms_s <= {tms_s[0], tms};
      tdi_s <= {tdi_s[0], tdi};
    end
  end

  // data register after one shift: TDI enters at the selected length
  logic [DRW-1:0] dr_shifted;
  always_comb begin
    dr_shifted = dr >> 1;
    dr_shifted[len-1] = tdi_s[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= TLR; ir <= I_IDCODE; ir_sh <= '0; dr <= '0; tdo <= 1'b0;
      cr_load <= 1'b0; asd_shift <= 1'b0; asd_bit <= 1'b0; asd_update <= 1'b0;
      bist_cmd_valid <= 1'b0;
      bs_capture <= 1'b0; bs_shift <= 1'b0; bs_bit <= 1'b0; bs_update <= 1'b0;
    end else if (!trst_n) begin
      st <= TLR; ir <= I_IDCODE;
      cr_load <= 1'b0; asd_shift <= 1'b0; asd_update <= 1'b0; bist_cmd_valid <= 1'b0;
      bs_capture <= 1'b0; bs_shift <= 1'b0; bs_update <= 1'b0;
    end else begin
      cr_load <= 1'b0; asd_shift <= 1'b0; asd_update <= 1'b0; bist_cmd_valid <= 1'b0;
      bs_capture <= 1'b0; bs_shift <= 1'b0; bs_update <= 1'b0;
      if (rise) begin
        case (st)
          TLR:    ir <= I_IDCODE;
          CAP_IR: ir_sh <= 4'b0001;
          SH_IR:  ir_sh <= {tdi_s[1], ir_sh[3:1]};
          UPD_IR: ir <= ir_sh;
          CAP_DR: begin
            bs_capture <= bs_sel;
            dr <= '0;
            case (ir)
              I_IDCODE:  dr[31:0] <= IDCODE;
              I_CONTROL: dr <= cr_flat;
              I_STATUS:  dr[NUM_SR*REG_BITS-1:0] <= sr_flat;
              I_BIST:    dr[47:0] <= {bist_status, bist_signature};
              I_DEBUG:   dr[63:0] <= debug_flat;
              default:   dr <= '0;
            endcase
          end
          SH_DR: begin
            if (ir == I_ASD) begin
              asd_shift <= 1'b1;
              asd_bit   <= tdi_s[1];
            end else if (bs_sel) begin
              bs_shift <= 1'b1;
              bs_bit   <= tdi_s[1];
            end else begin
              dr <= dr_shifted;
            end
          end
          UPD_DR: begin
            cr_load        <= (ir == I_CONTROL);
            asd_update     <= (ir == I_ASD);
            bist_cmd_valid <= (ir == I_BIST);
            bs_update      <= bs_sel;
          end
          default: ;
        endcase
        st <= next_state(st, tms_s[1]);
      end
      if (fall) begin
        if (st == SH_IR)      tdo <= ir_sh[0];
        else if (st == SH_DR) tdo <= (ir == I_ASD) ? asd_in : bs_sel ? bs_tdo : dr[0];
      end
    end
  end
endmodule
