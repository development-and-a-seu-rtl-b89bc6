// serial_tx: serial output of the read-out words.
//
// Each 32-bit word taken from the read-out FIFO is sent as a start bit '1',
// the 32 data bits, most significant first, and a stop bit '0'; between
// words the data line stays '0'. The bit period is 1, 2, 4 or 8 clocks of the 80 MHz
// core clock (speed = 0..3), giving 80, 40, 20 or 10 Mbit/s. Two line
// codes are selectable:
//   ds_mode=1  DS protocol: the strobe line toggles in every bit period in
//              which the data line does not, so data XOR strobe toggles once
//              per bit and the receiver recovers the clock from it. While
//              idle neither line moves.
//   ds_mode=0  data and clock: sclk is low in the first half and high in
//              the second half of each bit period (sample on its rising
//              edge) and runs continuously. A bit period of one clock cannot
//              carry a clock, so speed 0 is sent at 40 Mbit/s in this mode.
// Following the document: DS protocol or plain data-clock output, 10 to 80
// Mbit/s. This design's own: framing with a start bit, bit order, speed
// code. Timing: a word is accepted (word_pop) at the end of a bit period
// in which the sender is idle or sending a stop bit, while word_valid is
// high, so frames follow back to back (34 bit periods each); its start bit
// appears on the next clock edge and lasts one bit period.
module serial_tx #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         ds_mode,
  input  logic [1:0]   speed,
  input  logic         word_valid,
  input  logic [W-1:0] word,
  output logic         word_pop,
  output logic         sdata,
  output logic         sstrobe,
  output logic         busy
);
  logic [W+1:0] sh;        // bits still to send after the current one
  logic [5:0]   nbits;     // bits left including the current one
  logic [2:0]   div;       // clock count inside the bit period
  logic [2:0]   div_max, ndiv;
  logic         ds_strobe, dc_clk;
  logic         bit_end;

  always_comb begin
    case (speed)
      2'd0:    div_max = ds_mode ? 3'd0 : 3'd1;
      2'd1:    div_max = 3'd1;
      2'd2:    div_max = 3'd3;
      default: div_max = 3'd7;
    endcase
  end

  assign bit_end  = (div >= div_max);
  assign ndiv     = bit_end ? 3'd0 : div + 1'b1;
  assign word_pop = enable && word_valid && (nbits <= 6'd1) && bit_end;
  assign busy     = (nbits != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nbits <= '0; div <= '0; sdata <= 1'b0; ds_strobe <= 1'b0;
      dc_clk <= 1'b0;
    end else begin
      div    <= ndiv;
      dc_clk <= (div_max != 0) && (ndiv > (div_max >> 1));
      if (word_pop) begin
        // start bit; the line was at '0' (stop bit or idle), so it changes
        sh    <= {word, 2'b00};
        nbits <= 6'(W + 2);
        sdata <= 1'b1;
      end else if (bit_end && nbits != 0) begin
        nbits <= nbits - 1'b1;
        if (nbits != 1) begin
          // next data bit, or the stop bit '0' after the last one
          sdata <= sh[W+1];
          sh    <= {sh[W:0], 1'b0};
          if (sh[W+1] == sdata) ds_strobe <= ~ds_strobe;
        end
      end
    end
  end

  assign sstrobe = ds_mode ? ds_strobe : dc_clk;
endmodule
