// asd_chip_model: behavioural model of the control chain of one ASD chip,
// for testbenches only. BITS shift cells shift on the rising edge of
// asd_clk (din enters at cell 0, dout is the last cell); asd_load copies
// them into the shadow cells that hold the settings; asd_rst clears both.
// The register length of the real chip is not modelled; BITS is a choice.
module asd_chip_model #(
  parameter int BITS = 20
) (
  input  logic            asd_clk,
  input  logic            asd_load,
  input  logic            asd_rst,
  input  logic            din,
  output logic            dout,
  output logic [BITS-1:0] shadow
);
  logic [BITS-1:0] sh = '0;
  always @(posedge asd_clk or posedge asd_rst)
    if (asd_rst) sh <= '0;
    else         sh <= {sh[BITS-2:0], din};
  always @(posedge asd_load or posedge asd_rst)
    if (asd_rst) shadow <= '0;
    else         shadow <= sh;
  assign dout = sh[BITS-1];
endmodule
