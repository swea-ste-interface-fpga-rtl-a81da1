// mcpdac: MCP and STE Bias Supply DAC load control. An MCP DAC Load (E1) or
// STE Bias Supply DAC Load (ED) command strobe turns the 8-bit command value
// into the DAC word {D[7:0], 8'h00} and raises a request to the shared-DAC
// controller (mpdacwr) with the DAC channel (3 = MCP, 2 = STE bias). The
// request stays up until the controller acknowledges the shift; a load
// command that arrives while a request is outstanding is ignored, as the
// design specifies for back-to-back loads. Held in reset while the analog
// power is off.
module mcpdac
  import ssf_pkg::*;
(
  input  logic        clk1m,
  input  logic        rst,
  input  logic        afepwr,
  input  logic [15:0] cmd_data,
  input  logic        mcpcmdlat,
  input  logic        stebiascmdlat,
  input  logic        mwrdn,        // controller finished shifting our word
  output logic        mcpdacrq,
  output logic [15:0] mcpdat,
  output logic [1:0]  dacsel
);
  always_ff @(posedge clk1m) begin
    if (rst || !afepwr) begin
      mcpdacrq <= 1'b0; mcpdat <= '0; dacsel <= DAC_MCP;
    end else if (mcpdacrq) begin
      if (mwrdn) mcpdacrq <= 1'b0;
    end else if (mcpcmdlat || stebiascmdlat) begin
      mcpdacrq <= 1'b1;
      mcpdat   <= {cmd_data[7:0], 8'h00};
      dacsel   <= mcpcmdlat ? DAC_MCP : DAC_STEBIAS;
    end
  end
endmodule
