// ad5544_shift: serial loader for one AD5544 quad 16-bit DAC input word.
// The word is NBITS (18) bits: the 2-bit DAC address followed by the 16-bit
// DAC value, sent MSB first. Each bit takes two CLK1M cycles (SCLK low with
// the new data, then SCLK high, on which the DAC samples), so the serial clock
// runs at 500 kHz and a word takes 36 us, the shift time the SSF uses for all
// three of its DACs. CS_N is low for the whole word. The 2-address/16-data
// layout is the AD5544's; the 500 kHz rate is the documented one.
//
// Interface: pulse start (ignored while busy) with word valid; busy is high
// from the next cycle for 2*NBITS cycles; done pulses in the cycle after the
// last SCLK high phase, when CS_N has returned high.
module ad5544_shift
  import ssf_pkg::*;
#(
  parameter int unsigned NBITS = 18
) (
  input  logic             clk1m,
  input  logic             rst,
  input  logic             start,
  input  logic [NBITS-1:0] word,
  output dac_ser_t         ser,
  output logic             busy,
  output logic             done
);
  logic [NBITS-1:0] sh;
  logic [5:0]       nbit;
  logic             phase;

  always_ff @(posedge clk1m) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; sh <= '0; nbit <= '0; phase <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; sh <= word; nbit <= '0; phase <= 1'b0;
        end
      end else if (!phase) begin
        phase <= 1'b1;
      end else begin
        phase <= 1'b0;
        sh    <= {sh[NBITS-2:0], 1'b0};
        if (32'(nbit) == NBITS - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          nbit <= nbit + 6'd1;
        end
      end
    end
  end

  assign ser.sdat = busy ? sh[NBITS-1] : 1'b0;
  assign ser.sclk = busy & phase;
  assign ser.cs_n = ~busy;

endmodule
