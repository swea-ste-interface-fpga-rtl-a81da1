// latchupprot: latch-up protection of the analog front end power (AFEPWR).
// AFEPWR follows the commanded forces: AFEPWROFF clears it, AFEPWRON (without
// AFEPWROFF) sets it, and with neither it keeps its state. An overcurrent
// report AFESHDN clears it asynchronously, without needing the clock, unless
// AFEPWRON is forcing it on; the clear is latched, so power stays off after
// AFESHDN goes away until AFEPWRON is commanded. Setting is synchronous to
// CLK1M. Reset clears AFEPWR. This is the documented truth table exactly.
module latchupprot (
  input  logic clk1m,
  input  logic rst,
  input  logic afeshdn,
  input  logic afepwron,
  input  logic afepwroff,
  output logic afepwr
);
  logic aclr;
  assign aclr = rst | (afeshdn & ~afepwron);

  always_ff @(posedge clk1m or posedge aclr) begin
    if (aclr)                        afepwr <= 1'b0;
    else if (afepwroff)              afepwr <= 1'b0;
    else if (afepwron)               afepwr <= 1'b1;
  end
endmodule
