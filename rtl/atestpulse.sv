// atestpulse: SWEA/STE anode test pulser. Produces a 1 us active-high pulse
// every SAMPLECNT+1 microseconds, so the rate steps up at every SAMPLECLK as
// SAMPLECNT counts down (about 2.96 kHz at 337 right after CYCLECLK, 500 kHz
// during the GAP where SAMPLECNT is 1). Held in reset, output low, unless
// SWEA, the SWEA test pulser and the analog power are all on. The period
// SAMPLECNT+1 is this design's reading of "CLK1M divided by SAMPLECNT" that
// also gives the stated 500 kHz maximum.
module atestpulse (
  input  logic       clk1m,
  input  logic       rst,
  input  logic       afepwr,
  input  logic       enbswea,
  input  logic       enbsweatp,
  input  logic [8:0] samplecnt,
  output logic       testpulse
);
  logic [8:0] cnt;
  always_ff @(posedge clk1m) begin
    if (rst || !afepwr || !enbswea || !enbsweatp) begin
      cnt <= '0; testpulse <= 1'b0;
    end else if (cnt >= samplecnt) begin
      cnt <= '0; testpulse <= 1'b1;
    end else begin
      cnt <= cnt + 9'd1; testpulse <= 1'b0;
    end
  end
endmodule
