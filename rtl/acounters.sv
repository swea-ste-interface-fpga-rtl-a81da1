// acounters: SWEA anode counters. NCH (16) counters of W (14) bits count the
// rising edges of the anode pulses. The pulses (250-300 ns) are shorter than
// a CLK1M period, so each one clocks its own counter directly. At every
// SAMPLECLK the counts are copied into holding registers (on CLK1M) and one
// cycle later the counters are cleared by an asynchronous clear pulse; pulses
// in that 1-2 us window may be lost. The counters wrap (no saturation is
// specified). The module is held in reset while SWEA is disabled or the
// analog power is off; the counters are given one clear pulse as it leaves
// reset, so whatever they counted meanwhile (or held at power-up) is dropped.
// Structure as described; the clear timing is this design's.
//
// Timing: LATCNT is valid from the cycle after SAMPLECLK until the next one.
module acounters #(
  parameter int unsigned NCH = 16,
  parameter int unsigned W   = 14
) (
  input  logic                    clk1m,
  input  logic                    rst,
  input  logic                    enbswea,
  input  logic                    afepwr,
  input  logic                    sampleclk,
  input  logic [NCH-1:0]          apulse,
  output logic [NCH-1:0][W-1:0]   latcnt,
  output logic                    latched    // LATCNT updated (one cycle)
);
  logic            srst, srst_q, clr;
  logic [NCH-1:0][W-1:0] cnt;
  assign srst = rst | ~enbswea | ~afepwr;

  always_ff @(posedge clk1m) begin
    if (srst) begin
      clr <= 1'b0; srst_q <= 1'b1; latched <= 1'b0; latcnt <= '0;
    end else begin
      clr     <= sampleclk | srst_q;   // also one clear on leaving reset
      srst_q  <= 1'b0;
      latched <= sampleclk;
      if (sampleclk) latcnt <= cnt;
    end
  end

  for (genvar i = 0; i < NCH; i++) begin : g_cnt
    logic [W-1:0] c;
    always_ff @(posedge apulse[i] or posedge clr) begin
      if (clr) c <= '0;
      else         c <= c + 1'b1;
    end
    assign cnt[i] = c;
  end
endmodule
