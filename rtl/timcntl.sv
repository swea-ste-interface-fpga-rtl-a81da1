// timcntl: timing control of the SSF. From the 1 MHz spacecraft clock, the
// 1 s tick TK1S and seconds bit 0 it derives every strobe the subsystems use.
//
// A 2 s cycle starts at CYCLECLK (a TK1S with SECS[0]=0). A microsecond
// counter LOWCNT wraps every STEP_US (1450) clocks; its wrap is STEPCLK for
// step indices 0..NSTEPS (1344 steps of 1.45 ms, step NSTEPS being the start
// of the 51.2 ms GAP, GAPSTART). LOWCNT keeps wrapping during the GAP so the
// STE pulser keeps its rhythm. SAMPLECLK is every SAMPLE_STEPS-th STEPCLK
// (steps 4, 8 .. 1344) and decrements the 9-bit SAMPLECNT, loaded with 337 at
// CYCLECLK and held at 1 during the GAP. SAMCLKINT is a free-running 5.8 ms
// divider restarted by CYCLECLK (344 full intervals plus a 4.8 ms one).
// TK8HZ counts SAMCLKINT in periods of 22 and 21 intervals (127.6 / 121.8 ms),
// 16 per cycle, the last period (126.6 ms) ending at CYCLECLK. TKHS (every 4th
// TK8HZ) is the half-second tick, TESTCYCLECLK every 5th CYCLECLK, HSKPMD
// toggles at each CYCLECLK while ENBSWEA is set. SYN100K/SYN100KN is CLK1M/10,
// enabled (syn_oe) only while AFEPWR is on and the synch-disable bit is clear.
// The step, sample and tick periods are the documented ones; how TK8HZ and the
// half-second tick are decoded is this design's reading of the stated periods.
//
// Timing: all strobes are single-cycle, high in the cycle in which the
// counters show the new interval (LOWCNT==0, STEPIDX==index). CYCLECLK comes
// one clock after the TK1S that causes it.
module timcntl #(
  parameter int unsigned STEP_US      = 1450,
  parameter int unsigned NSTEPS       = 1344,
  parameter int unsigned SAMPLE_STEPS = 4,
  parameter int unsigned SAMCNT_MAX   = 337,
  parameter int unsigned SAMINT_US    = 5800,
  parameter int unsigned TESTCYC_DIV  = 5
) (
  input  logic        clk1m,
  input  logic        rst,
  input  logic        tk1s,
  input  logic        secs0,
  input  logic        enbswea,
  input  logic        afepwr,
  input  logic        s100kdis,
  output logic        cycleclk,
  output logic        stepclk,
  output logic        gapstart,
  output logic        ingap,       // from GAPSTART until CYCLECLK
  output logic [10:0] lowcnt,      // microseconds inside the current step
  output logic [10:0] stepidx,     // step index, NSTEPS+1 after GAPSTART
  output logic        sampleclk,
  output logic [8:0]  samplecnt,
  output logic        samclkint,
  output logic        tk8hz,
  output logic        tkhs,
  output logic        testcycleclk,
  output logic        hskpmd,
  output logic        syn100k,
  output logic        syn100kn,
  output logic        syn_oe
);
  logic [12:0] samint;
  logic [4:0]  cnt8;
  logic [3:0]  ph8;
  logic [2:0]  cyc5;
  logic [3:0]  div10;
  logic        tk8_run;

  always_ff @(posedge clk1m) begin
    if (rst) cycleclk <= 1'b0;
    else     cycleclk <= tk1s & ~secs0;
  end

  // step and microsecond counters
  always_ff @(posedge clk1m) begin
    if (rst) begin
      lowcnt  <= '0;
      stepidx <= 11'(NSTEPS + 1);
    end else if (tk1s && !secs0) begin
      lowcnt  <= '0;
      stepidx <= '0;
    end else if (32'(lowcnt) == STEP_US - 1) begin
      lowcnt  <= '0;
      if (32'(stepidx) <= NSTEPS) stepidx <= stepidx + 11'd1;
    end else begin
      lowcnt <= lowcnt + 11'd1;
    end
  end

  assign stepclk   = (lowcnt == '0) && (32'(stepidx) <= NSTEPS) && !rst;
  assign gapstart  = stepclk && (32'(stepidx) == NSTEPS);
  assign ingap     = (32'(stepidx) >= NSTEPS);
  assign sampleclk = stepclk && (stepidx != '0) &&
                     (32'(stepidx) % SAMPLE_STEPS == 0);

  always_ff @(posedge clk1m) begin
    if (rst)                                  samplecnt <= 9'(SAMCNT_MAX);
    else if (cycleclk)                        samplecnt <= 9'(SAMCNT_MAX);
    else if (sampleclk && samplecnt > 9'd1)   samplecnt <= samplecnt - 9'd1;
  end

  // free-running sample interval (rate counters), restarted by CYCLECLK
  always_ff @(posedge clk1m) begin
    if (rst)                                 samint <= 13'd1;
    else if (tk1s && !secs0)                 samint <= '0;
    else if (32'(samint) == SAMINT_US - 1)   samint <= '0;
    else                                     samint <= samint + 13'd1;
  end
  assign samclkint = (samint == '0) && !rst;

  // 8 Hz tick: periods of 22 and 21 SAMCLKINT, the 16th ends at CYCLECLK
  always_ff @(posedge clk1m) begin
    if (rst) begin
      cnt8 <= '0; ph8 <= '0; tk8_run <= 1'b0;
    end else if (cycleclk) begin
      cnt8 <= '0; ph8 <= '0; tk8_run <= 1'b1;
    end else if (samclkint && tk8_run) begin
      if (tk8hz) begin
        cnt8 <= '0;
        ph8  <= ph8 + 4'd1;
      end else begin
        cnt8 <= cnt8 + 5'd1;
      end
    end
  end
  assign tk8hz = cycleclk ||
                 (samclkint && tk8_run && ph8 != 4'd15 &&
                  (cnt8 + 5'd1) == (ph8[0] ? 5'd21 : 5'd22));
  // half-second tick: TK8HZ number 0, 4, 8, 12 of the cycle
  assign tkhs  = tk8hz && (cycleclk || ph8[1:0] == 2'd3);

  always_ff @(posedge clk1m) begin
    if (rst)           cyc5 <= '0;
    else if (cycleclk) cyc5 <= (32'(cyc5) == TESTCYC_DIV - 1) ? '0 : cyc5 + 3'd1;
  end
  assign testcycleclk = cycleclk && (cyc5 == '0);

  always_ff @(posedge clk1m) begin
    if (rst || !enbswea) hskpmd <= 1'b0;
    else if (cycleclk)   hskpmd <= ~hskpmd;
  end

  always_ff @(posedge clk1m) begin
    if (rst)                div10 <= '0;
    else if (div10 == 4'd9) div10 <= '0;
    else                    div10 <= div10 + 4'd1;
  end
  assign syn100k  = (div10 < 4'd5);
  assign syn100kn = ~syn100k;
  assign syn_oe   = afepwr & ~s100kdis;

endmodule
