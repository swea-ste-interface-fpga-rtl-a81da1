// tb_stetestpulse: runs the STE test pulser through a whole ramp at full
// size with a model of the DAC controller that answers each request 37 us
// later. Checks: nothing before TESTCYCLECLK; each tick requests the next
// value; the 16 us active-low pulse follows the DAC write and PDACLD comes at
// its rising edge; pulse spacings are 512/512/426 us; 65535 pulses per ramp
// (about 31.7 s) ending with a zero write and silence; DACWRON closed 40 us
// before to 88 us after each tick; low-resolution values have the lower 13
// bits clear; disabling mid-ramp writes zero.
module tb_stetestpulse;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, afepwr = 1'b1, enbstetp = 1'b1, tplrmode = 1'b0, testcycleclk = 1'b0;
  logic [10:0] lowcnt = '0;
  logic pwrdn = 1'b0, pdacrq, pdacld, testpulse_n, dacwron, ramping;
  logic [15:0] pdat;
  int checks = 0, failures = 0;
  stetestpulse dut (.clk1m, .rst, .afepwr, .enbstetp, .tplrmode, .testcycleclk, .lowcnt,
    .pwrdn, .pdacrq, .pdat, .pdacld, .testpulse_n, .dacwron, .ramping);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint t = 0;
  always @(posedge clk1m) begin
    t <= t + 1;
    lowcnt <= (lowcnt == 11'd1449) ? 11'd0 : lowcnt + 11'd1;
  end
  // DAC controller model
  int rq_age = 0;
  always @(posedge clk1m) begin
    pwrdn <= 1'b0;
    if (pdacrq && !pwrdn) begin
      rq_age <= rq_age + 1;
      if (rq_age == 36) begin pwrdn <= 1'b1; rq_age <= 0; end
    end else rq_age <= 0;
  end

  int npulse = 0, nzero = 0, low_len = 0, nld_bad = 0;
  longint last_fall = -1, t_rq = -1;
  logic [15:0] last_val = '0;
  bit expect_ld = 0, check_spacing = 1;
  always @(posedge clk1m) if (!rst) begin
    if (pdacrq && t_rq < 0) t_rq = t;
    if (!pdacrq) t_rq = -1;
    if (!testpulse_n) low_len++;
    if (!testpulse_n && low_len == 1) begin
      npulse++;
      if (last_fall >= 0 && check_spacing && npulse < 40)
        check(t - last_fall == 512 || t - last_fall == 426 || t - last_fall == 450,
              $sformatf("pulse spacing %0d", t - last_fall));
      last_fall = t;
    end
    if (testpulse_n && low_len != 0) begin
      if (npulse < 200) check(low_len == 16, $sformatf("pulse width %0d", low_len));
      low_len = 0;
      expect_ld = 1;
    end else if (expect_ld) begin
      expect_ld = 0;
    end
    if (pdacld && testpulse_n && low_len == 0 && !expect_ld && pdat != 0) nld_bad++;
    if (pdacrq && t_rq == t && pdat != 0) begin
      if (!tplrmode && npulse < 300) check(pdat == last_val + 16'd1, "next value requested");
      last_val = pdat;
    end
    if (pdacrq && t_rq == t && pdat == 0) nzero++;
    if (enbstetp && (lowcnt == 11'd1420 || lowcnt == 11'd80 || lowcnt == 11'd500 || lowcnt == 11'd1000))
      check(!dacwron, "command window closed near a tick");
    if (enbstetp && (lowcnt == 11'd300 || lowcnt == 11'd800 || lowcnt == 11'd1300))
      check(dacwron, "command window open between ticks");
    if (tplrmode && pdacrq) check(pdat[12:0] == 0, "low resolution values");
  end

  task automatic tcc();
    @(negedge clk1m); testcycleclk = 1; @(negedge clk1m); testcycleclk = 0;
  endtask

  initial begin
    longint t0;
    repeat (2) @(posedge clk1m); rst = 0;
    repeat (3000) @(posedge clk1m);
    check(npulse == 0 && !ramping, "idle before TESTCYCLECLK");
    tcc(); t0 = t;
    wait (!ramping);
    repeat (200) @(posedge clk1m);
    check(npulse == 65535, $sformatf("65535 pulses per ramp, got %0d", npulse));
    check(t - t0 > 31_000_000 && t - t0 < 32_500_000, $sformatf("ramp about 32 s: %0d us", t - t0));
    check(nzero == 1, "zero written at the end of the ramp");
    check(nld_bad == 0, "loads only at pulse ends and after zero writes");
    npulse = 0; repeat (5000) @(posedge clk1m);
    check(npulse == 0, "pulses stop after the ramp");
    // low resolution mode, then disable mid-ramp
    tplrmode = 1; last_val = 0; check_spacing = 0; tcc();
    repeat (3_000_000) @(posedge clk1m);
    check(npulse > 5000, "pulsing in low resolution mode");
    nzero = 0; enbstetp = 0;
    repeat (200) @(posedge clk1m);
    check(nzero == 1 && !ramping, "disable writes zero and stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40_000_000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
