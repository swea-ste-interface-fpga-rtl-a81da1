// tb_timcntl: self-checking testbench of the timing controller at its full
// size. Drives a 1 s tick every 1e6 clocks with alternating seconds bit and
// checks, over six 2 s cycles: 1345 STEPCLKs, 336 SAMPLECLKs, 345 SAMCLKINTs
// and 16 TK8HZ ticks per cycle; the 1450 us step and the GAPSTART position
// (1344 steps after CYCLECLK); SAMPLECNT = 337 after CYCLECLK, 336 after the
// first SAMPLECLK (5.8 ms later) and 1 in the GAP; TK8HZ periods of 22 and
// 21 sample intervals; TESTCYCLECLK every 5th cycle; HSKPMD toggling; and
// the 100 kHz synch period.
module tb_timcntl;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, tk1s = 1'b0, secs0 = 1'b0, enbswea = 1'b1;
  logic cycleclk, stepclk, gapstart, ingap, sampleclk, samclkint, tk8hz, tkhs;
  logic testcycleclk, hskpmd, syn100k, syn100kn, syn_oe;
  logic [10:0] lowcnt, stepidx;
  logic [8:0]  samplecnt;
  int checks = 0, failures = 0;

  timcntl dut (.clk1m, .rst, .tk1s, .secs0, .enbswea, .afepwr(1'b1), .s100kdis(1'b0),
    .cycleclk, .stepclk, .gapstart, .ingap, .lowcnt, .stepidx, .sampleclk, .samplecnt,
    .samclkint, .tk8hz, .tkhs, .testcycleclk, .hskpmd, .syn100k, .syn100kn, .syn_oe);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint t = 0, t_cyc = -1, t_last_step = -1, t_last_tk8 = -1, t_last_sam = -1;
  int n_step, n_samp, n_int, n_tk8, n_cyc = 0, n_test = 0, n_hs;
  bit prev_md;
  int syn_rise_last = -1;

  initial begin
    repeat (3) @(posedge clk1m);
    rst = 1'b0;
  end

  always @(posedge clk1m) begin
    if (!rst) begin
      t <= t + 1;
      tk1s  <= ((t + 1) % 1000000 == 0);
      if ((t + 1) % 1000000 == 0) secs0 <= ((t + 1) / 1000000) % 2 == 0 ? 1'b0 : 1'b1;
    end
  end

  always @(posedge clk1m) if (!rst) begin
    if (cycleclk) begin
      if (t_cyc >= 0) begin
        check(t - t_cyc == 2000000, "cycle length 2 s");
        check(n_step == 1345, $sformatf("1345 STEPCLK per cycle, got %0d", n_step));
        check(n_samp == 336,  $sformatf("336 SAMPLECLK per cycle, got %0d", n_samp));
        check(n_int == 345,   $sformatf("345 SAMCLKINT per cycle, got %0d", n_int));
        check(n_tk8 == 16,    $sformatf("16 TK8HZ per cycle, got %0d", n_tk8));
        check(n_hs == 4,      $sformatf("4 half-second ticks per cycle, got %0d", n_hs));
        check(samplecnt == 9'd1, "SAMPLECNT holds 1 in the GAP");
        check(hskpmd != prev_md || n_cyc == 0, "HSKPMD toggles per cycle");
      end
      prev_md = hskpmd;
      n_cyc++;
      if (testcycleclk) n_test++;
      t_cyc = t; n_step = 0; n_samp = 0; n_int = 0; n_tk8 = 0; n_hs = 0;
      check(stepclk && samclkint && tk8hz, "STEPCLK, SAMCLKINT and TK8HZ coincide with CYCLECLK");
    end
    if (t_cyc >= 0) begin
      if (stepclk) begin
        if (n_step > 0 && n_step <= 1344) check(t - t_last_step == 1450, "step 1450 us");
        t_last_step = t; n_step++;
      end
      if (gapstart) check(t - t_cyc == 1344 * 1450, "GAPSTART 1948.8 ms after CYCLECLK");
      if (sampleclk) begin
        if (n_samp == 0) check(t - t_cyc == 5800, "first SAMPLECLK 5.8 ms after CYCLECLK");
        n_samp++;
      end
      if (samclkint) begin
        if (!cycleclk) check(t - t_last_sam == 5800, "SAMCLKINT 5.8 ms");
        else if (n_cyc > 1) check(t - t_last_sam == 4800, "last SAMCLKINT interval 4.8 ms");
        t_last_sam = t; n_int++;
      end
      if (tk8hz) begin
        if (!cycleclk) check(t - t_last_tk8 == 127600 || t - t_last_tk8 == 121800,
                             "TK8HZ period 127.6 or 121.8 ms");
        else if (n_cyc > 1) check(t - t_last_tk8 == 126600, "TK8HZ period before CYCLECLK 126.6 ms");
        t_last_tk8 = t; n_tk8++;
      end
      if (tkhs) n_hs++;
    end
    if (sampleclk && n_samp == 1 && t_cyc >= 0) ;  // counted above
  end

  // SAMPLECNT values right after CYCLECLK and after the first SAMPLECLK
  always @(posedge clk1m) if (!rst && t_cyc >= 0) begin
    if (t - t_cyc == 1)    check(samplecnt == 9'h151, "SAMPLECNT loaded with 151h");
    if (t - t_cyc == 5801) check(samplecnt == 9'h150, "SAMPLECNT 150h after first SAMPLECLK");
  end

  always @(posedge syn100k) begin
    if (syn_rise_last >= 0 && t > 100) check(int'(t) - syn_rise_last == 10, "100 kHz synch period");
    syn_rise_last = int'(t);
  end

  initial begin
    wait (n_cyc == 7);
    check(n_test == 2, $sformatf("TESTCYCLECLK on every 5th CYCLECLK (%0d in 7)", n_test));
    check(syn100kn == ~syn100k && syn_oe, "synch outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (15_000_000) @(posedge clk1m);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
