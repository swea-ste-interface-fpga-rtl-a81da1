// tb_evproc: event processing with ADC models (BUSY 2 clocks after ADCSOC,
// for 10 clocks), a memory model holding an energy LUT function and the
// accumulator bytes, and a housekeeping ADC requester. Checks: every valid
// event increments the accumulator selected by LUT(chain, energy); the
// accumulator high byte is incremented on a low-byte carry; events on a
// pending chain are dropped; a too-long LLD, PULSERST on an enabled chain and
// a disabled chain block acceptance, PULSERST on a disabled chain does not;
// ADCSOC falls once BUSY is seen; the arbiter shares the processor equally
// among four busy chains; housekeeping reads are granted.
module tb_evproc;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1, afepwr = 1, adcrst = 0, hskprq = 0;
  logic [3:0] schainenb = 4'hF, lld = 0, peak = 0, pulserst = 0, adcbusy = 0, adcsoc, adcread, iprstcnt, evdrop;
  logic [11:0] adcdat;
  logic hadcread, allprstl, evdone, mem_done;
  logic [7:0] mem_rdata;
  mem_req_t mem_rq;
  int checks = 0, failures = 0;
  evproc dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [7:0] lut(input logic [13:0] a);
    return 8'((a[13:12] * 64) + (a[11:0] >> 6));
  endfunction
  // memory model
  logic [7:0] acc [512];
  initial foreach (acc[i]) acc[i] = 0;
  logic ph = 0;
  always @(posedge clk1m) begin
    ph <= mem_rq.req ? ~ph : 1'b0;
    if (mem_done && mem_rq.we) acc[mem_rq.addr[8:0]] <= mem_rq.wdata;
  end
  assign mem_done  = mem_rq.req && ph;
  assign mem_rdata = mem_rq.addr[16] ? acc[mem_rq.addr[8:0]] : lut(mem_rq.addr[13:0]);
  // ADC models
  logic [11:0] energy [4];
  int busy_cnt [4];
  int soc_bad = 0;
  always @(posedge clk1m) for (int i = 0; i < 4; i++) begin
    if (adcsoc[i] && busy_cnt[i] == 0 && !adcbusy[i]) busy_cnt[i] <= 1;
    else if (busy_cnt[i] != 0) busy_cnt[i] <= (busy_cnt[i] == 12) ? 0 : busy_cnt[i] + 1;
    adcbusy[i] <= (busy_cnt[i] >= 2 && busy_cnt[i] < 12);
    if (adcbusy[i] && busy_cnt[i] > 4 && adcsoc[i]) soc_bad++;
  end
  logic [11:0] hk_val = 12'hABC;
  always_comb begin
    adcdat = hk_val;
    for (int i = 0; i < 4; i++) if (adcread[i]) adcdat = energy[i];
  end
  int nhk = 0, nproc[4], ndrop = 0;
  always @(posedge clk1m) if (!rst) begin
    if (hadcread) begin nhk++; hskprq <= 0; end
    for (int i = 0; i < 4; i++) if (adcread[i]) nproc[i]++;
    if (evdrop != 0) ndrop++;
  end
  int exp_hist [256];
  task automatic event_on(input int ch, input logic [11:0] e, input int lld_len = 3);
    energy[ch] = e;
    @(negedge clk1m); lld[ch] = 1;
    repeat (lld_len - 2) @(negedge clk1m);
    peak[ch] = 1; @(negedge clk1m); @(negedge clk1m); peak[ch] = 0;
    @(negedge clk1m); lld[ch] = 0;
  endtask
  function automatic int accval(input int b);
    return {acc[2 * b + 1], acc[2 * b]};
  endfunction
  task automatic check_hist(input string tag);
    int bad = 0;
    for (int b = 0; b < 256; b++) if (accval(b) != exp_hist[b]) bad++;
    check(bad == 0, $sformatf("%s: %0d accumulator mismatches", tag, bad));
  endtask
  initial begin
    repeat (3) @(posedge clk1m); rst = 0;
    // single events on each chain, spaced out
    for (int k = 0; k < 40; k++) begin
      int ch; logic [11:0] e;
      ch = k % 4; e = 12'($urandom);
      event_on(ch, e);
      exp_hist[lut({2'(ch), e})]++;
      repeat (40) @(negedge clk1m);
    end
    check_hist("spaced events");
    check(soc_bad == 0, "ADCSOC released after BUSY");
    // carry into the high byte
    acc[2 * 7] = 8'hFF; acc[2 * 7 + 1] = 8'h02; exp_hist[7] = 16'h02FF + 1;
    event_on(0, 12'd448); repeat (60) @(negedge clk1m);   // lut = 7
    check(accval(7) == 16'h0300, $sformatf("carry to high byte: %h", accval(7)));
    // drop: second event on a pending chain
    ndrop = 0;
    fork event_on(1, 12'd64); begin repeat (6) @(negedge clk1m); event_on(1, 12'd64); end join
    exp_hist[lut({2'd1, 12'd64})]++;
    repeat (80) @(negedge clk1m);
    check(ndrop >= 1, "event on a pending chain reported dropped");
    check_hist("after drop");
    // LLD high too long
    event_on(2, 12'd100, 8); repeat (60) @(negedge clk1m);
    check_hist("long LLD rejected");
    // PULSERST on an enabled chain blocks all chains
    pulserst[3] = 1; event_on(0, 12'd200); repeat (60) @(negedge clk1m);
    check_hist("PULSERST inhibits"); check(!allprstl && iprstcnt == 4'b0111, "inhibit outputs");
    // ...but not when that chain is disabled
    schainenb = 4'b0111; event_on(0, 12'd200); exp_hist[lut({2'd0, 12'd200})]++;
    repeat (60) @(negedge clk1m);
    check_hist("PULSERST of a disabled chain ignored");
    event_on(3, 12'd300); repeat (60) @(negedge clk1m);
    check_hist("disabled chain ignored");
    pulserst = 0; schainenb = 4'hF;
    // fairness: all four chains saturated
    foreach (nproc[i]) nproc[i] = 0;
    for (int k = 0; k < 60; k++) begin
      fork
        event_on(0, 12'd5); event_on(1, 12'd5); event_on(2, 12'd5); event_on(3, 12'd5);
      join
    end
    repeat (100) @(negedge clk1m);
    check(nproc[0] > 5 && nproc[0] - nproc[1] <= 1 && nproc[1] - nproc[2] <= 1 && nproc[2] - nproc[3] <= 1 &&
          nproc[3] - nproc[0] <= 1, $sformatf("equal shares %0d %0d %0d %0d", nproc[0], nproc[1], nproc[2], nproc[3]));
    // housekeeping read through the arbiter
    @(negedge clk1m); hskprq = 1; repeat (10) @(negedge clk1m);
    check(nhk == 1, "housekeeping ADC read granted");
    // reset while ADC reset asserted
    adcrst = 1; event_on(0, 12'd1); repeat (40) @(negedge clk1m);
    check(nproc[0] == 0 || adcsoc == 0, "idle while ADC reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
