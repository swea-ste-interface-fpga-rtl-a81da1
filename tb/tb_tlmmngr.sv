// tb_tlmmngr: telemetry manager against a memory model (one access every
// other clock, read data = function of the address) and a serial decoder
// that rebuilds each message from TDAT/TFRAME (start bit, then 16-bit words
// MSB first). Checks: anode messages 30 and 31 (with housekeeping), rates 34
// and 35 (interval ending at CYCLECLK), housekeeping 36 and CLRDHSKP, energy
// 32 and the test-cycle ID 33 with all 256 counters, the accumulator clear
// (512 byte writes, one per STEPCLK) and AB_SWAP afterwards, priority order
// anode > rates > housekeeping, the enables (only housekeeping while the
// analog power is off) and that energy waits for the first 1000 us after a
// SAMCLKINT.
module tb_tlmmngr;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1, afepwr = 1, enbswea = 1, hskpmd = 0, mtestmode = 0;
  logic [3:0] tlmenb = 4'b1101;
  logic cycleclk = 0, testcycleclk = 0, stepclk = 0, samclkint = 0, acnt_latched = 0, rate_latched = 0, hkpgdn = 0;
  logic [8:0] samplecnt = 9'd123;
  logic [15:0][13:0] latcnt;
  logic [3:0][8:0] lldlat;
  logic [3:0][3:0] uldlat;
  logic [3:0][2:0] prlat;
  logic [15:0] ahkpg = 16'h5ABC, dhkpg = 16'h1234;
  mem_req_t mem_rq;
  logic mem_done, ab_swap, clrdhskp, tdat, tframe;
  logic [7:0] mem_rdata;
  logic [5:0] cur_id;
  int checks = 0, failures = 0;
  tlmmngr dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // memory model
  logic ph = 0;
  int nwr = 0, wr_bad = 0, nswap = 0, nclr = 0;
  logic [9:0] wr_next = 0;
  always @(posedge clk1m) if (!rst) begin
    ph <= mem_rq.req ? ~ph : 1'b0;
    if (mem_done && mem_rq.we) begin
      if (mem_rq.addr != 19'(wr_next) || mem_rq.wdata != 0) wr_bad++;
      wr_next <= wr_next + 1; nwr++;
    end
    if (ab_swap) nswap++;
    if (clrdhskp) nclr++;
  end
  assign mem_done  = mem_rq.req && ph;
  assign mem_rdata = mem_rq.addr[7:0] ^ {mem_rq.addr[8], 7'h55};
  // serial decoder
  logic [15:0] msgs [$][$];
  logic [15:0] cur [$];
  logic [15:0] sh; int nb = -1;
  always @(posedge clk1m) if (!rst) begin
    if (tframe) begin
      if (nb < 0) begin
        if (!tdat) begin failures++; $display("FAIL: missing start bit"); end
        nb = 0; cur = {};
      end else begin
        sh = {sh[14:0], tdat}; nb++;
        if (nb == 16) begin cur.push_back(sh); nb = 0; end
      end
    end else if (nb >= 0) begin
      if (nb != 0) begin failures++; $display("FAIL: partial word"); end
      msgs.push_back(cur); nb = -1;
    end
  end
  task automatic pulse(ref logic s);
    @(negedge clk1m); s = 1; @(negedge clk1m); s = 0;
  endtask
  task automatic wait_msgs(input int n);
    int t = 0;
    while (msgs.size() < n && t < 20000) begin @(negedge clk1m); t++; end
    repeat (3) @(negedge clk1m);
  endtask
  function automatic logic [15:0] ew(input int k);
    return {8'(2 * k + 1) ^ {k[7], 7'h55}, 8'(2 * k) ^ {k[7], 7'h55}};
  endfunction
  task automatic check_anode(input logic [15:0] m [$], input bit hk);
    bit ok;
    ok = m.size() == (hk ? 19 : 18) && m[0] == tlm_header(hk ? MSG_ANODE_HK : MSG_ANODE, hk ? 19 : 18) && m[17] == 16'(samplecnt);
    for (int i = 0; i < 16; i++) if (m[1 + i] != 16'(latcnt[i])) ok = 0;
    if (hk && m[18] != ahkpg) ok = 0;
    check(ok, $sformatf("anode message hk=%0d", hk));
  endtask
  task automatic check_rates(input logic [15:0] m [$], input bit first);
    bit ok;
    ok = m.size() == 13 && m[0] == tlm_header(first ? MSG_RATES1 : MSG_RATES, 13);
    for (int i = 0; i < 4; i++)
      if (m[1 + i] != 16'(lldlat[i]) || m[5 + i] != 16'(uldlat[i]) || m[9 + i] != 16'(prlat[i])) ok = 0;
    check(ok, $sformatf("rates message first=%0d", first));
  endtask
  task automatic check_energy(input logic [15:0] m [$], input logic [5:0] id);
    int bad = 0;
    if (m.size() != 257) bad = 1000;
    else for (int k = 0; k < 256; k++) if (m[1 + k] != ew(k)) bad++;
    check(m.size() > 0 && m[0] == tlm_header(id, 257) && bad == 0, $sformatf("energy message id %h bad %0d", id, bad));
  endtask
  initial begin
    for (int i = 0; i < 16; i++) latcnt[i] = 14'(i * 1000 + 7);
    for (int i = 0; i < 4; i++) begin lldlat[i] = 9'(300 + i); uldlat[i] = 4'(9 + i); prlat[i] = 3'(i + 2); end
    repeat (3) @(posedge clk1m); rst = 0;
    // anode 30, then 31
    pulse(acnt_latched); wait_msgs(1); check_anode(msgs[0], 0);
    hskpmd = 1; pulse(acnt_latched); wait_msgs(2); check_anode(msgs[1], 1); hskpmd = 0;
    // rates 34, then 35 for the interval ending at CYCLECLK
    pulse(rate_latched); wait_msgs(3); check_rates(msgs[2], 0);
    pulse(cycleclk); pulse(rate_latched); wait_msgs(4); check_rates(msgs[3], 1);
    pulse(rate_latched); wait_msgs(5); check_rates(msgs[4], 0);
    // housekeeping
    pulse(hkpgdn); wait_msgs(6);
    check(msgs[5].size() == 3 && msgs[5][0] == tlm_header(MSG_HSKP, 3) && msgs[5][1] == ahkpg && msgs[5][2] == dhkpg,
          "housekeeping message");
    check(nclr == 1, "CLRDHSKP after housekeeping message");
    // priority: all three at once
    @(negedge clk1m); acnt_latched = 1; rate_latched = 1; hkpgdn = 1;
    @(negedge clk1m); acnt_latched = 0; rate_latched = 0; hkpgdn = 0;
    wait_msgs(9);
    check(msgs[6].size() == 18 && msgs[7].size() == 13 && msgs[8].size() == 3, "priority anode > rates > hk");
    // analog power off: only housekeeping
    afepwr = 0;
    @(negedge clk1m); acnt_latched = 1; rate_latched = 1; hkpgdn = 1;
    @(negedge clk1m); acnt_latched = 0; rate_latched = 0; hkpgdn = 0;
    wait_msgs(10); repeat (500) @(negedge clk1m);
    check(msgs.size() == 10 && msgs[9].size() == 3, "only housekeeping while AFEPWR off");
    afepwr = 1; enbswea = 0; pulse(acnt_latched); repeat (500) @(negedge clk1m);
    check(msgs.size() == 10, "no anode message with SWEA disabled");
    enbswea = 1;
    // energy: waits for a SAMCLKINT phase window
    tlmenb = 4'b1111;
    pulse(samclkint); repeat (1200) @(negedge clk1m);
    pulse(cycleclk); repeat (2000) @(negedge clk1m);
    check(msgs.size() == 10, "energy held outside the SAMCLKINT window");
    pulse(samclkint); wait_msgs(11);
    check_energy(msgs[10], MSG_ENERGY);
    // accumulator clear, one write per STEPCLK, then the swap
    repeat (3) begin pulse(stepclk); repeat (10) @(negedge clk1m); end
    check(nwr == 3 && nswap == 0, "clear paced by STEPCLK");
    repeat (509) begin pulse(stepclk); repeat (10) @(negedge clk1m); end
    check(nwr == 512 && wr_bad == 0 && nswap == 1, $sformatf("clear 512 bytes then swap (%0d %0d %0d)", nwr, wr_bad, nswap));
    // test cycle id, test mode: no clear
    mtestmode = 1;
    pulse(samclkint); @(negedge clk1m); testcycleclk = 1; cycleclk = 1; @(negedge clk1m); testcycleclk = 0; cycleclk = 0;
    wait_msgs(12);
    check_energy(msgs[11], MSG_ENERGY | 6'h09);
    repeat (20) begin pulse(stepclk); repeat (10) @(negedge clk1m); end
    check(nwr == 512 && nswap == 1, "no clear or swap in memory test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
