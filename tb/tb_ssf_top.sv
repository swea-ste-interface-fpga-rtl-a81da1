// tb_ssf_top: end-to-end test of the whole SSF at its default parameters
// (1 MHz clock, 2 s cycles, real step and sample timing), with the SRAM
// model, four analog-chain ADC models sharing the ADC data bus, a
// housekeeping ADC model, anode pulse sources, a serial command sender, DAC
// serial decoders and a telemetry decoder. It runs a little over six 2 s
// cycles of traffic, then waits for an unused arm to expire (about 28 s of
// simulated time in all). The IDPU ticks TK1S/SECS0 come once per second.
// Scenario: power on the analog side and enable everything by command,
// load a few energy- and sweep-LUT words and switch the buffers, send DAC,
// heater, arm/execute, cover and sweep-housekeeping commands (one with bad
// parity, one unarmed execute), inject events and anode pulses, then test
// memory test mode, a latch-up shutdown, the STE test pulser ramp and the
// expiry of an arm that is never executed.
// Every mechanism below is counted; one that never happens is a failure,
// as is any content check that fails.
module tb_ssf_top;
  import ssf_pkg::*;
  localparam int SEC = 1_000_000;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;

  logic hwrstl = 0, tk1s = 0, secs0 = 0, cmddat = 0, cmdclk = 0, afeshdn = 0;
  logic [15:0] apulse = '0;
  logic [3:0] lld = 0, uld = 0, peak = 0, pulserst = 0, adcbusy = 0;
  logic [11:0] adcdat;
  logic hadcbusy = 0, sweacovstat = 0;
  logic [1:0] stecovstat = 2'b01;
  logic [7:0] memdin, memdout;
  logic [18:0] memadr;
  logic memcs_n, memoe_n, memwr_n;
  logic afepwr, afe_oe, atestpulse_o, stetestpulse_n, adcrst, hadcsoc, hadcread;
  logic [3:0] adcsoc, adcread, schainenb;
  logic [2:0] amuxsel;
  logic [1:0] amuxenb, stecovsw;
  dac_ser_t swdac, mpdac, tdac;
  logic swdacld, swdacclr, mpdacld, mpdacclr, tdacld, tdacclr, syn100k, syn100kn, syn_oe;
  logic nrhvenb, mcphvenb, sweacovsw, opheater, tdat, tframe;

  ssf_top dut (.*);
  sram_512kx8 u_sram (.clk1m, .a(memadr), .d_in(memdout), .d_out(memdin), .cs_n(memcs_n), .oe_n(memoe_n), .wr_n(memwr_n));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {M_CMD_PE, M_ARM_EXEC, M_UNARMED, M_LUT_ENERGY, M_LUT_SWEEP, M_STEP, M_SWAP, M_ANODE, M_ANODE_HK,
                    M_RATES, M_RATES1, M_HK, M_ENERGY, M_HIST, M_TESTMODE, M_EVENT, M_DROP, M_INHIBIT, M_MCP, M_MCP_WINDOW,
                    M_STEBIAS, M_TDAC, M_HEATER, M_SWCOVER, M_SWCOVER_OFF, M_STECOVER, M_LATCHUP, M_SHDN_HK,
                    M_SYNC, M_ATEST, M_STEPULSE, M_ARM_TIMEOUT, M_NMECH} mech_e;
  int mech [M_NMECH];

  // ---------------- IDPU ticks ----------------
  int sec_idx = 0;
  initial begin
    forever begin
      repeat (SEC - 1) @(negedge clk1m);
      sec_idx++; secs0 = sec_idx[0]; tk1s = 1; @(negedge clk1m); tk1s = 0;
    end
  end

  // ---------------- command sender ----------------
  task automatic send(input logic [7:0] id, input logic [15:0] d, input bit badpar = 0);
    logic [24:0] f;
    f[24:1] = {id, d};
    f[0] = ~^f[24:1] ^ badpar;
    for (int i = 24; i >= 0; i--) begin @(negedge clk1m); cmddat = f[i]; cmdclk = 1; end
    @(negedge clk1m); cmdclk = 0; cmddat = 0;
    repeat (60) @(negedge clk1m);
  endtask

  // ---------------- ADC models ----------------
  logic [11:0] energy [4];
  int bc [4];
  always @(posedge clk1m) for (int i = 0; i < 4; i++) begin
    if (adcsoc[i] && bc[i] == 0 && !adcbusy[i]) bc[i] <= 1;
    else if (bc[i] != 0) bc[i] <= (bc[i] == 12) ? 0 : bc[i] + 1;
    adcbusy[i] <= bc[i] >= 2 && bc[i] < 12;
  end
  int hbc = 0;
  logic [11:0] hval;
  always @(posedge clk1m) begin
    if (hadcsoc && hbc == 0 && !hadcbusy) begin hbc <= 1; hval <= 12'h300 + 12'({amuxenb == 2'b10, amuxsel}); end
    else if (hbc != 0) hbc <= (hbc == 10) ? 0 : hbc + 1;
    hadcbusy <= hbc >= 2 && hbc < 10;
  end
  always_comb begin
    adcdat = hadcread ? hval : 12'h000;
    for (int i = 0; i < 4; i++) if (adcread[i]) adcdat = energy[i];
  end

  // ---------------- DAC serial decoders ----------------
  logic [17:0] sw_sh, mp_sh, td_sh;
  logic [17:0] mp_words [$];
  logic mp_cs_q = 1, sw_cs_q = 1, td_cs_q = 1;
  int mp_start_low;
  always @(posedge swdac.sclk) if (!swdac.cs_n) sw_sh <= {sw_sh[16:0], swdac.sdat};
  always @(posedge mpdac.sclk) if (!mpdac.cs_n) mp_sh <= {mp_sh[16:0], mpdac.sdat};
  always @(posedge tdac.sclk)  if (!tdac.cs_n)  td_sh <= {td_sh[16:0], tdac.sdat};
  logic tdac_word_ok = 0;
  always @(posedge clk1m) if (hwrstl) begin
    sw_cs_q <= swdac.cs_n; mp_cs_q <= mpdac.cs_n; td_cs_q <= tdac.cs_n;
    if (swdac.cs_n && sw_cs_q === 1'b0 && sw_sh == {2'b00, 16'h1234}) mech[M_LUT_SWEEP]++;
    if (!mpdac.cs_n && mp_cs_q === 1'b1) mp_start_low = int'(dut.u_timcntl.lowcnt);
    if (mpdac.cs_n && mp_cs_q === 1'b0) begin
      if (mp_sh == {2'd3, 16'h5A00}) begin
        mech[M_MCP]++;
        if (dut.enbstetp) begin
          // the 36 us word must lie outside every pulser window [tick-40, tick+88)
          bit clash = 0;
          for (int t = 0; t < 1450; t += 512)
            for (int k = 0; k < 36; k++) begin
              int p; p = (mp_start_low + k) % 1450;
              if (p + 40 >= t && p < t + 88) clash = 1;
              if (t == 0 && p >= 1450 - 40) clash = 1;
            end
          check(!clash, "MCP DAC write outside the STE pulser window");
          mech[M_MCP_WINDOW]++;
        end
      end
      if (mp_sh == {2'd2, 16'h3300}) mech[M_STEBIAS]++;
    end
    if (tdac.cs_n && td_cs_q === 1'b0 && td_sh == {2'b10, 6'h15, 10'b0}) tdac_word_ok <= 1;
    if (tdacld && tdac_word_ok) mech[M_TDAC]++;
    if (swdacld) mech[M_STEP]++;
  end

  // ---------------- other mechanism monitors ----------------
  logic arb_q = 0, syn_q = 0, atp_q = 0, stp_q = 1, afepwr_q = 0, heat_q = 0, swc_q = 0, stc_q = 0;
  always @(posedge clk1m) if (hwrstl) begin
    arb_q <= dut.u_memcntl.arbufsel; syn_q <= syn100k; atp_q <= atestpulse_o; stp_q <= stetestpulse_n;
    afepwr_q <= afepwr; heat_q <= opheater; swc_q <= sweacovsw; stc_q <= stecovsw[0];
    if (dut.u_memcntl.arbufsel !== arb_q) mech[M_SWAP]++;
    if (syn100k && !syn_q) mech[M_SYNC]++;
    if (atestpulse_o && !atp_q) mech[M_ATEST]++;
    if (!stetestpulse_n && stp_q) mech[M_STEPULSE]++;
    if (!afepwr && afepwr_q && afeshdn) mech[M_LATCHUP]++;
    if (opheater && !heat_q) begin
      mech[M_HEATER]++;
      check(dut.u_timcntl.ingap, "heater changes at GAPSTART");
    end
    if (sweacovsw && !swc_q) mech[M_SWCOVER]++;
    if (!sweacovsw && swc_q) mech[M_SWCOVER_OFF]++;
    if (stecovsw[0] && !stc_q) mech[M_STECOVER]++;
    if (adcsoc != 0) mech[M_EVENT]++;
    if (dut.u_evproc.evdrop != 0) mech[M_DROP]++;
    if (!dut.u_evproc.allprstl && afepwr) mech[M_INHIBIT]++;
  end

  // ---------------- telemetry decoder ----------------
  logic [15:0] cur [$];
  logic [15:0] sh;
  int nb = -1, lld_sent [4], lld_tlm [4], apulse_sent [16], anode_tlm [16];
  int cpe_seen = 0, pce_seen = 0, hv_seen = 0, last_scnt = 0, scnt_bad = 0;
  realtime last_scnt_t = 0;
  bit energy_pwr_off_ok = 1;
  task automatic message(input logic [15:0] m [$]);
    logic [5:0] id;
    id = m[0][15:10];
    check(32'(m[0][9:0]) == m.size() - 2, $sformatf("message %h length field", id));
    case (id)
      MSG_ANODE, MSG_ANODE_HK: begin
        mech[id == MSG_ANODE ? M_ANODE : M_ANODE_HK]++;
        check(m.size() == (id == MSG_ANODE ? 18 : 19), "anode message length");
        for (int i = 0; i < 16; i++) anode_tlm[i] += m[1 + i];
        // SAMPLECNT runs 336 (first message, 5.8 ms after CYCLECLK) down to 1
        if (m[17] < 1 || m[17] > 336 || (last_scnt > 1 && $realtime - last_scnt_t < 24000 && m[17] != 16'(last_scnt - 1) && m[17] != 336))
          scnt_bad++;   // (messages more than 12 ms apart, around a shutdown, are not compared)
        last_scnt = m[17]; last_scnt_t = $realtime;
        if (id == MSG_ANODE_HK) check(m[18][15:12] == 4'd5 && m[18][11:0] == 12'h305, "sweep housekeeping value");
      end
      MSG_RATES, MSG_RATES1: begin
        mech[id == MSG_RATES ? M_RATES : M_RATES1]++;
        for (int i = 0; i < 4; i++) lld_tlm[i] += m[1 + i];
      end
      MSG_HSKP: begin
        mech[M_HK]++;
        if (m[2][0]) cpe_seen++;
        if (m[2][15]) pce_seen++;
        if (m[2][10]) hv_seen++;
        if (!m[2][1] && m[2][2]) mech[M_SHDN_HK]++;
      end
      default: if (id[5:4] == 2'b11 && id[2:1] == 2'b01) begin
        int hist_bad = 0, hist_sum = 0;
        mech[M_ENERGY]++;
        check(m.size() == 257, "energy message length");
        if (id[3]) begin
          // test mode reads the energy LUT words loaded above
          check(m[51] == 16'h1514 && m[52] == 16'h1716, $sformatf("memory test mode readout %h %h", m[51], m[52]));
          if (m[51] == 16'h1514) mech[M_TESTMODE]++;
        end else for (int b = 0; b < 256; b++)
          if (b >= 20 && b <= 23) hist_sum += m[1 + b];
          else if (b != 0 && m[1 + b] != 0) hist_bad++;
        if (!id[3]) check(hist_bad == 0, $sformatf("no counts outside the loaded LUT bins (%0d, t=%0t, bin0=%0d)", hist_bad, $time, m[1]));
        if (hist_sum > 0 && !id[3]) mech[M_HIST]++;
      end else check(0, $sformatf("unknown message id %h", id));
    endcase
  endtask
  always @(posedge clk1m) if (hwrstl) begin
    if (tframe) begin
      if (nb < 0) begin check(tdat == 1'b1, "start bit"); nb = 0; cur = {}; end
      else begin
        sh = {sh[14:0], tdat}; nb++;
        if (nb == 16) begin cur.push_back(sh); nb = 0; end
      end
    end else if (nb >= 0) begin
      check(nb == 0 && cur.size() > 0, "whole words per message");
      message(cur); nb = -1;
    end
  end

  // ---------------- stimulus ----------------
  bit events_on = 0, anodes_on = 0;
  task automatic event_on(input int ch, input logic [11:0] e, input bit prst = 0);
    energy[ch] = e;
    @(negedge clk1m); lld[ch] = 1; pulserst[ch] = prst;
    @(negedge clk1m); peak[ch] = 1; @(negedge clk1m); @(negedge clk1m); peak[ch] = 0;
    @(negedge clk1m); lld[ch] = 0; pulserst[ch] = 0;
    if (afepwr) lld_sent[ch]++;
  endtask
  initial forever begin
    @(negedge clk1m);
    if (events_on) begin
      int ch, r;
      ch = $urandom_range(3); r = $urandom_range(99);
      if (r < 3) fork event_on(ch, 12'd100); begin repeat (6) @(negedge clk1m); event_on(ch, 12'd100); end join
      else if (r < 5) event_on(ch, 12'd101, 1);
      else event_on(ch, 12'(100 + $urandom_range(3)));
      repeat ($urandom_range(30, 80)) @(negedge clk1m);
    end
  end
  initial forever begin
    @(negedge clk1m);
    if (anodes_on) begin
      int a; a = $urandom_range(15);
      #0.25 apulse[a] = 1; #0.5 apulse[a] = 0;
      if (afepwr) apulse_sent[a]++;
      repeat ($urandom_range(1, 4 * a + 4)) @(negedge clk1m);
    end
  end

  function automatic logic [15:0] ctrl(input bit force_on);
    // all telemetry on, test pulsers on, chains on, ADC reset off, SWEA on
    return 16'hF000 | (force_on ? 16'h0800 : 16'h0) | 16'h0300 | 16'h00F0 | 16'h0004;
  endfunction

  initial begin
    repeat (5) @(negedge clk1m); hwrstl = 1;
    repeat (20) @(negedge clk1m);
    send(CMD_CTRL, ctrl(1));
    check(afepwr && !adcrst, "analog power on, ADC reset released");
    send(CMD_HEATER, 16'h0001, 1);                 // bad parity: ignored, CMDPE set
    // energy LUT words for chain 0, energies 100..103 -> bins 20..23; also chains 1..3
    for (int c = 0; c < 4; c++) begin
      send(CMD_LUTADDR, 16'((c * 4096 + 100) & 16'h3FFE));
      send(CMD_LUTDATA, 16'h1514); send(CMD_LUTDATA, 16'h1716);
    end
    check(u_sram.mem[19'h04064] == 8'h14 && u_sram.mem[19'h04067] == 8'h17 && u_sram.mem[19'h07067] == 8'h17,
          "energy LUT bytes written to the inactive buffer");
    if (u_sram.mem[19'h04064] == 8'h14) mech[M_LUT_ENERGY]++;
    send(CMD_LUTADDR, 16'h4002); send(CMD_LUTDATA, 16'h1234);   // sweep LUT DAC0 step 1
    send(CMD_BUFSEL, 16'h0003);
    send(CMD_STEBIAS, 16'h0033);
    send(CMD_TDAC, 16'h0095);                      // DAC 2, value 0x15
    send(CMD_SWHKSEL, 16'h0005);
    send(CMD_ARM, 16'h0080); send(CMD_PEXEC, 16'h0080);   // NR HV on
    send(CMD_PEXEC, 16'h0040);                            // unarmed MCP HV on: refused
    send(CMD_ARM, 16'h0004); send(CMD_PEXEC, 16'h0004);   // SWEA cover
    send(CMD_COVTMO, 16'h000F);                           // no STE cover timeout
    send(CMD_PEXEC, 16'h0001);                            // STE cover, non-forced
    wait (sec_idx == 2); repeat (SEC / 2 + 100) @(negedge clk1m);
    check(nrhvenb && !mcphvenb, "armed execute sets NR HV, unarmed MCP HV refused");
    if (nrhvenb) mech[M_ARM_EXEC]++;
    check(stecovsw[0], "STE cover on in non-forced mode");
    stecovstat = 2'b00; repeat (20) @(negedge clk1m);
    check(!stecovsw[0], "STE cover stops on status");
    repeat (100) @(negedge clk1m);
    events_on = 1; anodes_on = 1;
    send(CMD_HEATER, 16'h0001);
    send(CMD_MCPDAC, 16'h005A);                    // STE pulser enabled: window rule
    wait (sec_idx == 6); repeat (20000) @(negedge clk1m);
    send(CMD_MEMTEST, 16'h0120);                   // test mode next cycle, reads 0x04000..
    wait (sec_idx == 7);
    // latch-up: drop the force-on, then AFESHDN
    send(CMD_CTRL, ctrl(0));
    check(afepwr, "power stays on without force");
    afeshdn = 1; repeat (5) @(negedge clk1m);
    check(!afepwr && adcrst && schainenb == 0 && !nrhvenb, "latch-up shutdown");
    repeat (SEC / 2) @(negedge clk1m);
    afeshdn = 0;
    send(CMD_CTRL, ctrl(1));
    check(afepwr, "analog power back on");
    wait (sec_idx == 10); repeat (SEC / 2) @(negedge clk1m);
    send(CMD_MEMTEST, 16'h0020);
    wait (sec_idx == 12); repeat (100000) @(negedge clk1m);
    events_on = 0; anodes_on = 0;
    // an arm that is never executed expires 15-16 s later
    begin
      int t0, t1;
      send(CMD_ARM, 16'h0040); t0 = sec_idx;
      check(dut.armed, "arm accepted");
      wait (!dut.armed); t1 = sec_idx;
      check(t1 - t0 >= 15 && t1 - t0 <= 16, $sformatf("arm expired after %0d s", t1 - t0));
      if (!mcphvenb) mech[M_ARM_TIMEOUT]++;
    end
    repeat (1000) @(negedge clk1m);
    // summaries
    for (int i = 0; i < 4; i++)
      check(lld_tlm[i] <= lld_sent[i] && lld_tlm[i] * 10 >= lld_sent[i] * 8,
            $sformatf("LLD rate chain %0d: %0d of %0d", i, lld_tlm[i], lld_sent[i]));
    for (int i = 0; i < 16; i++)
      check(anode_tlm[i] <= apulse_sent[i] && anode_tlm[i] * 10 >= apulse_sent[i] * 8,
            $sformatf("anode %0d: %0d of %0d", i, anode_tlm[i], apulse_sent[i]));
    check(scnt_bad == 0, $sformatf("SAMPLECNT sequence in anode messages (%0d bad)", scnt_bad));
    check(cpe_seen > 0, "CMDPE reported"); if (cpe_seen > 0) mech[M_CMD_PE]++;
    check(hv_seen > 0 && pce_seen > 0, "HV enable and PCE reported");
    if (pce_seen > 0 && !mcphvenb) mech[M_UNARMED]++;
    for (int i = 0; i < M_NMECH; i++) begin
      mech_e e; e = mech_e'(i);
      $display("mechanism %-14s %0d", e.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (31 * SEC) @(posedge clk1m); failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
