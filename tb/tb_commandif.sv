// tb_commandif: sends serial commands (ID, data, odd parity) and checks the
// decoded registers, the staging of delayed values at CYCLECLK / GAPSTART,
// the select strobes, parity errors (CPE, cleared by CLRDHSKP), the
// protected-command sequences (arm, execute at the half-second tick, wrong
// execute, unarmed execute, illegal arm, disarm, arm timeout after 16 s of
// TK1S), dominant clears, the effect of losing analog power, and ANORM.
module tb_commandif;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, cmddat = 0, cmdclk = 0, cycleclk = 0, gapstart = 0, tk1s = 0, tkhs = 0;
  logic afepwr = 1, ctimidle = 1, sweaclr = 0, steclr = 0, clrdhskp = 0;
  logic [15:0] cmd_data;
  logic mcpcmdlat, stebiascmdlat, tdaccmdlat, lutaddrlat, lutdatlat;
  logic [3:0] tlmenb, schainenb, swhksel, stecovtmo;
  logic afepwron, afepwroff, enbstetp, enbsweatp, adcrst, enbswea, tplrmode, s100kdis;
  logic swbufsel, enbufsel, opheater, mtestmode, nrhvenb, mcphvenb, sweacovon, armed;
  logic cmdpe, pce, anorm;
  logic [1:0] mqsel, forstecovon, stecovon;
  logic [7:0] tmadr;
  int checks = 0, failures = 0;
  int nstrobe[5];

  commandif dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always @(posedge clk1m) begin
    if (mcpcmdlat) nstrobe[0]++;
    if (stebiascmdlat) nstrobe[1]++;
    if (tdaccmdlat) nstrobe[2]++;
    if (lutaddrlat) nstrobe[3]++;
    if (lutdatlat) nstrobe[4]++;
  end
  task automatic send(input logic [7:0] id, input logic [15:0] d, input bit badpar = 0);
    logic [24:0] f;
    f[24:1] = {id, d};
    f[0] = ~^f[24:1] ^ badpar;        // odd parity over all 25 bits
    for (int i = 24; i >= 0; i--) begin
      @(negedge clk1m); cmddat = f[i]; cmdclk = 1;
    end
    @(negedge clk1m); cmdclk = 0; cmddat = 0;
    repeat (3) @(negedge clk1m);
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk1m); s = 1; @(negedge clk1m); s = 0; @(negedge clk1m);
  endtask
  task automatic seconds(input int n);
    repeat (n) pulse(tk1s);
  endtask

  initial begin
    repeat (3) @(posedge clk1m); rst = 0; @(negedge clk1m);
    check(adcrst && !enbswea && tlmenb == 0 && !nrhvenb, "reset values");
    // controls / enables: immediate and staged parts
    send(CMD_CTRL, 16'hF0F4 | 16'h0800);
    check(afepwron && enbswea && !adcrst && !tplrmode, "immediate control bits");
    check(tlmenb == 0 && schainenb == 0, "staged bits wait for CYCLECLK");
    pulse(cycleclk);
    check(tlmenb == 4'hF && schainenb == 4'hF, "staged bits at CYCLECLK");
    check(!anorm || afepwron, "ANORM reflects AFEPWRON");
    send(CMD_CTRL, 16'hF0F4); pulse(cycleclk);
    check(!anorm, "ANORM clear in the normal configuration");
    // buffer select: sweep at GAPSTART, energy at CYCLECLK
    send(CMD_BUFSEL, 16'h0003);
    check(!swbufsel && !enbufsel, "buffer selects staged");
    pulse(gapstart); check(swbufsel && !enbufsel, "sweep buffer select at GAPSTART");
    pulse(cycleclk); check(enbufsel, "energy buffer select at CYCLECLK");
    send(CMD_HEATER, 16'h0001); check(!opheater, "heater staged");
    pulse(gapstart); check(opheater, "heater at GAPSTART");
    send(CMD_SWHKSEL, 16'h0009); pulse(cycleclk); check(swhksel == 4'h9, "sweep hk select");
    send(CMD_MEMQUAD, 16'h0002); check(mqsel == 2'b10, "memory quadrant");
    send(CMD_MEMTEST, 16'h01A5); check(tmadr == 8'hA5 && !mtestmode, "test address immediate, mode staged");
    pulse(cycleclk); check(mtestmode, "test mode at CYCLECLK");
    send(CMD_COVTMO, 16'h0007); check(stecovtmo == 4'h7, "cover timeout");
    // strobes
    send(CMD_MCPDAC, 16'h00AB); check(nstrobe[0] == 1 && cmd_data == 16'h00AB, "MCP strobe and data");
    send(CMD_STEBIAS, 16'h0012); check(nstrobe[1] == 1, "STE bias strobe");
    send(CMD_TDAC, 16'h0045);    check(nstrobe[2] == 1, "TDAC strobe");
    send(CMD_LUTADDR, 16'h4010); check(nstrobe[3] == 1, "LUT address strobe");
    send(CMD_LUTDATA, 16'hBEEF); check(nstrobe[4] == 1, "LUT data strobe");
    // parity error
    send(CMD_MCPDAC, 16'h0077, 1);
    check(cmdpe && nstrobe[0] == 1 && cmd_data == 16'hBEEF, "parity error flagged, command dropped");
    pulse(clrdhskp); check(!cmdpe, "CPE cleared after read-out");
    // protected: arm MCP HV, execute, set at half-second tick
    send(CMD_ARM, 16'h0040); check(armed && anorm, "armed");
    send(CMD_PEXEC, 16'h0040); check(!mcphvenb && !armed, "set waits for the half-second tick");
    pulse(tkhs); check(mcphvenb && !pce, "MCP HV enabled");
    // wrong execute
    send(CMD_ARM, 16'h0080); send(CMD_PEXEC, 16'h0040);
    pulse(tkhs); check(!nrhvenb && !armed && pce, "wrong execute ignored, disarmed, error");
    pulse(clrdhskp); check(!pce, "PCE cleared after read-out");
    // unarmed execute
    send(CMD_PEXEC, 16'h0080); pulse(tkhs); check(!nrhvenb && pce, "unarmed execute is an error");
    pulse(clrdhskp);
    // illegal arm (two bits) and disarm when idle
    send(CMD_ARM, 16'h00C0); check(!armed && pce, "illegal arm");
    pulse(clrdhskp);
    send(CMD_ARM, 16'h0000); check(pce, "disarm when idle is an error");
    pulse(clrdhskp);
    // disarm
    send(CMD_ARM, 16'h0004); send(CMD_ARM, 16'h0000); check(!armed && !pce, "disarm");
    // other arms ignored while armed
    send(CMD_ARM, 16'h0004); send(CMD_ARM, 16'h0080); send(CMD_PEXEC, 16'h0004);
    pulse(tkhs); check(sweacovon, "SWEA cover through arm/execute, second arm ignored");
    pulse(sweaclr); check(!sweacovon, "SWEA cover cleared by the cover subsystem");
    // arm timeout: not yet after 15 ticks, error on the 16th
    send(CMD_ARM, 16'h0080); seconds(15); check(armed, "still armed after 15 s");
    seconds(1); check(!armed && pce, "arm expires on the 16th second");
    pulse(clrdhskp);
    // off with on in the same execute: clear wins; off needs no arm
    send(CMD_ARM, 16'h0080); send(CMD_PEXEC, 16'h8080); pulse(tkhs);
    check(!nrhvenb, "clear overrides set");
    send(CMD_PEXEC, 16'h4000); check(!mcphvenb, "MCP HV off without arm");
    // STE covers: forced via arm, non-forced without, both bits -> nothing
    send(CMD_ARM, 16'h0001); send(CMD_PEXEC, 16'h0001); pulse(tkhs);
    check(forstecovon == 2'b01 && stecovon == 0, "forced STE open");
    pulse(steclr); check(forstecovon == 0, "STE cleared");
    send(CMD_PEXEC, 16'h0002); pulse(tkhs); check(stecovon == 2'b10 && forstecovon == 0 && !pce, "non-forced STE close");
    send(CMD_PEXEC, 16'h0100); check(stecovon == 0, "FORCE STE OFF clears");
    send(CMD_PEXEC, 16'h0003); pulse(tkhs); check(stecovon == 0, "open and close together register nothing");
    ctimidle = 0; send(CMD_PEXEC, 16'h0001); pulse(tkhs); check(stecovon == 0, "ignored while cover busy");
    ctimidle = 1;
    // power loss clears enables
    send(CMD_ARM, 16'h0040); send(CMD_PEXEC, 16'h0040); pulse(tkhs);
    afepwr = 0; repeat (2) @(negedge clk1m);
    check(!mcphvenb && !enbswea && schainenb == 0 && adcrst, "power loss clears enables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
