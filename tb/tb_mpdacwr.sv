// tb_mpdacwr: drives pulser and command requests into the shared-DAC
// controller and decodes the serial DAC bus. Checks: the word carries the
// channel (0 pulser, 3 MCP, 2 STE bias) and value; a command write waits
// while DACWRON is low and goes out when it rises; with both requests
// waiting the pulser goes first; a command write is followed by a load
// pulse, a pulser write is not (its load comes from PDACLD, passed through);
// MPDACCLR follows power.
module tb_mpdacwr;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, afepwr = 1'b1, pdacrq = 0, pdacld = 0, dacwron = 1, mcpdacrq = 0;
  logic [15:0] pdat = '0, mcpdat = '0;
  logic [1:0]  dacsel = DAC_MCP;
  logic pwrdn, mwrdn, mpdacld, mpdacclr;
  dac_ser_t mpdac;
  int checks = 0, failures = 0, nld = 0;
  mpdacwr dut (.clk1m, .rst, .afepwr, .pdacrq, .pdat, .pdacld, .dacwron, .mcpdacrq,
               .mcpdat, .dacsel, .pwrdn, .mwrdn, .mpdac, .mpdacld, .mpdacclr);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [17:0] rx, words[$]; int nb = 0;
  always @(posedge mpdac.sclk) if (!mpdac.cs_n && !rst) begin
    rx = {rx[16:0], mpdac.sdat}; nb++;
    if (nb == 18) begin words.push_back(rx); nb = 0; end
  end
  always @(posedge clk1m) if (mpdacld && !rst) nld++;
  // requesters drop their request on done
  always @(posedge clk1m) begin
    if (pwrdn) pdacrq <= 0;
    if (mwrdn) mcpdacrq <= 0;
  end
  initial begin
    repeat (2) @(posedge clk1m); rst = 0;
    @(negedge clk1m); check(!mpdacclr, "no clear while powered");
    // command write while the window is closed
    @(negedge clk1m); dacwron = 0; mcpdat = 16'hAB00; dacsel = DAC_MCP; mcpdacrq = 1;
    repeat (60) @(negedge clk1m);
    check(words.size() == 0, "command write held while DACWRON low");
    dacwron = 1;
    wait (!mcpdacrq); repeat (3) @(negedge clk1m);
    check(words.size() == 1 && words[0] == {DAC_MCP, 16'hAB00}, "MCP word");
    check(nld == 1, $sformatf("load after a command write %0d", nld));
    // both at once: pulser first
    @(negedge clk1m); pdat = 16'h1234; pdacrq = 1; mcpdat = 16'h5600; dacsel = DAC_STEBIAS; mcpdacrq = 1;
    wait (!pdacrq && !mcpdacrq); repeat (3) @(negedge clk1m);
    check(words.size() == 3, "two more words");
    if (words.size() == 3) begin
      check(words[1] == {DAC_STEPULSER, 16'h1234}, "pulser first");
      check(words[2] == {DAC_STEBIAS, 16'h5600}, "STE bias second");
    end
    check(nld == 2, "no load of its own after a pulser write");
    @(negedge clk1m); pdacld = 1; @(negedge clk1m); pdacld = 0; @(negedge clk1m);
    check(nld == 3, "PDACLD reaches MPDACLD");
    afepwr = 0; @(negedge clk1m); check(mpdacclr, "clear without power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
