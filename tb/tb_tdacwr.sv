// tb_tdacwr: sends threshold DAC load strobes and decodes the serial bus.
// Checks the word {channel, value[5:0], 10 zeros}, 36 us per shift, that a
// load strobe during a shift is ignored, that the output load waits for the
// next CYCLECLK after the shift, and TDACCLR without power.
module tb_tdacwr;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, afepwr = 1'b1, cycleclk = 0, tdaccmdlat = 0, tdacld, tdacclr;
  logic [15:0] cmd_data = '0;
  dac_ser_t tdac;
  int checks = 0, failures = 0, nld = 0;
  tdacwr dut (.clk1m, .rst, .afepwr, .cycleclk, .cmd_data, .tdaccmdlat, .tdac, .tdacld, .tdacclr);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [17:0] rx, words[$]; int nb = 0;
  always @(posedge tdac.sclk) if (!tdac.cs_n && !rst) begin
    rx = {rx[16:0], tdac.sdat}; nb++;
    if (nb == 18) begin words.push_back(rx); nb = 0; end
  end
  always @(posedge clk1m) if (tdacld && !rst) nld++;
  task automatic cmd(input logic [7:0] d);
    @(negedge clk1m); cmd_data = {8'h00, d}; tdaccmdlat = 1; @(negedge clk1m); tdaccmdlat = 0;
  endtask
  task automatic cyc();
    @(negedge clk1m); cycleclk = 1; @(negedge clk1m); cycleclk = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk1m); rst = 0;
    for (int k = 0; k < 8; k++) begin
      logic [7:0] d; int t;
      d = 8'($urandom);
      cmd(d); t = 0;
      cmd(~d);                                // ignored: shift in progress
      while (tdac.cs_n == 0) begin @(negedge clk1m); t++; end
      check(t + 2 == 36, $sformatf("shift time %0d", t + 2));  // two cycles spent in the second cmd()
      check(words.size() == k + 1 && words[k] == {d[7:6], d[5:0], 10'b0},
            $sformatf("word %h", words[words.size() - 1]));
      repeat (20) @(negedge clk1m);
      check(nld == k, $sformatf("no load before CYCLECLK %0d %0d", nld, k));
      cyc(); @(negedge clk1m);
      check(nld == k + 1, "load at CYCLECLK");
      cyc(); @(negedge clk1m);
      check(nld == k + 1, "one load per command");
    end
    // command, CYCLECLK during the shift: load waits for the next one
    cmd(8'h41); repeat (10) @(negedge clk1m); cyc(); repeat (40) @(negedge clk1m);
    check(nld == 8, "no load at a CYCLECLK during the shift");
    cyc(); @(negedge clk1m); check(nld == 9, "load at the following CYCLECLK");
    afepwr = 0; @(negedge clk1m); check(tdacclr, "clear without power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
