// tb_hskpr: housekeeping sequencer against a housekeeping ADC model (BUSY
// from 2 to 10 clocks after HADCSOC, result = value of the selected analog
// mux input) and a bus arbiter model granting HADCRD one clock after HSKPRQ.
// Checks: cycling mode scans channels 0..15 once per cycle with one HKPGDN
// per TK8HZ and the matching AHKPG word and mux enables; sweep mode holds the
// commanded channel, converts at every SAMPLECLK and still reports at every
// TK8HZ; shutdown mode makes no conversion but keeps HKPGDN running.
module tb_hskpr;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1, afepwr = 1, adcrst = 0, cycleclk = 0, sampleclk = 0, tk8hz = 0, hskpmd = 0;
  logic [3:0] swhksel = 0;
  logic hadcbusy = 0, hadcrd = 0, hadcsoc, hskprq, hkpgdn;
  logic [11:0] adcdat;
  logic [2:0] amuxsel;
  logic [1:0] amuxenb;
  logic [15:0] ahkpg;
  int checks = 0, failures = 0;
  hskpr dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [11:0] fval(input logic [3:0] c);
    return 12'h100 * c + 12'h023;
  endfunction
  logic [3:0] sel_ch;
  logic [11:0] held;
  int bc = 0, nsoc = 0, ndn = 0, mux_bad = 0;
  assign sel_ch = {amuxenb == 2'b10, amuxsel};
  always @(posedge clk1m) begin
    if (!rst && hadcsoc && bc == 0 && !hadcbusy) begin bc <= 1; held <= fval(sel_ch); nsoc <= nsoc + 1;
      if (amuxenb == 2'b00) mux_bad <= mux_bad + 1; end
    else if (bc != 0) bc <= (bc == 10) ? 0 : bc + 1;
    hadcbusy <= bc >= 2 && bc < 10;
    hadcrd <= hskprq && !hadcrd;
    if (hkpgdn) ndn <= ndn + 1;
  end
  assign adcdat = hadcrd ? held : 12'hFFF;
  task automatic pulse(ref logic s);
    @(negedge clk1m); s = 1; @(negedge clk1m); s = 0;
  endtask
  initial begin
    repeat (3) @(posedge clk1m); rst = 0;
    // cycling mode
    pulse(cycleclk); repeat (5) @(negedge clk1m);
    for (int c = 0; c < 16; c++) begin
      int d0; d0 = ndn;
      check(amuxsel == 3'(c) && amuxenb == (c < 8 ? 2'b01 : 2'b10), $sformatf("mux for channel %0d", c));
      pulse(tk8hz); repeat (40) @(negedge clk1m);
      check(ndn == d0 + 1 && ahkpg == {4'(c), fval(4'(c))}, $sformatf("cycling ch %0d ahkpg %h", c, ahkpg));
    end
    check(nsoc == 16, $sformatf("16 conversions per cycle (%0d)", nsoc));
    // sweep mode on channel 11
    hskpmd = 1; swhksel = 4'd11; pulse(cycleclk); repeat (3) @(negedge clk1m);
    check(amuxsel == 3'd3 && amuxenb == 2'b10, "sweep mode selects commanded channel");
    nsoc = 0; ndn = 0;
    repeat (3) begin pulse(sampleclk); repeat (30) @(negedge clk1m); end
    check(nsoc == 3 && ndn == 0, "conversion at each SAMPLECLK");
    pulse(tk8hz); repeat (3) @(negedge clk1m);
    check(ndn == 1 && ahkpg == {4'd11, fval(4'd11)}, "sweep mode reports at TK8HZ");
    // TK8HZ during a conversion still reports
    pulse(sampleclk); pulse(tk8hz); repeat (30) @(negedge clk1m);
    check(ndn == 2, "TK8HZ during a conversion");
    // shutdown
    afepwr = 0; nsoc = 0; ndn = 0; hskpmd = 0;
    repeat (4) begin pulse(tk8hz); repeat (20) @(negedge clk1m); end
    check(nsoc == 0 && ndn == 4 && amuxenb == 2'b00, "shutdown: no conversions, HKPGDN kept");
    afepwr = 1; adcrst = 1; pulse(tk8hz); repeat (20) @(negedge clk1m);
    check(nsoc == 0 && ndn == 5, "ADC reset counts as shutdown");
    check(mux_bad == 0, "no conversion with mux disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
